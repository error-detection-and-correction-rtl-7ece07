// tb_golay_cache_top: end-to-end test of the protected cache at its full
// size (1024 rows of 23 bits, default parameters).
//
// Every row is written with a random message whose stored codeword is hit
// by one error class: none, one bit, two adjacent bits, three adjacent bits,
// two random bits or three random bits. Every row is then read back. Each
// read must return the written message with err_detected/err_corrected set
// exactly when bits were flipped and err_weight equal to their number, with
// rd_valid one cycle after the read is taken and ready low in between. A
// write offered while a read is in flight must be dropped, and reset must
// clear a pending read. Each of these mechanisms is counted and must occur.
module tb_golay_cache_top;
  import golay_ref_pkg::*;

  localparam int DEPTH = 1024;

  logic        clk = 1'b0;
  logic        reset, read, write;
  logic [9:0]  addr;
  logic [11:0] data_in;
  logic [22:0] err_inject;
  logic        ready, rd_valid;
  logic [23:0] code24;
  logic [11:0] data_out;
  logic        err_detected, err_corrected, err_uncorrectable;
  logic [2:0]  err_weight;

  golay_cache_top dut (
    .clk(clk), .reset(reset), .read(read), .write(write), .addr(addr), .data_in(data_in),
    .err_inject(err_inject), .ready(ready), .code24(code24), .data_out(data_out),
    .rd_valid(rd_valid), .err_detected(err_detected), .err_corrected(err_corrected),
    .err_uncorrectable(err_uncorrectable), .err_weight(err_weight));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [11:0] row_msg  [DEPTH];
  int          row_nerr [DEPTH];
  int          row_cls  [DEPTH];
  // mechanism counters: 0 clean .. 5 random triple, 6 write, 7 read,
  // 8 dropped request, 9 reset of a pending read
  int          seen [10];
  string       mech_name [10] = '{"clean read", "single error", "double adjacent",
                                  "triple adjacent", "random double", "random triple",
                                  "write", "read", "request dropped while busy",
                                  "reset during read"};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic do_write(input int a, input logic [11:0] m, input logic [22:0] e);
    @(negedge clk);
    chk(ready, "ready before write");
    write = 1'b1; read = 1'b0; addr = 10'(a); data_in = m; err_inject = e;
    #1 chk(code24 == ref_code24(m), "code24 is the extended codeword");
    @(negedge clk);
    write = 1'b0; err_inject = '0;
    seen[6]++;
  endtask

  task automatic do_read(input int a);
    @(negedge clk);
    read = 1'b1; write = 1'b0; addr = 10'(a);
    @(negedge clk);
    read = 1'b0;
    chk(!ready && !rd_valid, "busy, no result yet one cycle after read");
    @(negedge clk);
    chk(rd_valid && ready, "rd_valid two edges after read");
    chk(data_out == row_msg[a], $sformatf("row %0d data %h exp %h", a, data_out, row_msg[a]));
    chk(err_detected == (row_nerr[a] != 0), $sformatf("row %0d err_detected", a));
    chk(err_corrected == (row_nerr[a] != 0), $sformatf("row %0d err_corrected", a));
    chk(!err_uncorrectable, "no uncorrectable flag");
    chk(int'(err_weight) == row_nerr[a], $sformatf("row %0d weight %0d exp %0d", a, err_weight, row_nerr[a]));
    seen[7]++;
    if (data_out == row_msg[a]) seen[row_cls[a]]++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    reset = 1'b1; read = 1'b0; write = 1'b0; addr = '0; data_in = '0; err_inject = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    for (int a = 0; a < DEPTH; a++) begin
      logic [22:0] e;
      int          cls, b;
      cls = a % 6;
      case (cls)
        0: e = '0;
        1: e = 23'(1) << $urandom_range(22, 0);
        2: begin b = int'($urandom_range(21, 0)); e = 23'(3) << b; end
        3: begin b = int'($urandom_range(20, 0)); e = 23'(7) << b; end
        4: e = rand_mask(2, 23)[22:0];
        default: e = rand_mask(3, 23)[22:0];
      endcase
      row_msg[a]  = 12'($urandom);
      row_nerr[a] = $countones(e);
      row_cls[a]  = cls;
      do_write(a, row_msg[a], e);
    end

    for (int a = 0; a < DEPTH; a++) do_read(a);

    // A write offered in the busy cycle after a read is dropped.
    @(negedge clk);
    read = 1'b1; addr = 10'd7;
    @(negedge clk);
    read = 1'b0; write = 1'b1; addr = 10'd8; data_in = ~row_msg[8];
    @(negedge clk);
    write = 1'b0;
    chk(rd_valid && data_out == row_msg[7], "read result with dropped write");
    do_read(8);
    if (data_out == row_msg[8]) seen[8]++;

    // Reset while a read is pending: no result appears.
    @(negedge clk);
    read = 1'b1; addr = 10'd9;
    @(negedge clk);
    read = 1'b0; reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    chk(!rd_valid && ready, "reset cancels the pending read");
    if (!rd_valid && ready) seen[9]++;
    do_read(9);

    for (int i = 0; i < 10; i++) begin
      $display("mechanism %-28s : %0d", mech_name[i], seen[i]);
      chk(seen[i] > 0, $sformatf("mechanism never exercised: %s", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
