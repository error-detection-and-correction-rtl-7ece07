// tb_cache_sram: writes random words to random rows of the 1K x 23 array
// and reads them back against a testbench copy. It checks that the array
// acts only on the falling edge (rdata unchanged after a rising edge), that
// a read with write high returns nothing new, and that reset clears rdata.
module tb_cache_sram;
  logic        clk = 1'b0;
  logic        reset, read, write;
  logic [9:0]  addr;
  logic [22:0] wdata, rdata;
  logic [22:0] model [1024];
  bit          written [1024];
  int checks = 0, failures = 0;

  cache_sram dut (.clk(clk), .reset(reset), .read(read), .write(write),
                  .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [22:0] prev_rdata;
    reset = 1'b1; read = 1'b0; write = 1'b0; addr = '0; wdata = '0;
    @(posedge clk); @(posedge clk);
    #1 chk(rdata == '0, "reset clears rdata");
    reset = 1'b0;
    for (int i = 0; i < 1024; i++) written[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      #1;
      addr = 10'($urandom);
      if ($urandom_range(1, 0) == 1 || !written[addr]) begin
        write = 1'b1; read = 1'b0; wdata = 23'($urandom);
        model[addr] = wdata; written[addr] = 1;
        @(negedge clk); #1 write = 1'b0;
      end else begin
        write = 1'b0; read = 1'b1;
        @(negedge clk); #1;
        chk(rdata == model[addr], $sformatf("read row %0d", addr));
        // change the address with read still high: nothing may happen on
        // the rising edge
        prev_rdata = rdata;
        addr = addr + 10'd1;
        @(posedge clk); #1;
        chk(rdata == prev_rdata, "no change on rising edge");
        read = 1'b0;
      end
    end
    // read together with write: write wins, rdata keeps its value
    @(posedge clk); #1;
    prev_rdata = rdata;
    addr = 10'd5; wdata = 23'h155555; write = 1'b1; read = 1'b1;
    @(negedge clk); #1;
    chk(rdata == prev_rdata, "write has priority over read");
    write = 1'b0; read = 1'b1;
    @(negedge clk); #1;
    chk(rdata == 23'h155555, "written word read back");
    read = 1'b0; reset = 1'b1;
    @(negedge clk); #1;
    chk(rdata == '0, "reset clears rdata on falling edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
