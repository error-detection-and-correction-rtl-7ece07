// tb_data_register: random encoder loads, array loads (with priority over
// encoder loads), holds and resets of the 23-bit data register, compared
// with a testbench copy after every rising edge.
module tb_data_register;
  logic        clk = 1'b0;
  logic        reset, load_enc, load_mem;
  logic [22:0] enc_in, mem_in, q, model;
  int checks = 0, failures = 0;

  data_register dut (.clk(clk), .reset(reset), .load_enc(load_enc), .load_mem(load_mem),
                     .enc_in(enc_in), .mem_in(mem_in), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load_enc = 1'b0; load_mem = 1'b0; enc_in = '0; mem_in = '0; model = '0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      if (reset) model = '0;
      else if (load_mem) model = mem_in;
      else if (load_enc) model = enc_in;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d got %h exp %h", i, q, model);
      end
      reset    = ($urandom_range(19, 0) == 0);
      load_enc = $urandom_range(1, 0) == 1;
      load_mem = $urandom_range(1, 0) == 1;
      enc_in   = 23'($urandom);
      mem_in   = 23'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
