// tb_address_register: random loads, holds and resets of the 10-bit address
// register, compared with a testbench copy after every rising edge.
module tb_address_register;
  logic       clk = 1'b0;
  logic       reset, load;
  logic [9:0] addr_in, addr_q, model;
  int checks = 0, failures = 0;

  address_register dut (.clk(clk), .reset(reset), .load(load), .addr_in(addr_in), .addr_q(addr_q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load = 1'b0; addr_in = '0; model = '0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      if (reset) model = '0; else if (load) model = addr_in;
      #1;
      checks++;
      if (addr_q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d got %h exp %h", i, addr_q, model);
      end
      reset   = ($urandom_range(19, 0) == 0);
      load    = $urandom_range(1, 0) == 1;
      addr_in = 10'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
