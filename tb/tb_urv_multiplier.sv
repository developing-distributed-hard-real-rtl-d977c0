// Testbench of the uRV two-stage multiplier: the low word of random products,
// available in the cycle after the operands are captured.
`timescale 1ns/1ps
module tb_urv_multiplier;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [31:0] a, b, q;
  int checks = 0, failures = 0;
  urv_multiplier dut (.clk_i(clk), .en_i(en), .a_i(a), .b_i(b), .q_o(q));
  initial begin
    logic [31:0] exp;
    for (int n = 0; n < 3000; n++) begin
      en = 1; a = $urandom; b = $urandom;
      if (n == 0) begin a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; end
      if (n == 1) begin a = 32'h8000_0000; b = 32'h2; end
      exp = 32'(64'(a) * 64'(b));
      @(posedge clk); #1;
      en = 0; a = $urandom; #1;
      checks++;
      if (q !== exp) begin failures++; if (failures < 10) $display("FAIL %h", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
