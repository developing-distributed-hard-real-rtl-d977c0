// Testbench of the uRV two-stage barrel shifter: random operands, amounts and
// kinds; the result is checked in the cycle after the operands are captured.
`timescale 1ns/1ps
module tb_urv_shifter;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, left, arith;
  logic [31:0] d, q;
  logic [4:0] sh;
  int checks = 0, failures = 0;
  urv_shifter dut (.clk_i(clk), .en_i(en), .d_i(d), .shamt_i(sh), .left_i(left), .arith_i(arith), .q_o(q));
  initial begin
    logic [31:0] exp;
    for (int n = 0; n < 3000; n++) begin
      en = 1; d = $urandom; sh = 5'($urandom); left = $urandom_range(0, 2) == 0; arith = $urandom_range(0, 1);
      if (n < 96) begin sh = 5'(n % 32); d = (n < 64) ? 32'h8000_0001 : 32'h7FFF_FFFE; left = (n / 32) == 1; end
      exp = left ? d << sh : (arith ? 32'($signed(d) >>> sh) : d >> sh);
      @(posedge clk); #1;
      en = 0; d = $urandom; sh = 5'($urandom);   // operands change: the result must hold
      #1;
      checks++;
      if (q !== exp) begin failures++; if (failures < 10) $display("FAIL %h sh %0d l%0d a%0d: %h exp %h", d, sh, left, arith, q, exp); end
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
