// Testbench of the uRV register file: random writes and reads against a
// reference array, including reads of the register written at the same edge
// (read-after-write bypass) and of x0, and the one-cycle read latency.
`timescale 1ns/1ps
module tb_urv_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  int checks = 0, failures = 0, bypass_hits = 0;
  logic [31:0] ref_rf [32];

  urv_regfile dut (.clk_i(clk), .raddr1_i(ra1), .raddr2_i(ra2), .rdata1_o(rd1), .rdata2_o(rd2),
                   .we_i(we), .waddr_i(wa), .wdata_i(wd));

  initial begin
    logic [31:0] e1, e2;
    we = 1; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 32; i++) begin
      wa = 5'(i); wd = $urandom; ref_rf[i] = (i == 0) ? 0 : wd;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 2000; n++) begin
      we  = $urandom_range(0, 1);
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = ($urandom_range(0, 3) == 0) ? wa : 5'($urandom);
      ra2 = ($urandom_range(0, 3) == 0) ? wa : 5'($urandom);
      if (we && (ra1 == wa || ra2 == wa) && wa != 0) bypass_hits++;
      @(posedge clk);
      if (we && wa != 0) ref_rf[wa] = wd;
      e1 = ref_rf[ra1]; e2 = ref_rf[ra2];
      #1;
      checks += 2;
      if (rd1 !== e1) begin failures++; if (failures < 10) $display("FAIL rd1 x%0d %h exp %h", ra1, rd1, e1); end
      if (rd2 !== e2) begin failures++; if (failures < 10) $display("FAIL rd2 x%0d %h exp %h", ra2, rd2, e2); end
    end
    checks++;
    if (bypass_hits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
