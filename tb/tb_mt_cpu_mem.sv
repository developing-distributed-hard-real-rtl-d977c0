// Testbench of the private CPU memory: byte-masked writes on the data port,
// reads on both ports with one cycle of latency, against a reference array.
`timescale 1ns/1ps
module tb_mt_cpu_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [3:0] sel; logic [31:0] aa, ba, wd, ard, brd;
  int checks = 0, failures = 0;
  logic [31:0] model [256];
  mt_cpu_mem #(.SIZE_BYTES(1024)) dut (.clk_i(clk), .a_addr_i(aa), .a_rdata_o(ard), .b_we_i(we),
    .b_sel_i(sel), .b_addr_i(ba), .b_wdata_i(wd), .b_rdata_o(brd));
  initial begin
    we = 1; sel = 4'hF;
    for (int i = 0; i < 256; i++) begin ba = i * 4; wd = $urandom; model[i] = wd; @(posedge clk); #1; end
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] ea, eb;
      we = $urandom_range(0, 1); sel = 4'($urandom); ba = 4 * $urandom_range(0, 255);
      aa = 4 * $urandom_range(0, 255); wd = $urandom;
      ea = model[aa[9:2]]; eb = model[ba[9:2]];
      @(posedge clk); #1;
      if (we) for (int i = 0; i < 4; i++) if (sel[i]) model[ba[9:2]][8*i +: 8] = wd[8*i +: 8];
      checks += 2;
      if (ard !== ea) begin failures++; if (failures < 10) $display("FAIL A %h exp %h", ard, ea); end
      if (brd !== eb) begin failures++; if (failures < 10) $display("FAIL B %h exp %h", brd, eb); end
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
