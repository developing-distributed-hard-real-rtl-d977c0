// Testbench of a CPU Core Block. A short program is uploaded into the private
// memory through the upload port while the CPU is held in reset, then the CPU
// is released. The program reads its core number from the local registers,
// writes it to the Dedicated Peripheral port, writes and reads the Shared
// Interconnect port, prints two debug characters, waits on the self-
// decrementing delay register, leaves a marker in private memory and then
// counts forever on the Dedicated Peripheral port. The testbench checks the
// slave models' contents, the debug characters, reads the marker back
// through the upload port while the CPU runs, and checks that pausing the
// core stops its counting and resuming restarts it.
`timescale 1ns/1ps
module tb_mt_cpu_cb;
  import mt_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic core_rst, core_pause, up_req, up_we, up_ack, dbg_valid;
  logic [31:0] up_addr, up_wdata, up_rdata;
  logic [7:0] dbg_char;
  wb_m2s_t dp_m, si_m; wb_s2m_t dp_s, si_s;
  int checks = 0, failures = 0;
  string dbg_text = "";
  logic [31:0] code [$];

  mt_cpu_cb #(.CORE_ID(5), .N_CPUS(8), .MEM_SIZE(4096)) dut (
    .clk_i(clk), .rst_n_i(rst_n), .core_rst_i(core_rst), .core_pause_i(core_pause),
    .up_req_i(up_req), .up_we_i(up_we), .up_addr_i(up_addr), .up_wdata_i(up_wdata),
    .up_ack_o(up_ack), .up_rdata_o(up_rdata),
    .dp_o(dp_m), .dp_i(dp_s), .si_o(si_m), .si_i(si_s),
    .wr_time_valid_i(1'b0), .wr_tai_sec_i('0), .wr_tai_cycles_i('0),
    .hmq_in_i('0), .rmq_in_i('0), .hmq_out_full_i('0), .rmq_out_full_i('0),
    .dbg_valid_o(dbg_valid), .dbg_char_o(dbg_char));
  tb_wb_slave_mem dp (.clk_i(clk), .rand_wait_i(1'b1), .m_i(dp_m), .s_o(dp_s));
  tb_wb_slave_mem si (.clk_i(clk), .rand_wait_i(1'b1), .m_i(si_m), .s_o(si_s));
  always @(posedge clk) if (dbg_valid) dbg_text = {dbg_text, string'(dbg_char)};

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  task automatic up(input bit we, input logic [31:0] a, d, output logic [31:0] q);
    @(posedge clk); #1 up_req = 1; up_we = we; up_addr = a; up_wdata = d;
    do @(posedge clk); while (!up_ack);
    q = up_rdata;
    #1 up_req = 0;
  endtask

  initial begin
    logic [31:0] q, c0, c1;
    core_rst = 1; core_pause = 0; up_req = 0; up_we = 0; up_addr = 0; up_wdata = 0;
    code = '{LUI(1, 32'h80000), LW(2, 1, 0), LUI(3, 32'h90000), SW(2, 3, 32'h10),
             LUI(4, 32'hA0000), ADDI(5, 0, 32'h55), SW(5, 4, 8), LW(6, 4, 32'hC), SW(6, 3, 32'h14),
             ADDI(7, 0, 32'h48), SW(7, 1, 32'h24), ADDI(7, 0, 32'h69), SW(7, 1, 32'h24),
             ADDI(8, 0, 50), SW(8, 1, 32'h10),
             LW(9, 1, 32'h10), BNE(9, 0, -4),
             LUI(11, 32'h12345), SW(11, 0, 32'h400),
             ADDI(12, 12, 1), SW(12, 3, 32'h18), JAL(0, -8)};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < code.size(); i++) up(1'b1, 32'(4 * i), code[i], q);
    up(1'b0, 32'h8, 0, q); chk(q, code[2], "upload read back");
    up(1'b1, 32'h400, 0, q);
    @(posedge clk); #1 core_rst = 0;
    repeat (600) @(posedge clk);
    chk(dp.mem[4], 5, "core id on DP");
    chk(si.mem[2], 32'h55, "SI write");
    chk(dp.mem[5], 32'hA500_0003, "SI read");
    checks++; if (dbg_text != "Hi") begin failures++; $display("FAIL debug text '%s'", dbg_text); end
    up(1'b0, 32'h400, 0, q); chk(q, 32'h1234_5000, "marker dumped while running");
    chk(32'(dp.mem[6] > 10), 1, "counting");
    @(posedge clk); #1 core_pause = 1;
    repeat (30) @(posedge clk);
    c0 = dp.mem[6];
    repeat (100) @(posedge clk);
    c1 = dp.mem[6];
    chk(c1, c0, "paused core stands still");
    @(posedge clk); #1 core_pause = 0;
    repeat (100) @(posedge clk);
    chk(32'(dp.mem[6] > c1), 1, "resumed");
    @(posedge clk); #1 core_rst = 1;
    repeat (5) @(posedge clk);
    c0 = dp.mem[6];
    repeat (50) @(posedge clk);
    chk(dp.mem[6], c0, "reset core stands still");
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
