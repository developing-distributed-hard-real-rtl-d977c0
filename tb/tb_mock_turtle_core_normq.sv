// Testbench of the Mock Turtle core built without the optional Remote
// Message Queue and without hardware dividers (two CPUs, WITH_RMQ = 0,
// WITH_DIVIDER = 0). Core 0 writes a message into an RMQ outgoing slot,
// commits it, reads the RMQ status window and reports what it read in shared
// memory; core 1 executes DIV, which must trap as an illegal instruction so
// that a handler (here a stub returning 0x55) can emulate it. Both then add
// to a shared counter. The testbench
// checks that the accesses complete (no hang), that the window reads 0, that
// nothing appears on the network transmit stream, and that the rest of the
// core (upload, shared memory, HMQ interrupt quiet) works as usual.
`timescale 1ns/1ps
module tb_mock_turtle_core_normq;
  import mt_pkg::*;
  import rv_asm_pkg::*;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  wb_m2s_t host_m, sp_m;
  wb_s2m_t host_s, sp_s;
  wb_m2s_t dp_m [N];
  wb_s2m_t dp_s [N];
  logic host_irq, tx_valid, tx_last;
  logic [31:0] tx_data;
  logic [2:0] tx_slot;
  int checks = 0, failures = 0, tx_seen = 0;

  mock_turtle_core #(.N_CPUS(N), .MEM_SIZE(4096), .WITH_RMQ(1'b0), .WITH_DIVIDER(1'b0)) dut (
    .clk_i(clk), .rst_n_i(rst_n), .host_i(host_m), .host_o(host_s), .host_irq_o(host_irq),
    .dp_o(dp_m), .dp_i(dp_s), .sp_o(sp_m), .sp_i(sp_s),
    .wr_time_valid_i(1'b0), .wr_tai_sec_i('0), .wr_tai_cycles_i('0),
    .rmq_tx_valid_o(tx_valid), .rmq_tx_ready_i(1'b1), .rmq_tx_data_o(tx_data),
    .rmq_tx_last_o(tx_last), .rmq_tx_slot_o(tx_slot),
    .rmq_rx_valid_i(1'b0), .rmq_rx_data_i('0), .rmq_rx_last_i(1'b0),
    .rmq_rx_error_i(1'b0), .rmq_rx_slot_i('0));
  tb_wb_master host (.clk_i(clk), .m_o(host_m), .s_i(host_s));
  tb_wb_slave_mem sp (.clk_i(clk), .rand_wait_i(1'b0), .m_i(sp_m), .s_o(sp_s));
  for (genvar c = 0; c < N; c++) begin : g_dp
    tb_wb_slave_mem dp (.clk_i(clk), .rand_wait_i(1'b0), .m_i(dp_m[c]), .s_o(dp_s[c]));
  end
  always @(posedge clk) if (tx_valid) tx_seen++;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  logic [31:0] code [$];
  initial begin
    logic [31:0] q;
    int t;
    code = '{LUI(1, 32'h80000), LW(2, 1, 0), LUI(4, 32'hA0000), LUI(6, 32'hA0200), LUI(21, 32'hA0010),
             ADDI(8, 0, 1), BEQ(2, 8, 44),                        // core 1 goes to its division test
             ADDI(9, 0, 32'h77), SW(9, 6, 32'h200),               // RMQ out slot 0, word 0
             LUI(9, 32'h40000), ADDI(9, 9, 1), SW(9, 6, 4),       // commit, 1 word
             LW(10, 6, 0), SW(10, 4, 4),                          // w1 = RMQ status
             ADDI(9, 0, 1), SW(9, 21, 0),                         // 14: w0 += 1
             JAL(0, 0),
             ADDI(9, 0, 24 * 4), CSRRW(0, 12'h305, 9),            // 17: mtvec = handler
             ADDI(11, 0, 100), ADDI(12, 0, 7), DIV(13, 11, 12),   // traps: no divider
             SW(13, 4, 8),                                        // w2 = value from the handler
             JAL(0, (14 - 23) * 4),
             CSRRS(15, 12'h342, 0), SW(15, 4, 12),                // 24: handler, w3 = mcause
             CSRRS(16, 12'h341, 0), ADDI(16, 16, 4), CSRRW(0, 12'h341, 16),
             ADDI(13, 0, 32'h55), MRET()};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int w = 0; w < 4; w++) host.write(HOST_SMEM_BASE + 32'(4 * w), 32'hFFFF_FFFF);
    host.write(HOST_SMEM_BASE, 0);
    for (int c = 0; c < N; c++) begin
      host.write(32'h10, c); host.write(32'h14, 0);
      foreach (code[i]) host.write(32'h18, code[i]);
    end
    host.write(32'h8, 0);
    t = 0;
    do begin host.read(HOST_SMEM_BASE, q); t++; end while (q != N && t < 500);
    chk(q, N, "both cores done");
    host.read(HOST_SMEM_BASE + 4, q); chk(q, 0, "RMQ window reads 0");
    host.read(HOST_SMEM_BASE + 8, q); chk(q, 32'h55, "division emulated by the trap handler");
    host.read(HOST_SMEM_BASE + 12, q); chk(q, 2, "division raised illegal instruction");
    repeat (50) @(posedge clk);
    chk(tx_seen, 0, "nothing transmitted");
    chk(32'(host_irq), 0, "no host interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
