// Testbench of the host port decoder: accesses at the control, HMQ and
// shared-memory ranges reach the right target (three slave memory models),
// shared-memory addresses are moved to the Shared Interconnect's map with the
// operation bits kept, and an unmapped address is answered.
`timescale 1ns/1ps
module tb_mt_host_if;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wb_m2s_t hm, cm, qm, sm; wb_s2m_t hs, cs, qs, ss;
  int checks = 0, failures = 0;
  logic [31:0] si_adr_seen;
  mt_host_if dut (.clk_i(clk), .rst_n_i(rst_n), .host_i(hm), .host_o(hs), .ctrl_o(cm), .ctrl_i(cs),
    .hmq_o(qm), .hmq_i(qs), .si_o(sm), .si_i(ss));
  tb_wb_master u (.clk_i(clk), .m_o(hm), .s_i(hs));
  tb_wb_slave_mem c (.clk_i(clk), .rand_wait_i(1'b1), .m_i(cm), .s_o(cs));
  tb_wb_slave_mem q (.clk_i(clk), .rand_wait_i(1'b1), .m_i(qm), .s_o(qs));
  tb_wb_slave_mem s (.clk_i(clk), .rand_wait_i(1'b1), .m_i(sm), .s_o(ss));
  always @(posedge clk) if (sm.stb) si_adr_seen <= sm.adr;
  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk); rst_n = 1;
    u.write(32'h0000_0010, 32'h11);
    u.write(32'h0001_0010, 32'h22);
    u.write(32'h0012_0010, 32'h33);
    chk(c.mem[4], 32'h11, "ctrl write"); chk(q.mem[4], 32'h22, "hmq write"); chk(s.mem[4], 32'h33, "smem write");
    chk(si_adr_seen, 32'hA002_0010, "smem address with op bits");
    chk(32'(c.served + q.served + s.served), 3, "one target each");
    u.read(32'h0000_0010, d); chk(d, 32'h11, "ctrl read");
    u.read(32'h0001_0014, d); chk(d, 32'hA500_0005, "hmq read");
    u.read(32'h0010_0018, d); chk(d, 32'hA500_0006, "smem read");
    u.read(32'h0400_0000, d); chk(d, 0, "unmapped read");
    chk(32'(u.last_cycles < 5), 1, "unmapped answered");
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
