// Testbench of the Host Message Queue through its two Wishbone sides: the
// CPU side writes a message into an outgoing slot and marks it ready; the
// host sees the interrupt and the status, reads the words and discards it.
// The host sends messages into an incoming slot; the CPU sees them pending and
// reads them. A slot filled beyond its depth drops the message.
`timescale 1ns/1ps
module tb_mt_hmq;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wb_m2s_t cm, hm; wb_s2m_t cs, hs;
  logic [1:0] in_pending, out_full;
  logic irq_out, irq_in;
  int checks = 0, failures = 0;
  localparam int W = 4;   // words per message, log2
  mt_hmq #(.N_OUT(2), .N_IN(2), .ENTRIES_LOG2(2), .WORDS_LOG2(W)) dut (.clk_i(clk), .rst_n_i(rst_n),
    .cpu_wb_i(cm), .cpu_wb_o(cs), .host_wb_i(hm), .host_wb_o(hs), .in_pending_o(in_pending),
    .out_full_o(out_full), .irq_out_o(irq_out), .irq_in_o(irq_in));
  tb_wb_master cpu  (.clk_i(clk), .m_o(cm), .s_i(cs));
  tb_wb_master host (.clk_i(clk), .m_o(hm), .s_i(hs));

  function automatic logic [31:0] a(input bit in_dir, input int slot, input bit data, input int word);
    return 32'({in_dir, 3'(slot), data, 4'(word), 2'b00});
  endfunction
  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] q;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk);
    chk(32'(irq_out), 0, "no irq"); chk(32'(irq_in), 1, "in empty irq");
    // CPU -> host on outgoing slot 1
    for (int i = 0; i < 6; i++) cpu.write(a(0, 1, 1, i), 32'h100 + i);
    chk(32'(irq_out), 0, "not ready yet");
    cpu.write(a(0, 1, 0, 1), {MQ_CMD_READY, 14'h0, 16'd6});
    @(posedge clk); chk(32'(irq_out), 1, "irq on message");
    host.read(a(0, 1, 0, 0), q); chk(q, {1'b0, 1'b0, 6'h0, 8'd1, 16'd6}, "host status");
    for (int i = 0; i < 6; i++) begin host.read(a(0, 1, 1, i), q); chk(q, 32'h100 + i, "host word"); end
    host.write(a(0, 1, 0, 1), {MQ_CMD_DISCARD, 30'h0});
    @(posedge clk); chk(32'(irq_out), 0, "irq cleared");
    // host -> CPU on incoming slot 0, two messages
    for (int m = 0; m < 2; m++) begin
      for (int i = 0; i < 3; i++) host.write(a(1, 0, 1, i), 32'h200 + 16 * m + i);
      host.write(a(1, 0, 0, 1), {MQ_CMD_READY, 14'h0, 16'd3});
    end
    chk(32'(in_pending), 1, "pending");
    for (int m = 0; m < 2; m++) begin
      cpu.read(a(1, 0, 0, 0), q); chk(q[23:16], 2 - m, "cpu count");
      for (int i = 0; i < 3; i++) begin cpu.read(a(1, 0, 1, i), q); chk(q, 32'h200 + 16 * m + i, "cpu word"); end
      cpu.write(a(1, 0, 0, 1), {MQ_CMD_DISCARD, 30'h0});
    end
    chk(32'(in_pending), 0, "drained");
    // overflow: 5 messages into a 4-deep outgoing slot
    for (int m = 0; m < 5; m++) begin
      cpu.write(a(0, 0, 1, 0), 32'h300 + m);
      cpu.write(a(0, 0, 0, 1), {MQ_CMD_READY, 14'h0, 16'd1});
    end
    chk(32'(out_full), 1, "full");
    host.read(a(0, 0, 0, 2), q); chk(q, 1, "dropped count");
    for (int m = 0; m < 4; m++) begin
      host.read(a(0, 0, 1, 0), q); chk(q, 32'h300 + m, "order kept");
      host.write(a(0, 0, 0, 1), {MQ_CMD_DISCARD, 30'h0});
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
