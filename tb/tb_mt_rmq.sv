// Testbench of the Remote Message Queue: a message committed by the CPU in an
// outgoing slot is sent on the transmit stream without further action (with a
// stalling receiver); a received message is readable by the CPU; a received
// message that ends with an error is never delivered.
`timescale 1ns/1ps
module tb_mt_rmq;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wb_m2s_t cm; wb_s2m_t cs;
  logic tx_valid, tx_ready, tx_last, rx_valid, rx_last, rx_error;
  logic [31:0] tx_data, rx_data;
  logic [2:0] tx_slot, rx_slot;
  logic [1:0] in_pending, out_full;
  int checks = 0, failures = 0;
  logic [31:0] got [$];
  int got_slot = -1;
  mt_rmq #(.N_OUT(2), .N_IN(2), .ENTRIES_LOG2(2), .WORDS_LOG2(4)) dut (.clk_i(clk), .rst_n_i(rst_n),
    .cpu_wb_i(cm), .cpu_wb_o(cs), .tx_valid_o(tx_valid), .tx_ready_i(tx_ready), .tx_data_o(tx_data),
    .tx_last_o(tx_last), .tx_slot_o(tx_slot), .rx_valid_i(rx_valid), .rx_data_i(rx_data),
    .rx_last_i(rx_last), .rx_error_i(rx_error), .rx_slot_i(rx_slot),
    .in_pending_o(in_pending), .out_full_o(out_full));
  tb_wb_master cpu (.clk_i(clk), .m_o(cm), .s_i(cs));

  function automatic logic [31:0] a(input bit in_dir, input int slot, input bit data, input int word);
    return 32'({in_dir, 3'(slot), data, 4'(word), 2'b00});
  endfunction
  task automatic chk(input logic [31:0] got_v, exp, input string what);
    checks++;
    if (got_v !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got_v, exp); end
  endtask

  always @(posedge clk) begin
    tx_ready <= $urandom_range(0, 1);
    if (tx_valid && tx_ready) begin got.push_back(tx_data); got_slot = tx_slot; end
  end

  task automatic rx_msg(input int slot, input int n, input bit err);
    for (int i = 0; i < n; i++) begin
      rx_valid = 1; rx_slot = 3'(slot); rx_data = 32'h500 + i; rx_last = (i == n - 1) && !err;
      rx_error = 0; @(posedge clk); #1;
    end
    rx_valid = 0; rx_last = 0;
    if (err) begin rx_error = 1; @(posedge clk); #1 rx_error = 0; end
  endtask

  initial begin
    logic [31:0] q;
    rx_valid = 0; rx_last = 0; rx_error = 0; rx_slot = 0; rx_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5; i++) cpu.write(a(0, 1, 1, i), 32'h400 + i);
    cpu.write(a(0, 1, 0, 1), {MQ_CMD_READY, 14'h0, 16'd5});
    repeat (40) @(posedge clk);
    chk(got.size(), 5, "words sent"); chk(got_slot, 1, "tx slot");
    for (int i = 0; i < got.size(); i++) chk(got[i], 32'h400 + i, "tx word");
    cpu.read(a(0, 1, 0, 0), q); chk(q[30], 1, "sent slot empty");
    rx_msg(1, 4, 1'b1);             // broken transfer
    @(posedge clk); #1 chk(32'(in_pending), 0, "error message not received");
    rx_msg(1, 7, 1'b0);
    @(posedge clk); chk(32'(in_pending), 2, "received");
    cpu.read(a(1, 1, 0, 0), q); chk(q[15:0], 7, "size");
    for (int i = 0; i < 7; i++) begin cpu.read(a(1, 1, 1, i), q); chk(q, 32'h500 + i, "rx word"); end
    cpu.write(a(1, 1, 0, 1), {MQ_CMD_DISCARD, 30'h0});
    @(posedge clk); chk(32'(in_pending), 0, "discarded");
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
