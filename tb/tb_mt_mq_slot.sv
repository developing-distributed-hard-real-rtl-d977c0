// Testbench of one message-queue slot: messages become visible only when
// committed, are read in order with their sizes, are released by discard; a
// message committed into a full slot is dropped and counted; words written
// while full do not disturb stored messages.
`timescale 1ns/1ps
module tb_mt_mq_slot;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, commit, discard, empty, full;
  logic [3:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [15:0] size, head_size, dropped;
  logic [2:0] count;
  int checks = 0, failures = 0;
  mt_mq_slot #(.ENTRIES_LOG2(2), .WORDS_LOG2(4)) dut (.clk_i(clk), .rst_n_i(rst_n),
    .w_we_i(we), .w_addr_i(waddr), .w_data_i(wdata), .w_commit_i(commit), .w_size_i(size),
    .r_addr_i(raddr), .r_data_o(rdata), .r_discard_i(discard), .empty_o(empty), .full_o(full),
    .count_o(count), .head_size_o(head_size), .dropped_o(dropped));

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  task automatic send(input int id, input int n, input bit do_commit);
    for (int i = 0; i < n; i++) begin
      we = 1; waddr = 4'(i); wdata = 32'(id * 256 + i); @(posedge clk); #1;
    end
    we = 0;
    if (do_commit) begin commit = 1; size = 16'(n); @(posedge clk); #1 commit = 0; end
  endtask
  task automatic receive(input int id, input int n);
    chk(32'(empty), 0, "not empty"); chk(32'(head_size), n, "size");
    for (int i = 0; i < n; i++) begin
      raddr = 4'(i); @(posedge clk); #1 chk(rdata, 32'(id * 256 + i), "word");
    end
    discard = 1; @(posedge clk); #1 discard = 0;
  endtask

  initial begin
    we = 0; commit = 0; discard = 0; waddr = 0; raddr = 0; wdata = 0; size = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(32'(empty), 1, "empty after reset");
    send(1, 5, 1'b0);                 // never committed: must not appear
    chk(32'(empty), 1, "uncommitted invisible");
    send(2, 3, 1'b1);
    send(3, 16, 1'b1);
    chk(32'(count), 2, "count");
    receive(2, 3);
    receive(3, 16);
    chk(32'(empty), 1, "empty again");
    for (int k = 0; k < 4; k++) send(10 + k, 4, 1'b1);
    chk(32'(full), 1, "full");
    send(20, 4, 1'b1);                // dropped
    chk(32'(dropped), 1, "dropped");
    for (int k = 0; k < 4; k++) receive(10 + k, 4);
    chk(32'(empty), 1, "drained");
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
