// Testbench of a Core Block's local registers: identity, local time counter
// (seconds roll over after CYCLES_PER_SEC cycles), White Rabbit time when
// valid, the self-decrementing delay register, queue status bits and the
// debug character strobe.
`timescale 1ns/1ps
module tb_mt_local_regs;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wb_m2s_t m; wb_s2m_t s;
  logic wr_valid, dbg_valid;
  logic [7:0] dbg_char;
  int checks = 0, failures = 0, dbg_count = 0;
  logic [7:0] last_char;
  mt_local_regs #(.CORE_ID(3), .N_CPUS(5), .CYCLES_PER_SEC(100)) dut (.clk_i(clk), .rst_n_i(rst_n),
    .wb_i(m), .wb_o(s), .wr_time_valid_i(wr_valid), .wr_tai_sec_i(32'd777), .wr_tai_cycles_i(28'd4242),
    .hmq_in_i(8'h05), .rmq_in_i(8'h02), .hmq_out_full_i(8'h01), .rmq_out_full_i(8'h03),
    .dbg_valid_o(dbg_valid), .dbg_char_o(dbg_char));
  tb_wb_master u (.clk_i(clk), .m_o(m), .s_i(s));
  always @(posedge clk) if (dbg_valid) begin dbg_count++; last_char = dbg_char; end
  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  initial begin
    logic [31:0] q, q2, s0;
    wr_valid = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    u.read(32'h0, q); chk(q, 3, "id");
    u.read(32'h4, q); chk(q, 5, "count");
    u.read(32'h8, s0);
    repeat (250) @(posedge clk);
    u.read(32'h8, q); chk(q - s0, 2, "seconds advance");     // 250+ cycles at 100 per second
    u.read(32'hC, q); chk(32'(q < 100), 1, "cycles in range");
    wr_valid = 1;
    u.read(32'h8, q); chk(q, 777, "wr sec");
    u.read(32'hC, q); chk(q, 4242, "wr cycles");
    u.write(32'h10, 32'd100);
    u.read(32'h10, q);
    repeat (20) @(posedge clk);
    u.read(32'h10, q2); chk(q - q2, 20 + u.last_cycles + 1, "delay decrements each cycle");
    repeat (100) @(posedge clk);
    u.read(32'h10, q); chk(q, 0, "delay stops at 0");
    u.read(32'h14, q); chk(q, 5, "hmq in"); u.read(32'h18, q); chk(q, 2, "rmq in");
    u.read(32'h1C, q); chk(q, 1, "hmq full"); u.read(32'h20, q); chk(q, 3, "rmq full");
    u.write(32'h24, 32'h41); u.write(32'h24, 32'h42); @(posedge clk); #1;
    chk(dbg_count, 2, "debug strobes"); chk(last_char, 8'h42, "debug char");
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
