// End-to-end testbench of the Mock Turtle core at its default size (eight
// CPUs, 64 KB private memory each). The testbench plays the host, the
// application-specific cores (one Wishbone slave model per Dedicated
// Peripheral port and one on the Shared Peripheral port), the network
// transport of the Remote Message Queue and the White Rabbit time source.
// Sequence: the host clears and initialises part of the shared memory,
// uploads one program into every core's private memory through the control
// registers, dumps part of it back and releases the cores from reset. All
// cores run the same program; it reads the core number and then
//   - prints a character on the debug console,
//   - uses every shared-memory atomic operation (add, subtract, set, clear,
//     flip) on common words, and a test-and-set spin lock around a
//     non-atomic read-increment-write of a common counter,
//   - divides and multiplies and stores the results in shared memory,
//   - writes and reads its Dedicated Peripheral and writes the Shared
//     Peripheral,
//   - core 0 answers a host message (HMQ in -> sum -> HMQ out),
//   - core 1 sends six messages to a four-entry HMQ slot (two are dropped),
//   - core 2 sends a message to the network (RMQ out),
//   - core 3 receives a network message (RMQ in) after a broken transfer
//     that must never be seen,
//   - core 5 reads the White Rabbit seconds,
//   - all cores print '!', count done with an atomic add, then count forever
//     on their Dedicated Peripheral.
// The host then checks every result, reads the messages (host interrupt),
// the drop counter and the debug consoles, pauses core 7 and checks it
// stands still while core 6 runs, then resumes it.
// Mechanism counters (each must be non-zero): contention on the Shared
// Interconnect, CPU load/mul/shift interlock cycles, X1 and X2 bypasses,
// data-bus wait cycles, taken jumps, divider
// busy cycles, dropped HMQ messages, host interrupts, transmit back-pressure,
// received broken transfers, program words uploaded.
`timescale 1ns/1ps
module tb_mock_turtle_core;
  import mt_pkg::*;
  import rv_asm_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  wb_m2s_t host_m, sp_m;
  wb_s2m_t host_s, sp_s;
  wb_m2s_t dp_m [N];
  wb_s2m_t dp_s [N];
  logic [31:0] dp_w0 [N], dp_w2 [N];   // copies of words 0 and 2 of each DP model
  logic host_irq;
  logic wr_valid;
  logic [27:0] wr_cycles;
  logic tx_valid, tx_ready, tx_last, rx_valid, rx_last, rx_error;
  logic [31:0] tx_data, rx_data;
  logic [2:0] tx_slot, rx_slot;

  mock_turtle_core dut (
    .clk_i(clk), .rst_n_i(rst_n), .host_i(host_m), .host_o(host_s), .host_irq_o(host_irq),
    .dp_o(dp_m), .dp_i(dp_s), .sp_o(sp_m), .sp_i(sp_s),
    .wr_time_valid_i(wr_valid), .wr_tai_sec_i(32'h1234), .wr_tai_cycles_i(wr_cycles),
    .rmq_tx_valid_o(tx_valid), .rmq_tx_ready_i(tx_ready), .rmq_tx_data_o(tx_data),
    .rmq_tx_last_o(tx_last), .rmq_tx_slot_o(tx_slot),
    .rmq_rx_valid_i(rx_valid), .rmq_rx_data_i(rx_data), .rmq_rx_last_i(rx_last),
    .rmq_rx_error_i(rx_error), .rmq_rx_slot_i(rx_slot));

  tb_wb_master host (.clk_i(clk), .m_o(host_m), .s_i(host_s));
  tb_wb_slave_mem sp (.clk_i(clk), .rand_wait_i(1'b1), .m_i(sp_m), .s_o(sp_s));
  for (genvar c = 0; c < N; c++) begin : g_dp
    tb_wb_slave_mem dp (.clk_i(clk), .rand_wait_i(1'b1), .m_i(dp_m[c]), .s_o(dp_s[c]));
    always @(posedge clk) begin dp_w0[c] <= dp.mem[0]; dp_w2[c] <= dp.mem[2]; end
  end

  int checks = 0, failures = 0;
  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_si_contention = 0, n_interlock = 0, n_taken = 0, n_div_busy = 0;
  int n_host_irq = 0, n_tx_backpressure = 0, n_rx_broken = 0, n_upload = 0, n_dropped = 0;
  int n_paused_cycles = 0, n_x1_bypass = 0, n_x2_bypass = 0, n_mem_wait = 0;
  logic irq_q = 0;
  always @(posedge clk) begin
    automatic int req = 0;
    for (int m = 0; m <= N; m++) if (dut.si_m_i[m].cyc && dut.si_m_i[m].stb) req++;
    if (req > 1) n_si_contention++;
    if (host_irq && !irq_q) n_host_irq++;
    irq_q = host_irq;
    if (tx_valid && !tx_ready) n_tx_backpressure++;
  end
  for (genvar c = 0; c < N; c++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_cb[c].u_cb.u_cpu.d_valid && dut.g_cb[c].u_cb.u_cpu.interlock) n_interlock++;
      if (dut.g_cb[c].u_cb.u_cpu.redirect) n_taken++;
      if (dut.g_cb[c].u_cb.u_cpu.div_wait) n_div_busy++;
      if (dut.g_cb[c].u_cb.u_cpu.d_fire &&
          (dut.g_cb[c].u_cb.u_cpu.d_fwd1 || dut.g_cb[c].u_cb.u_cpu.d_fwd2)) n_x1_bypass++;
      if (dut.g_cb[c].u_cb.u_cpu.d_fire && dut.g_cb[c].u_cb.u_cpu.x2_byp_ok &&
          ((dut.g_cb[c].u_cb.u_cpu.d_use1 && dut.g_cb[c].u_cb.u_cpu.x2_rd == dut.g_cb[c].u_cb.u_cpu.d_rs1) ||
           (dut.g_cb[c].u_cb.u_cpu.d_use2 && dut.g_cb[c].u_cb.u_cpu.x2_rd == dut.g_cb[c].u_cb.u_cpu.d_rs2)))
        n_x2_bypass++;
      if (dut.g_cb[c].u_cb.u_cpu.x2_stall) n_mem_wait++;
      if (dut.core_pause[c] && dut.g_cb[c].u_cb.u_cpu.rst_n_i) n_paused_cycles++;
    end
  end

  // ------------------------------------------------------------- network
  logic [31:0] tx_got [$];
  logic [2:0]  tx_got_slot;
  int          tx_msgs = 0;
  always @(posedge clk) begin
    tx_ready <= ($urandom_range(0, 2) != 0);
    if (tx_valid && tx_ready) begin
      tx_got.push_back(tx_data); tx_got_slot = tx_slot;
      if (tx_last) tx_msgs++;
    end
  end
  task automatic rx_msg(input int slot, input int n, input bit err, input logic [31:0] base);
    for (int i = 0; i < n; i++) begin
      rx_valid = 1; rx_slot = 3'(slot); rx_data = base + 32'(i); rx_last = (i == n - 1) && !err;
      @(posedge clk); #1;
    end
    rx_valid = 0; rx_last = 0;
    if (err) begin rx_error = 1; n_rx_broken++; @(posedge clk); #1 rx_error = 0; end
  endtask

  // ---------------------------------------------------------------- program
  logic [31:0] code [$];
  function automatic int pc(); return code.size() * 4; endfunction
  function automatic void e(input logic [31:0] w); code.push_back(w); endfunction
  function automatic void li(input int rd, input logic [31:0] v);
    e(LUI(rd, hi20(v))); e(ADDI(rd, rd, lo12(v)));
  endfunction

  localparam logic [31:0] SM = HOST_SMEM_BASE;   // host view of the shared memory
  localparam logic [31:0] HQ = HOST_HMQ_BASE;

  task automatic build();
    int skip, p;
    int to_end [$];
    code.delete();
    e(LUI(1, 32'h80000)); e(LW(2, 1, 0));                       // x2 = core number
    e(LUI(3, 32'h90000)); e(LUI(4, 32'hA0000)); e(LUI(5, 32'hA0100));
    e(LUI(6, 32'hA0200)); e(LUI(7, 32'hC0000));
    e(LUI(21, 32'hA0010)); e(LUI(22, 32'hA0020)); e(LUI(23, 32'hA0030));
    e(LUI(24, 32'hA0040)); e(LUI(25, 32'hA0050)); e(LUI(26, 32'hA0060));
    e(ADDI(8, 2, 32'h30)); e(SW(8, 1, 32'h24));                 // debug '0'+id
    e(ADDI(8, 0, 1)); e(SW(8, 21, 0));                          // w0 += 1
    e(ADDI(8, 2, 1)); e(SW(8, 21, 4));                          // w1 += id+1
    p = pc(); e(LW(9, 22, 8)); e(BNE(9, 0, p - pc()));          // lock w2 (test&set)
    e(LW(10, 4, 12)); e(NOP()); e(NOP()); e(ADDI(10, 10, 1)); e(NOP()); e(SW(10, 4, 12));
    e(SW(0, 4, 8));                                             // unlock
    e(ADDI(8, 0, 1)); e(SLL(8, 8, 2));
    e(SW(8, 24, 16)); e(SW(8, 26, 20)); e(SW(8, 25, 24)); e(SW(2, 23, 28));
    li(11, 1000000); e(ADDI(12, 2, 3)); e(DIVU(13, 11, 12)); e(REMU(14, 11, 12));
    e(SLLI(15, 2, 2)); e(ADD(16, 4, 15)); e(SW(13, 16, 64)); e(SW(14, 16, 96));
    e(MUL(17, 2, 2)); li(18, 12345); e(MUL(17, 17, 18)); e(SW(17, 16, 128));
    e(SW(2, 3, 0)); e(LW(19, 3, 4)); e(SW(19, 16, 160));        // DP
    e(ADDI(8, 2, 32'h100)); e(ADD(20, 7, 15)); e(SW(8, 20, 0)); // SP
    // core 0: answer a host message
    e(ADDI(8, 0, 0)); skip = code.size(); e(0);
    p = pc(); e(LW(9, 1, 32'h14)); e(ANDI(9, 9, 1)); e(BEQ(9, 0, p - pc()));
    e(LUI(27, 32'hA0102));
    e(LW(9, 27, 0)); e(SW(9, 4, 192));                          // w48 = status
    e(LW(10, 27, 32'h200)); e(LW(11, 27, 32'h204)); e(ADD(10, 10, 11));
    e(LW(11, 27, 32'h208)); e(ADD(10, 10, 11)); e(LW(11, 27, 32'h20C)); e(ADD(10, 10, 11));
    e(LUI(8, 32'h80000)); e(SW(8, 27, 4));                      // discard
    e(SW(10, 5, 32'h200)); e(SW(2, 5, 32'h204));
    e(LUI(8, 32'h40000)); e(ADDI(8, 8, 2)); e(SW(8, 5, 4));     // ready, 2 words
    to_end.push_back(code.size()); e(0);
    code[skip] = BNE(2, 8, pc() - 4 * skip);
    // core 1: six messages into a four-entry slot
    e(ADDI(8, 0, 1)); skip = code.size(); e(0);
    e(ADDI(8, 0, 0)); e(ADDI(9, 0, 6)); li(10, 32'h4000_0001);
    p = pc(); e(SW(8, 5, 32'h600)); e(SW(10, 5, 32'h404)); e(ADDI(8, 8, 1)); e(BNE(8, 9, p - pc()));
    to_end.push_back(code.size()); e(0);
    code[skip] = BNE(2, 8, pc() - 4 * skip);
    // core 2: a message to the network
    e(ADDI(8, 0, 2)); skip = code.size(); e(0);
    li(9, 32'h1111); e(SW(9, 6, 32'h200)); li(9, 32'h2222); e(SW(9, 6, 32'h204));
    li(9, 32'h3333); e(SW(9, 6, 32'h208)); li(9, 32'h4000_0003); e(SW(9, 6, 4));
    to_end.push_back(code.size()); e(0);
    code[skip] = BNE(2, 8, pc() - 4 * skip);
    // core 3: a message from the network, incoming slot 1
    e(ADDI(8, 0, 3)); skip = code.size(); e(0);
    p = pc(); e(LW(9, 1, 32'h18)); e(ANDI(9, 9, 2)); e(BEQ(9, 0, p - pc()));
    e(LUI(27, 32'hA0202)); e(ADDI(27, 27, 32'h400));
    e(LW(9, 27, 0)); e(SW(9, 4, 196));                          // w49 = status
    e(ADDI(10, 0, 0)); e(ADDI(11, 27, 32'h200)); e(ADDI(12, 0, 5));
    p = pc(); e(LW(13, 11, 0)); e(ADD(10, 10, 13)); e(ADDI(11, 11, 4)); e(ADDI(12, 12, -1));
    e(BNE(12, 0, p - pc()));
    e(SW(10, 4, 200));                                          // w50 = sum
    e(LUI(8, 32'h80000)); e(SW(8, 27, 4));                      // discard
    e(LW(9, 1, 32'h18)); e(SW(9, 4, 204));                      // w51 = pending after
    to_end.push_back(code.size()); e(0);
    code[skip] = BNE(2, 8, pc() - 4 * skip);
    // core 5: White Rabbit seconds
    e(ADDI(8, 0, 5)); skip = code.size(); e(0);
    e(LW(9, 1, 8)); e(SW(9, 4, 208));                           // w52
    code[skip] = BNE(2, 8, pc() - 4 * skip);
    // common end
    foreach (to_end[i]) code[to_end[i]] = JAL(0, pc() - 4 * to_end[i]);
    e(ADDI(8, 0, 32'h21)); e(SW(8, 1, 32'h24));                 // debug '!'
    e(ADDI(8, 0, 1)); e(SW(8, 21, 252));                        // w63 += 1
    e(ADDI(12, 0, 0));
    p = pc(); e(ADDI(12, 12, 1)); e(SW(12, 3, 8)); e(JAL(0, p - pc()));
  endtask

  // ------------------------------------------------------------------- host
  initial begin
    logic [31:0] q, c0, c1, c6;
    int t;
    wr_valid = 1; wr_cycles = 0;
    rx_valid = 0; rx_last = 0; rx_error = 0; rx_slot = 0; rx_data = 0;
    build();
    repeat (4) @(posedge clk); #1 rst_n = 1;
    host.read(32'h0, q); chk(q, 32'h4D54_0100, "core id register");
    host.read(32'h4, q); chk(q, N, "CPU count");
    for (int w = 0; w < 64; w++) host.write(SM + 32'(4 * w), 0);
    host.write(SM + 24, 32'hFFFF_FFFF);
    host.write(SM + 28, 1000);
    for (int c = 0; c < N; c++) begin
      host.write(32'h10, c); host.write(32'h14, 0);
      for (int i = 0; i < code.size(); i++) begin host.write(32'h18, code[i]); n_upload++; end
    end
    host.write(32'h10, 3); host.write(32'h14, 32'h10);
    for (int i = 4; i < 8; i++) begin host.read(32'h18, q); chk(q, code[i], "dump of core 3"); end
    host.write(32'h8, 0);                                          // release all cores
    fork
      begin
        rx_msg(1, 3, 1'b1, 32'hBAD0);                              // broken: never seen
        rx_msg(1, 5, 1'b0, 32'h100);                               // 0x100..0x104
      end
      begin
        for (int i = 0; i < 4; i++) host.write(HQ + 32'h2200 + 32'(4 * i), 10 * (i + 1));
        host.write(HQ + 32'h2004, 32'h4000_0004);
      end
    join
    t = 0;
    do begin host.read(SM + 252, q); t++; end while (q != N && t < 3000);
    chk(q, N, "all cores done");
    // shared memory results
    host.read(SM + 0, q);  chk(q, N, "atomic add count");
    host.read(SM + 4, q);  chk(q, 36, "atomic add sum");
    host.read(SM + 8, q);  chk(q, 0, "lock released");
    host.read(SM + 12, q); chk(q, N, "spin-locked counter");
    host.read(SM + 16, q); chk(q, 32'hFF, "bit set");
    host.read(SM + 20, q); chk(q, 32'hFF, "bit flip");
    host.read(SM + 24, q); chk(q, 32'hFFFF_FF00, "bit clear");
    host.read(SM + 28, q); chk(q, 1000 - 28, "atomic subtract");
    for (int c = 0; c < N; c++) begin
      host.read(SM + 64 + 32'(4 * c), q);  chk(q, 1000000 / (c + 3), "quotient");
      host.read(SM + 96 + 32'(4 * c), q);  chk(q, 1000000 % (c + 3), "remainder");
      host.read(SM + 128 + 32'(4 * c), q); chk(q, c * c * 12345, "product");
      host.read(SM + 160 + 32'(4 * c), q); chk(q, 32'hA500_0001, "DP read");
      chk(dp_w0[c], c, "DP write");
      chk(sp.mem[c], 32'h100 + c, "SP write");
    end
    host.read(SM + 192, q); chk(q, 32'h0001_0004, "CPU saw host message status");
    host.read(SM + 196, q); chk(q, 32'h0001_0005, "CPU saw network message status");
    host.read(SM + 200, q); chk(q, 32'h50A, "network message sum");
    host.read(SM + 204, q); chk(q, 0, "broken transfer not received");
    host.read(SM + 208, q); chk(q, 32'h1234, "White Rabbit seconds");
    // network transmit
    chk(tx_msgs, 1, "one network message");
    chk(32'(tx_got.size()), 3, "network words");
    if (tx_got.size() == 3) begin
      chk(tx_got[0], 32'h1111, "tx 0"); chk(tx_got[1], 32'h2222, "tx 1"); chk(tx_got[2], 32'h3333, "tx 2");
    end
    chk(32'(tx_got_slot), 0, "tx slot");
    // host message queue
    chk(32'(host_irq), 1, "host interrupt pending");
    host.read(HQ + 32'h0, q); chk(q, 32'h0001_0002, "reply status");
    host.read(HQ + 32'h200, q); chk(q, 100, "reply sum");
    host.read(HQ + 32'h204, q); chk(q, 0, "reply core");
    host.write(HQ + 32'h4, 32'h8000_0000);
    host.read(HQ + 32'h400, q); chk(q, 32'h8004_0001, "slot 1 full, four messages");
    host.read(HQ + 32'h408, q); chk(q, 2, "two messages dropped"); n_dropped = q;
    for (int i = 0; i < 4; i++) begin
      host.read(HQ + 32'h600, q); chk(q, i, "slot 1 message");
      host.write(HQ + 32'h404, 32'h8000_0000);
    end
    host.read(HQ + 32'h400, q); chk(q, 32'h4000_0000, "slot 1 empty");
    chk(32'(host_irq), 0, "host interrupt cleared");
    // debug consoles
    host.read(32'h20, q); chk(q, 32'hFF, "every console has text");
    for (int c = 0; c < N; c++) begin
      host.read(32'h40 + 32'(4 * c), q); chk(q, 32'h130 + c, "console char");
      host.read(32'h40 + 32'(4 * c), q); chk(q, 32'h121, "console '!'");
      host.read(32'h40 + 32'(4 * c), q); chk(q, 0, "console empty");
    end
    // pause core 7
    host.write(32'hC, 32'h80);
    repeat (40) @(posedge clk);
    c0 = dp_w2[7]; c6 = dp_w2[6];
    repeat (200) @(posedge clk);
    c1 = dp_w2[7];
    chk(c1, c0, "paused core 7 stands still");
    chk(32'(dp_w2[6] != c6), 1, "core 6 keeps running");
    host.write(32'hC, 0);
    repeat (200) @(posedge clk);
    chk(32'(dp_w2[7] != c1), 1, "core 7 resumed");
    host.write(32'h10, 0); host.write(32'h14, 0);
    host.read(32'h18, q); chk(q, code[0], "dump while running");

    $display("mechanisms: si_contention=%0d interlock=%0d taken_jumps=%0d div_busy=%0d dropped=%0d host_irq=%0d tx_backpressure=%0d rx_broken=%0d upload_words=%0d paused_cycles=%0d x1_bypass=%0d x2_bypass=%0d mem_wait=%0d",
             n_si_contention, n_interlock, n_taken, n_div_busy, n_dropped, n_host_irq,
             n_tx_backpressure, n_rx_broken, n_upload, n_paused_cycles, n_x1_bypass, n_x2_bypass, n_mem_wait);
    chk(32'(n_si_contention > 0), 1, "SI contention seen");
    chk(32'(n_interlock > 0), 1, "interlock seen");
    chk(32'(n_x1_bypass > 0), 1, "X1 bypass used");
    chk(32'(n_x2_bypass > 0), 1, "X2 bypass used");
    chk(32'(n_mem_wait > 0), 1, "memory wait states seen");
    chk(32'(n_taken > 0), 1, "taken jumps seen");
    chk(n_div_busy, 2 * N * 36, "divider holds X1 36 cycles after issue: 37 per division");
    chk(32'(n_dropped > 0), 1, "drops seen");
    chk(32'(n_host_irq > 0), 1, "host interrupt seen");
    chk(32'(n_tx_backpressure > 0), 1, "tx back-pressure seen");
    chk(32'(n_rx_broken > 0), 1, "broken transfer seen");
    chk(32'(n_upload > 0), 1, "upload seen");
    chk(32'(n_paused_cycles > 0), 1, "pause seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) wr_cycles <= wr_cycles + 1;

  initial begin
    #3000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
