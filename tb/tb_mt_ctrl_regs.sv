// Testbench of the control and debug registers: identity, per-core reset and
// pause bits, program upload and dump through a model of the cores' memory
// ports (address auto-increment, ack only after the memory answered), debug
// console FIFOs per core and the interrupt mask.
`timescale 1ns/1ps
module tb_mt_ctrl_regs;
  import mt_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wb_m2s_t m; wb_s2m_t s;
  logic [N-1:0] core_rst, core_pause, up_req, up_ack, dbg_valid;
  logic up_we, irq_out, irq_in, host_irq;
  logic [31:0] up_addr, up_wdata;
  logic [31:0] up_rdata [N];
  logic [7:0] dbg_char [N];
  logic [31:0] cmem [N][64];
  int checks = 0, failures = 0;
  mt_ctrl_regs #(.N_CPUS(N)) dut (.clk_i(clk), .rst_n_i(rst_n), .wb_i(m), .wb_o(s),
    .core_rst_o(core_rst), .core_pause_o(core_pause), .up_req_o(up_req), .up_we_o(up_we),
    .up_addr_o(up_addr), .up_wdata_o(up_wdata), .up_ack_i(up_ack), .up_rdata_i(up_rdata),
    .dbg_valid_i(dbg_valid), .dbg_char_i(dbg_char), .irq_out_i(irq_out), .irq_in_i(irq_in),
    .host_irq_o(host_irq));
  tb_wb_master u (.clk_i(clk), .m_o(m), .s_i(s));

  // memory port model of each core: answers after a few cycles
  for (genvar c = 0; c < N; c++) begin : g_core
    int dly = 0;
    always @(posedge clk) begin
      up_ack[c] <= 1'b0;
      if (up_req[c] && !up_ack[c]) begin
        if (dly == 3) begin
          dly = 0;
          up_ack[c] <= 1'b1;
          if (up_we) cmem[c][up_addr[7:2]] <= up_wdata;
          up_rdata[c] <= cmem[c][up_addr[7:2]];
        end else dly++;
      end
    end
  end

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] q;
    irq_out = 0; irq_in = 0; dbg_valid = '0;
    for (int c = 0; c < N; c++) dbg_char[c] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    chk(32'(core_rst), 7, "cores held in reset");
    u.read(32'h0, q); chk(q, 32'h4D54_0100, "id");
    u.read(32'h4, q); chk(q, N, "count");
    u.write(32'h8, 32'h5); chk(32'(core_rst), 5, "reset bits");
    u.write(32'hC, 32'h2); chk(32'(core_pause), 2, "pause bits");
    // upload 8 words to core 1, then dump them
    u.write(32'h10, 1); u.write(32'h14, 32'h20);
    for (int i = 0; i < 8; i++) u.write(32'h18, 32'hC0DE_0000 + i);
    for (int i = 0; i < 8; i++) chk(cmem[1][8 + i], 32'hC0DE_0000 + i, "uploaded");
    u.write(32'h14, 32'h20);
    for (int i = 0; i < 8; i++) begin u.read(32'h18, q); chk(q, 32'hC0DE_0000 + i, "dumped"); end
    u.read(32'h14, q); chk(q, 32'h40, "address advanced");
    // debug console: 3 chars from core 2, 1 from core 0
    for (int i = 0; i < 3; i++) begin
      @(posedge clk); #1 dbg_valid = 3'b100; dbg_char[2] = 8'h61 + 8'(i);
      if (i == 1) begin dbg_valid[0] = 1; dbg_char[0] = 8'h7A; end
      @(posedge clk); #1 dbg_valid = 0;
    end
    u.read(32'h20, q); chk(q, 5, "dbg status");
    for (int i = 0; i < 3; i++) begin u.read(32'h48, q); chk(q, 32'h100 + 32'h61 + i, "core 2 char"); end
    u.read(32'h48, q); chk(q, 0, "core 2 empty");
    u.read(32'h40, q); chk(q, 32'h17A, "core 0 char");
    // interrupts
    irq_out = 1; #1 chk(32'(host_irq), 1, "irq out enabled at reset");
    irq_out = 0; irq_in = 1; #1 chk(32'(host_irq), 0, "irq in masked");
    u.write(32'h1C, 3); #1 chk(32'(host_irq), 1, "irq in enabled");
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
