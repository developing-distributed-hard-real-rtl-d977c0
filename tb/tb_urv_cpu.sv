// Self-checking testbench of the uRV CPU. A test program is assembled in the
// testbench itself, run from a dual-port memory model, and stores each result
// to memory; the expected values are computed here with SystemVerilog
// arithmetic. The program covers every RV32IM instruction class, the bypasses
// and interlocks, byte/half accesses, the illegal-instruction, misaligned-load
// and ECALL exceptions and the interrupt. It reads the cycle counter around
// short sequences to check the stated timing: one instruction per cycle for
// independent ALU/load/multiply/shift code, a 3-cycle penalty for taken jumps
// and branches, none for branches not taken, 37 cycles for a division.
// The program is run twice: without wait states (timing checked) and with
// random memory wait states (results checked).
`timescale 1ns/1ps
module tb_urv_cpu;
  import rv_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, irq = 1'b0, rand_wait = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] im_addr, im_data, dm_addr, dm_data_s, dm_data_l;
  logic        im_rd, im_valid, dm_load, dm_store, dm_ld_done, dm_st_done;
  logic [3:0]  dm_sel;

  urv_cpu dut (
    .clk_i(clk), .rst_n_i(rst_n), .irq_i(irq), .time_i(32'd0),
    .im_addr_o(im_addr), .im_rd_o(im_rd), .im_data_i(im_data), .im_valid_i(im_valid),
    .dm_addr_o(dm_addr), .dm_data_s_o(dm_data_s), .dm_data_select_o(dm_sel),
    .dm_load_o(dm_load), .dm_store_o(dm_store), .dm_data_l_i(dm_data_l),
    .dm_load_done_i(dm_ld_done), .dm_store_done_i(dm_st_done));

  tb_urv_mem #(.WORDS(4096)) mem (
    .clk_i(clk), .rand_wait_i(rand_wait),
    .im_addr_i(im_addr), .im_rd_i(im_rd), .im_data_o(im_data), .im_valid_o(im_valid),
    .dm_addr_i(dm_addr), .dm_data_s_i(dm_data_s), .dm_sel_i(dm_sel),
    .dm_load_i(dm_load), .dm_store_i(dm_store), .dm_data_l_o(dm_data_l),
    .dm_load_done_o(dm_ld_done), .dm_store_done_o(dm_st_done));

  int checks = 0, failures = 0;
  logic [31:0] code [$];
  logic [31:0] expv [$];
  bit          is_timing [$];
  int          handler_at;

  localparam int DATA = 32'h1000;   // x30
  localparam int RES  = 256;        // results at DATA + RES + 4k

  function automatic int pc(); return code.size() * 4; endfunction
  function automatic void e(input logic [31:0] w); code.push_back(w); endfunction
  function automatic void li(input int rd, input logic [31:0] v);
    e(LUI(rd, hi20(v))); e(ADDI(rd, rd, lo12(v)));
  endfunction
  function automatic void chk(input int rs, input logic [31:0] v, input bit timing = 1'b0);
    e(SW(rs, 30, RES + 4 * expv.size())); expv.push_back(v); is_timing.push_back(timing);
  endfunction

  localparam logic [31:0] A = 32'h1234_5678, B = 32'hFEDC_BA98;

  task automatic build();
    int p;
    code.delete(); expv.delete(); is_timing.delete();
    li(30, DATA); li(31, DATA + 32'h800);  // x31: exception log pointer
    li(29, 32'h400); e(CSRRW(0, 12'h305, 29));  // mtvec
    li(1, A); li(2, B);
    e(ADD(3, 1, 2));  chk(3, A + B);
    e(SUB(3, 1, 2));  chk(3, A - B);
    e(SLT(3, 2, 1));  chk(3, 1);
    e(SLTU(3, 2, 1)); chk(3, 0);
    e(XOR(3, 1, 2));  chk(3, A ^ B);
    e(OR(3, 1, 2));   chk(3, A | B);
    e(AND(3, 1, 2));  chk(3, A & B);
    e(SLTI(3, 2, -5)); chk(3, 1);
    e(SLTIU(3, 1, 5)); chk(3, 0);
    e(XORI(3, 1, -1)); chk(3, ~A);
    e(ORI(3, 1, 12'h0F0)); chk(3, A | 32'hF0);
    e(ANDI(3, 2, 12'h7F0)); chk(3, B & 32'h7F0);
    e(SLLI(3, 1, 7)); chk(3, A << 7);
    e(SRLI(3, 2, 9)); chk(3, B >> 9);
    e(SRAI(3, 2, 9)); chk(3, 32'($signed(B) >>> 9));
    e(SLL(3, 2, 1));  chk(3, B << A[4:0]);
    e(SRL(3, 2, 1));  chk(3, B >> A[4:0]);
    e(SRA(3, 2, 1));  chk(3, 32'($signed(B) >>> A[4:0]));
    e(MUL(3, 1, 2));  chk(3, 32'(A * B));
    e(DIV(3, 2, 1));  chk(3, 32'($signed(B) / $signed(A)));
    e(DIVU(3, 2, 1)); chk(3, B / A);
    e(REM(3, 2, 1));  chk(3, 32'($signed(B) % $signed(A)));
    e(REMU(3, 2, 1)); chk(3, B % A);
    e(DIV(3, 1, 0));  chk(3, 32'hFFFF_FFFF);
    e(REM(3, 2, 0));  chk(3, B);
    li(4, 32'h8000_0000); li(5, 32'hFFFF_FFFF);
    e(DIV(3, 4, 5));  chk(3, 32'h8000_0000);
    e(REM(3, 4, 5));  chk(3, 0);
    p = pc(); e(AUIPC(3, 1)); chk(3, p + 32'h1000);
    // bypass distances 1, 2, 3
    e(ADDI(3, 0, 5)); e(ADDI(3, 3, 7)); e(ADD(3, 3, 3)); chk(3, 24);
    e(ADDI(3, 0, 100)); e(NOP()); e(ADD(3, 3, 3)); chk(3, 200);
    e(ADDI(3, 0, 33)); e(NOP()); e(NOP()); e(ADD(3, 3, 3)); chk(3, 66);
    // unbypassed results: load, multiply, shift used right away and at distance 2
    e(SW(1, 30, 0)); e(LW(3, 30, 0)); e(ADDI(3, 3, 1)); chk(3, A + 1);
    e(LW(3, 30, 0)); e(NOP()); e(ADDI(3, 3, 2)); chk(3, A + 2);
    e(MUL(3, 1, 1)); e(ADD(3, 3, 1)); chk(3, 32'(A * A) + A);
    e(SLLI(3, 1, 3)); e(ADD(3, 3, 3)); chk(3, (A << 3) + (A << 3));
    e(DIVU(3, 2, 1)); e(ADD(3, 3, 3)); chk(3, 2 * (B / A));
    // byte and half-word accesses
    e(SW(2, 30, 4));
    e(LB(3, 30, 5));  chk(3, 32'hFFFF_FFBA);
    e(LBU(3, 30, 5)); chk(3, 32'h0000_00BA);
    e(LH(3, 30, 6));  chk(3, 32'hFFFF_FEDC);
    e(LHU(3, 30, 6)); chk(3, 32'h0000_FEDC);
    e(SW(0, 30, 8)); e(SB(1, 30, 9)); e(SH(1, 30, 10)); e(LW(3, 30, 8)); chk(3, 32'h5678_7800);
    // loop: sum 10..1
    e(ADDI(5, 0, 0)); e(ADDI(6, 0, 10)); e(ADD(5, 5, 6)); e(ADDI(6, 6, -1)); e(BNE(6, 0, -8)); chk(5, 55);
    e(ADDI(5, 0, 3)); e(BLT(2, 1, 8)); e(ADDI(5, 0, 9)); chk(5, 3);     // taken (B < A signed)
    e(ADDI(5, 0, 3)); e(BLTU(2, 1, 8)); e(ADDI(5, 0, 9)); chk(5, 9);    // not taken
    e(ADDI(5, 0, 3)); e(BGE(1, 2, 8)); e(ADDI(5, 0, 9)); chk(5, 3);
    e(ADDI(5, 0, 3)); e(BGEU(1, 2, 8)); e(ADDI(5, 0, 9)); chk(5, 9);
    e(ADDI(5, 0, 3)); e(BEQ(5, 5, 8)); e(ADDI(5, 0, 9)); chk(5, 3);
    // JAL / JALR
    p = pc(); e(JAL(7, 8)); e(ADDI(8, 0, 99)); e(ADDI(8, 0, 7)); chk(8, 7); chk(7, p + 4);
    p = pc(); e(AUIPC(9, 0)); e(JALR(10, 9, 12)); e(ADDI(8, 0, 99)); e(ADDI(8, 0, 11)); chk(8, 11); chk(10, p + 8);
    // CSR
    li(11, 32'hCAFE); e(CSRRW(0, 12'h340, 11)); e(CSRRS(12, 12'h340, 0)); chk(12, 32'hCAFE);
    e(CSRRC(12, 12'h340, 11)); e(CSRRS(12, 12'h340, 0)); chk(12, 0);
    // exceptions: MULH (emulated), misaligned load, ECALL
    e(ADDI(5, 0, 1)); e(MULH(5, 1, 2)); chk(5, 1);
    e(LW(5, 30, 1)); chk(5, 1);
    e(ECALL());
    // interrupt: request it, then run straight-line code
    li(5, 32'h800); e(CSRRS(0, 12'h304, 5)); e(CSRRSI(0, 12'h300, 8));
    e(SW(0, 0, 12'h7F4));
    e(ADDI(5, 0, 0));
    for (int i = 0; i < 12; i++) e(ADDI(5, 5, 1));
    chk(5, 12);
    e(SUB(6, 31, 30)); chk(6, 32'h800 + 16);   // four log entries
    // timing
    e(CSRRS(5, 12'hC00, 0)); e(ADDI(6, 0, 1)); e(ADDI(7, 0, 2)); e(ADDI(8, 0, 3)); e(ADDI(9, 0, 4));
    e(CSRRS(10, 12'hC00, 0)); e(SUB(11, 10, 5)); chk(11, 5, 1);
    e(CSRRS(5, 12'hC00, 0)); e(MUL(6, 1, 2)); e(LW(7, 30, 0)); e(SLLI(8, 1, 2)); e(ADD(9, 1, 2));
    e(CSRRS(10, 12'hC00, 0)); e(SUB(11, 10, 5)); chk(11, 5, 1);
    e(CSRRS(5, 12'hC00, 0)); e(JAL(0, 4)); e(CSRRS(10, 12'hC00, 0)); e(SUB(11, 10, 5)); chk(11, 2 + 3, 1);
    e(CSRRS(5, 12'hC00, 0)); e(BEQ(0, 0, 4)); e(CSRRS(10, 12'hC00, 0)); e(SUB(11, 10, 5)); chk(11, 2 + 3, 1);
    e(CSRRS(5, 12'hC00, 0)); e(BNE(0, 0, 8)); e(CSRRS(10, 12'hC00, 0)); e(SUB(11, 10, 5)); chk(11, 2, 1);
    e(CSRRS(5, 12'hC00, 0)); e(DIV(6, 1, 2)); e(CSRRS(10, 12'hC00, 0)); e(SUB(11, 10, 5)); chk(11, 1 + 37, 1);
    e(SW(0, 0, 12'h7FC));  // done
    e(JAL(0, 0));
    if (pc() > 32'h400) $fatal(1, "program overlaps the handler");
    // exception/interrupt handler at 0x400
    while (pc() < 32'h400) e(NOP());
    e(CSRRS(29, 12'h342, 0)); e(SW(29, 31, 0)); e(ADDI(31, 31, 4));
    e(BLT(29, 0, 20));
    e(CSRRS(29, 12'h341, 0)); e(ADDI(29, 29, 4)); e(CSRRW(0, 12'h341, 29)); e(MRET());
    e(SW(0, 0, 12'h7F0)); e(MRET());
  endtask

  // interrupt source: raised a few cycles after a store to 0x7F4, cleared by a store to 0x7F0
  int irq_delay = -1;
  always_ff @(posedge clk) begin
    if (dm_store && dm_addr == 32'h7F4) irq_delay <= 3;
    else if (irq_delay > 0) irq_delay <= irq_delay - 1;
    if (irq_delay == 1) irq <= 1'b1;
    if (dm_store && dm_addr == 32'h7F0) irq <= 1'b0;
  end

  task automatic run(input bit with_wait);
    int cyc;
    rst_n = 1'b0; rand_wait = with_wait; irq = 1'b0;
    for (int i = 0; i < 4096; i++) mem.mem[i] = (i < code.size()) ? code[i] : 32'h0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!(dm_store && dm_addr == 32'h7FC) && cyc < 20000) begin @(posedge clk); cyc++; end
    repeat (5) @(posedge clk);
    for (int k = 0; k < expv.size(); k++) begin
      logic [31:0] got;
      if (with_wait && is_timing[k]) continue;
      got = mem.mem[(DATA + RES) / 4 + k];
      checks++;
      if (got !== expv[k]) begin
        failures++;
        $display("FAIL run%0d result %0d: got %h expected %h", with_wait, k, got, expv[k]);
      end
    end
    // exception log: illegal, misaligned load, ecall, external interrupt
    begin
      logic [31:0] exp_log [4] = '{32'd2, 32'd4, 32'd11, 32'h8000_000B};
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (mem.mem[(DATA + 32'h800) / 4 + k] !== exp_log[k]) begin
          failures++;
          $display("FAIL run%0d log %0d: got %h expected %h", with_wait, k,
                   mem.mem[(DATA + 32'h800) / 4 + k], exp_log[k]);
        end
      end
    end
  endtask

  initial begin
    build();
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
