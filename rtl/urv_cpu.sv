// uRV: a small RV32IM CPU with a four-stage, single-issue pipeline.
//
//  F     Fetch. Holds the program counter and presents the address of the next
//        instruction to the instruction port; the memory returns the word one
//        cycle later. A taken jump from X1 is registered and applied here in
//        the next cycle, which gives every taken jump or branch a constant
//        penalty of three cycles; a branch that is not taken costs nothing.
//  D     Decode. Forms the immediates, decodes the instruction, and takes the
//        operands from the register file (read in parallel, one cycle latency),
//        overriding them with the ALU result registered at the end of X1 (the
//        instruction two ahead). It marks operands that the instruction
//        directly ahead will produce, to be taken from the X2 register once
//        they get there (the X1 bypass). It interlocks (holds) when a source
//        is the destination of a load, multiply or shift still in X1 or X2:
//        their results are not bypassed, to keep the X2 path short.
//  X1/M  Execute 1 / memory. ALU, branch unit, CSR access, exceptions and the
//        interrupt, data address generation and the memory request; first
//        half of multiply and shift; the multicycle divider holds the stage.
//  X2/W  Execute 2 / write back. Waits for the data memory (wait states are
//        allowed), aligns load data, completes multiply and shift, writes the
//        register file.
//
// Memory ports: the instruction port (im_*) has one cycle of read latency;
// im_valid_i low in that cycle makes the fetch repeat. The data port (dm_*)
// issues a one-cycle dm_load_o/dm_store_o pulse from X1 with address, byte
// selects and shifted store data; the instruction then waits in X2 for
// dm_load_done_i/dm_store_done_i (one cycle later for a block RAM).
// Exceptions (illegal instruction, ECALL, EBREAK, misaligned load/store or
// jump target) and the interrupt jump to mtvec, record mepc/mcause and clear
// MIE; MRET returns. Instructions not done in hardware (MULH, MULHSU, MULHU,
// and DIV/REM when WITH_DIVIDER is 0) raise the illegal-instruction exception
// so that software can emulate them, and misaligned accesses trap so that
// software can split them, as the document describes.
// What follows the document: the stage split, the register-file and X2
// bypasses, the unbypassed load/multiply/shift with interlock, the 2-cycle
// multiply and shift, the 37-cycle divider, the 3-cycle taken-jump penalty and
// the exception uses. This design's own choices: the exact bypass and
// interlock conditions, the memory handshake signals, the CSR set and the
// reset vector.
module urv_cpu
  import urv_pkg::*;
#(
  parameter logic [31:0] RESET_VECTOR = 32'h0000_0000,
  parameter bit          WITH_DIVIDER = 1'b1
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  input  logic        irq_i,
  input  logic [31:0] time_i,
  // instruction port
  output logic [31:0] im_addr_o,
  output logic        im_rd_o,
  input  logic [31:0] im_data_i,
  input  logic        im_valid_i,
  // data port
  output logic [31:0] dm_addr_o,
  output logic [31:0] dm_data_s_o,
  output logic [3:0]  dm_data_select_o,
  output logic        dm_load_o,
  output logic        dm_store_o,
  input  logic [31:0] dm_data_l_i,
  input  logic        dm_load_done_i,
  input  logic        dm_store_done_i
);

  // ------------------------------------------------------------------ types
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_OR, ALU_AND,
    ALU_LUI, ALU_AUIPC, ALU_LINK, ALU_CSR, ALU_DIV
  } alu_op_e;

  typedef struct packed {
    logic [31:0] pc;
    logic [31:0] imm;
    logic [4:0]  rd;
    logic        wr;          // writes rd (rd != 0)
    res_sel_e    res;
    alu_op_e     alu;
    logic        use_imm;     // ALU operand b is the immediate
    logic [2:0]  funct3;
    logic        is_load, is_store, is_branch, is_jal, is_jalr;
    logic        is_csr, is_div, is_mret;
    logic        shift_left, shift_arith;
    logic        exc;         // decode-time exception
    logic [3:0]  exc_cause;
    logic [11:0] csr_addr;
    logic        csr_imm;     // CSRRxI: rs1 field is the immediate
    logic [4:0]  rs1_idx;
  } x1_ctl_t;

  // ------------------------------------------------------------------ state
  // fetch
  logic [31:0] pc_q;          // address whose word returns this cycle
  logic        redirect_q;    // apply target_q this cycle
  logic [31:0] target_q;
  // decode
  logic        d_valid;
  logic [31:0] d_insn, d_pc;
  // execute 1
  logic        x1_valid;
  x1_ctl_t     x1;
  logic [31:0] x1_rs1, x1_rs2;
  logic        x1_fwd1, x1_fwd2;
  // execute 2
  logic        x2_valid, x2_wr, x2_is_load, x2_is_store;
  logic [4:0]  x2_rd;
  res_sel_e    x2_res;
  logic [31:0] x2_alu;
  logic [2:0]  x2_funct3;
  logic [1:0]  x2_alo;

  // ------------------------------------------------------------------ wires
  logic [31:0] rf_rdata1, rf_rdata2, x2_wdata;
  logic [4:0]  rf_raddr1, rf_raddr2;
  logic        rf_we;

  logic        x2_stall, x1_stall, x1_fire, div_wait, redirect, trap, take_irq;
  logic        d_fire, interlock, f_take;
  logic [31:0] redirect_pc;

  // ================================================================== FETCH
  assign im_rd_o   = rst_n_i;
  assign im_addr_o = redirect_q ? target_q : (f_take ? pc_q + 32'd4 : pc_q);

  // the word returning now enters D at the next edge
  assign f_take = !redirect && !redirect_q && im_valid_i && !(d_valid && !d_fire);

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      redirect_q <= 1'b1;
      target_q   <= RESET_VECTOR;
      pc_q       <= RESET_VECTOR;
    end else begin
      pc_q       <= im_addr_o;
      redirect_q <= redirect;
      if (redirect) target_q <= redirect_pc;
    end
  end

  // ================================================================= DECODE
  logic [4:0]  d_opc, d_rd, d_rs1, d_rs2;
  logic [2:0]  d_f3;
  logic [6:0]  d_f7;
  logic [31:0] d_imm_i, d_imm_s, d_imm_b, d_imm_u, d_imm_j;
  logic        d_use1, d_use2;
  x1_ctl_t     d_ctl;
  logic [31:0] d_op1, d_op2;
  logic        d_fwd1, d_fwd2;
  logic        x2_byp_ok, x1_byp_ok;

  always_comb begin
    d_opc = d_insn[6:2];
    d_rd  = d_insn[11:7];
    d_rs1 = d_insn[19:15];
    d_rs2 = d_insn[24:20];
    d_f3  = d_insn[14:12];
    d_f7  = d_insn[31:25];
    d_imm_i = {{20{d_insn[31]}}, d_insn[31:20]};
    d_imm_s = {{20{d_insn[31]}}, d_insn[31:25], d_insn[11:7]};
    d_imm_b = {{19{d_insn[31]}}, d_insn[31], d_insn[7], d_insn[30:25], d_insn[11:8], 1'b0};
    d_imm_u = {d_insn[31:12], 12'h000};
    d_imm_j = {{11{d_insn[31]}}, d_insn[31], d_insn[19:12], d_insn[20], d_insn[30:21], 1'b0};

    d_ctl = '0;
    d_ctl.pc        = d_pc;
    d_ctl.rd        = d_rd;
    d_ctl.funct3    = d_f3;
    d_ctl.res       = RES_ALU;
    d_ctl.alu       = ALU_ADD;
    d_ctl.csr_addr  = d_insn[31:20];
    d_ctl.csr_imm   = d_f3[2];
    d_ctl.rs1_idx   = d_rs1;
    d_ctl.exc_cause = CAUSE_ILLEGAL;
    d_use1 = 1'b0;
    d_use2 = 1'b0;
    if (d_insn[1:0] != 2'b11) d_ctl.exc = 1'b1;
    unique case (d_opc)
      OPC_LUI:   begin d_ctl.wr = 1'b1; d_ctl.alu = ALU_LUI;   d_ctl.imm = d_imm_u; end
      OPC_AUIPC: begin d_ctl.wr = 1'b1; d_ctl.alu = ALU_AUIPC; d_ctl.imm = d_imm_u; end
      OPC_JAL:   begin d_ctl.wr = 1'b1; d_ctl.alu = ALU_LINK;  d_ctl.imm = d_imm_j; d_ctl.is_jal = 1'b1; end
      OPC_JALR:  begin
        d_ctl.wr = 1'b1; d_ctl.alu = ALU_LINK; d_ctl.imm = d_imm_i; d_ctl.is_jalr = 1'b1; d_use1 = 1'b1;
        if (d_f3 != 3'b000) d_ctl.exc = 1'b1;
      end
      OPC_BRANCH: begin
        d_ctl.is_branch = 1'b1; d_ctl.imm = d_imm_b; d_use1 = 1'b1; d_use2 = 1'b1;
        if (d_f3 == 3'b010 || d_f3 == 3'b011) d_ctl.exc = 1'b1;
      end
      OPC_LOAD: begin
        d_ctl.wr = 1'b1; d_ctl.res = RES_LOAD; d_ctl.is_load = 1'b1; d_ctl.imm = d_imm_i; d_use1 = 1'b1;
        if (d_f3 == 3'b011 || d_f3 == 3'b110 || d_f3 == 3'b111) d_ctl.exc = 1'b1;
      end
      OPC_STORE: begin
        d_ctl.is_store = 1'b1; d_ctl.imm = d_imm_s; d_use1 = 1'b1; d_use2 = 1'b1;
        if (d_f3[2] || d_f3[1:0] == 2'b11) d_ctl.exc = 1'b1;
      end
      OPC_OPIMM, OPC_OP: begin
        d_ctl.wr = 1'b1; d_use1 = 1'b1;
        d_ctl.imm = d_imm_i;
        d_ctl.use_imm = (d_opc == OPC_OPIMM);
        d_use2 = (d_opc == OPC_OP);
        if (d_opc == OPC_OP && d_f7 == 7'b0000001) begin
          // M extension
          if (d_f3 == 3'b000) d_ctl.res = RES_MUL;
          else if (d_f3[2] && WITH_DIVIDER) begin d_ctl.alu = ALU_DIV; d_ctl.is_div = 1'b1; end
          else d_ctl.exc = 1'b1;  // MULH*, or DIV/REM without the divider: emulated
        end else begin
          unique case (d_f3)
            3'b000: begin
              d_ctl.alu = (d_opc == OPC_OP && d_f7[5]) ? ALU_SUB : ALU_ADD;
              if (d_opc == OPC_OP && d_f7 != 7'b0000000 && d_f7 != 7'b0100000) d_ctl.exc = 1'b1;
            end
            3'b001: begin
              d_ctl.res = RES_SHIFT; d_ctl.shift_left = 1'b1;
              if (d_f7 != 7'b0000000) d_ctl.exc = 1'b1;
            end
            3'b101: begin
              d_ctl.res = RES_SHIFT; d_ctl.shift_arith = d_f7[5];
              if (d_f7 != 7'b0000000 && d_f7 != 7'b0100000) d_ctl.exc = 1'b1;
            end
            3'b010: d_ctl.alu = ALU_SLT;
            3'b011: d_ctl.alu = ALU_SLTU;
            3'b100: d_ctl.alu = ALU_XOR;
            3'b110: d_ctl.alu = ALU_OR;
            default: d_ctl.alu = ALU_AND;
          endcase
          if (d_opc == OPC_OP && d_f3 != 3'b000 && d_f3 != 3'b101 && d_f7 != 7'b0000000) d_ctl.exc = 1'b1;
        end
      end
      OPC_MISC: ;  // FENCE: nothing to order in this pipeline
      OPC_SYSTEM: begin
        if (d_f3 == 3'b000) begin
          if (d_insn == 32'h0000_0073)      begin d_ctl.exc = 1'b1; d_ctl.exc_cause = CAUSE_ECALL; end
          else if (d_insn == 32'h0010_0073) begin d_ctl.exc = 1'b1; d_ctl.exc_cause = CAUSE_BREAK; end
          else if (d_insn == 32'h3020_0073) d_ctl.is_mret = 1'b1;
          else d_ctl.exc = 1'b1;
        end else if (d_f3 == 3'b100) begin
          d_ctl.exc = 1'b1;
        end else begin
          d_ctl.wr = 1'b1; d_ctl.is_csr = 1'b1; d_ctl.alu = ALU_CSR; d_use1 = !d_f3[2];
        end
      end
      default: d_ctl.exc = 1'b1;
    endcase
    if (d_rd == 5'd0) d_ctl.wr = 1'b0;
    if (d_ctl.exc) d_ctl.wr = 1'b0;
  end

  // operands, bypasses and interlock
  assign x2_byp_ok = x2_valid && x2_wr && (x2_res == RES_ALU);
  assign x1_byp_ok = x1_valid && x1.wr && (x1.res == RES_ALU);

  always_comb begin
    d_op1  = (x2_byp_ok && x2_rd == d_rs1) ? x2_alu : rf_rdata1;
    d_op2  = (x2_byp_ok && x2_rd == d_rs2) ? x2_alu : rf_rdata2;
    d_fwd1 = d_use1 && x1_byp_ok && (x1.rd == d_rs1);
    d_fwd2 = d_use2 && x1_byp_ok && (x1.rd == d_rs2);
    interlock = 1'b0;
    if (x1_valid && x1.wr && x1.res != RES_ALU &&
        ((d_use1 && x1.rd == d_rs1) || (d_use2 && x1.rd == d_rs2)))
      interlock = 1'b1;
    if (x2_valid && x2_wr && x2_res != RES_ALU &&
        ((d_use1 && x2_rd == d_rs1) || (d_use2 && x2_rd == d_rs2)))
      interlock = 1'b1;
  end

  assign d_fire = d_valid && (!x1_valid || x1_fire) && !interlock && !redirect;

  // register file read: the word entering D, or D's own word while it waits
  assign rf_raddr1 = f_take ? im_data_i[19:15] : d_rs1;
  assign rf_raddr2 = f_take ? im_data_i[24:20] : d_rs2;

  urv_regfile u_rf (
    .clk_i    (clk_i),
    .raddr1_i (rf_raddr1),
    .raddr2_i (rf_raddr2),
    .rdata1_o (rf_rdata1),
    .rdata2_o (rf_rdata2),
    .we_i     (rf_we),
    .waddr_i  (x2_rd),
    .wdata_i  (x2_wdata)
  );

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      d_valid <= 1'b0;
    end else if (redirect) begin
      d_valid <= 1'b0;
    end else if (d_valid && !d_fire) begin
      d_valid <= d_valid;
    end else begin
      d_valid <= f_take;
    end
    if (f_take) begin
      d_insn <= im_data_i;
      d_pc   <= pc_q;
    end
  end

  // ============================================================== EXECUTE 1
  logic [31:0] a, b_reg, b, alu_res, mem_addr, br_target, csr_rdata, csr_wdata, csr_src;
  logic        br_cond, br_taken, csr_illegal, irq_pending, div_done;
  logic        exc_any, mis_load, mis_store, mis_jump;
  logic [3:0]  exc_cause;
  logic [31:0] mtvec, mepc, div_q;
  logic [3:0]  st_sel;

  assign a     = x1_fwd1 ? x2_alu : x1_rs1;
  assign b_reg = x1_fwd2 ? x2_alu : x1_rs2;
  assign b     = x1.use_imm ? x1.imm : b_reg;

  always_comb begin
    br_target = (x1.is_jalr ? a : x1.pc) + x1.imm;
    if (x1.is_jalr) br_target[0] = 1'b0;
    unique case (x1.funct3)
      3'b000:  br_cond = (a == b_reg);
      3'b001:  br_cond = (a != b_reg);
      3'b100:  br_cond = ($signed(a) <  $signed(b_reg));
      3'b101:  br_cond = ($signed(a) >= $signed(b_reg));
      3'b110:  br_cond = (a <  b_reg);
      default: br_cond = (a >= b_reg);
    endcase
    br_taken = x1.is_jal || x1.is_jalr || (x1.is_branch && br_cond);

    mem_addr  = a + x1.imm;
    mis_load  = x1.is_load  && ((x1.funct3[1:0] == 2'b01 && mem_addr[0]) ||
                                (x1.funct3[1:0] == 2'b10 && mem_addr[1:0] != 2'b00));
    mis_store = x1.is_store && ((x1.funct3[1:0] == 2'b01 && mem_addr[0]) ||
                                (x1.funct3[1:0] == 2'b10 && mem_addr[1:0] != 2'b00));
    mis_jump  = br_taken && br_target[1];

    csr_src = x1.csr_imm ? {27'h0, x1.rs1_idx} : a;
    unique case (x1.funct3[1:0])
      2'b01:   csr_wdata = csr_src;
      2'b10:   csr_wdata = csr_rdata | csr_src;
      default: csr_wdata = csr_rdata & ~csr_src;
    endcase

    unique case (x1.alu)
      ALU_ADD:   alu_res = a + b;
      ALU_SUB:   alu_res = a - b;
      ALU_SLT:   alu_res = 32'($signed(a) < $signed(b));
      ALU_SLTU:  alu_res = 32'(a < b);
      ALU_XOR:   alu_res = a ^ b;
      ALU_OR:    alu_res = a | b;
      ALU_AND:   alu_res = a & b;
      ALU_LUI:   alu_res = x1.imm;
      ALU_AUIPC: alu_res = x1.pc + x1.imm;
      ALU_LINK:  alu_res = x1.pc + 32'd4;
      ALU_CSR:   alu_res = csr_rdata;
      default:   alu_res = div_q;
    endcase

    exc_any   = 1'b0;
    exc_cause = x1.exc_cause;
    if (x1.exc)                           exc_any = 1'b1;
    else if (x1.is_csr && csr_illegal)    begin exc_any = 1'b1; exc_cause = CAUSE_ILLEGAL; end
    else if (mis_load)                    begin exc_any = 1'b1; exc_cause = CAUSE_LOAD_MIS; end
    else if (mis_store)                   begin exc_any = 1'b1; exc_cause = CAUSE_STORE_MIS; end
    else if (mis_jump)                    begin exc_any = 1'b1; exc_cause = 4'd0; end
  end

  assign take_irq  = x1_valid && irq_pending && !exc_any;
  assign div_wait  = x1_valid && x1.is_div && !exc_any && !take_irq && !div_done;
  assign x2_stall  = x2_valid && (x2_is_load ? !dm_load_done_i : (x2_is_store && !dm_store_done_i));
  assign x1_stall  = x2_stall || div_wait;
  assign x1_fire   = x1_valid && !x1_stall;
  assign trap      = x1_fire && (exc_any || take_irq);
  assign redirect  = x1_fire && (trap || br_taken || x1.is_mret);
  assign redirect_pc = trap ? mtvec : (x1.is_mret ? mepc : br_target);

  urv_csr u_csr (
    .clk_i        (clk_i),
    .rst_n_i      (rst_n_i),
    .irq_i        (irq_i),
    .time_i       (time_i),
    .addr_i       (x1.csr_addr),
    .rdata_o      (csr_rdata),
    .illegal_o    (csr_illegal),
    .we_i         (x1_fire && !trap && x1.is_csr && !(x1.funct3[1] && x1.rs1_idx == 5'd0)),
    .wdata_i      (csr_wdata),
    .trap_i       (trap),
    .trap_irq_i   (take_irq),
    .trap_cause_i (take_irq ? CAUSE_EXT_IRQ : exc_cause),
    .trap_pc_i    (x1.pc),
    .mret_i       (x1_fire && !trap && x1.is_mret),
    .mtvec_o      (mtvec),
    .mepc_o       (mepc),
    .irq_pending_o(irq_pending)
  );

  urv_divider u_div (
    .clk_i   (clk_i),
    .rst_n_i (rst_n_i),
    .start_i (x1_valid && x1.is_div && !exc_any && !take_irq),
    .ack_i   (x1_fire),
    .a_i     (a),
    .b_i     (b_reg),
    .op_i    (x1.funct3[1:0]),
    .done_o  (div_done),
    .q_o     (div_q)
  );

  logic [31:0] shift_q, mul_q;

  urv_shifter u_shift (
    .clk_i   (clk_i),
    .en_i    (x1_fire),
    .d_i     (a),
    .shamt_i (b[4:0]),
    .left_i  (x1.shift_left),
    .arith_i (x1.shift_arith),
    .q_o     (shift_q)
  );

  urv_multiplier u_mul (
    .clk_i (clk_i),
    .en_i  (x1_fire),
    .a_i   (a),
    .b_i   (b_reg),
    .q_o   (mul_q)
  );

  // data memory request
  always_comb begin
    unique case (x1.funct3[1:0])
      2'b00:   st_sel = 4'b0001 << mem_addr[1:0];
      2'b01:   st_sel = 4'b0011 << mem_addr[1:0];
      default: st_sel = 4'b1111;
    endcase
  end

  assign dm_addr_o        = mem_addr;
  assign dm_data_s_o      = b_reg << {mem_addr[1:0], 3'b000};
  assign dm_data_select_o = x1.is_load ? 4'b1111 : st_sel;
  assign dm_load_o        = x1_fire && !trap && x1.is_load;
  assign dm_store_o       = x1_fire && !trap && x1.is_store;

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      x1_valid <= 1'b0;
      x1_fwd1  <= 1'b0;
      x1_fwd2  <= 1'b0;
    end else if (x1_valid && !x1_fire) begin
      // holding: settle the bypassed operands so that X2 may move on
      x1_rs1  <= a;
      x1_rs2  <= b_reg;
      x1_fwd1 <= 1'b0;
      x1_fwd2 <= 1'b0;
    end else begin
      x1_valid <= d_fire;
      x1       <= d_ctl;
      x1_rs1   <= d_op1;
      x1_rs2   <= d_op2;
      x1_fwd1  <= d_fwd1;
      x1_fwd2  <= d_fwd2;
    end
  end

  // ============================================================== EXECUTE 2
  logic [31:0] ld_shifted, ld_data;

  always_comb begin
    ld_shifted = dm_data_l_i >> {x2_alo, 3'b000};
    unique case (x2_funct3)
      3'b000:  ld_data = {{24{ld_shifted[7]}},  ld_shifted[7:0]};
      3'b001:  ld_data = {{16{ld_shifted[15]}}, ld_shifted[15:0]};
      3'b100:  ld_data = {24'h0, ld_shifted[7:0]};
      3'b101:  ld_data = {16'h0, ld_shifted[15:0]};
      default: ld_data = ld_shifted;
    endcase
    unique case (x2_res)
      RES_SHIFT: x2_wdata = shift_q;
      RES_MUL:   x2_wdata = mul_q;
      RES_LOAD:  x2_wdata = ld_data;
      default:   x2_wdata = x2_alu;
    endcase
  end

  assign rf_we = x2_valid && x2_wr && !x2_stall;

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      x2_valid    <= 1'b0;
      x2_is_load  <= 1'b0;
      x2_is_store <= 1'b0;
      x2_wr       <= 1'b0;
    end else if (!x2_stall) begin
      x2_valid    <= x1_fire && !trap;
      x2_wr       <= x1.wr;
      x2_rd       <= x1.rd;
      x2_res      <= x1.res;
      x2_alu      <= alu_res;
      x2_is_load  <= x1_fire && !trap && x1.is_load;
      x2_is_store <= x1_fire && !trap && x1.is_store;
      x2_funct3   <= x1.funct3;
      x2_alo      <= mem_addr[1:0];
    end
  end

endmodule
