// RV32IM instruction encoders for testbenches: each function returns the
// 32-bit machine word of one instruction, so that test programs can be written
// directly in SystemVerilog. Register operands are register numbers.
package rv_asm_pkg;
  typedef logic [31:0] w_t;

  function automatic w_t enc_r(input int f7, rs2, rs1, f3, rd, opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic w_t enc_i(input int imm, rs1, f3, rd, opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic w_t enc_s(input int imm, rs2, rs1, f3, opc);
    logic [11:0] v; v = 12'(imm);
    return {v[11:5], 5'(rs2), 5'(rs1), 3'(f3), v[4:0], 7'(opc)};
  endfunction
  function automatic w_t enc_b(input int off, rs2, rs1, f3);
    logic [12:0] v; v = 13'(off);
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), 3'(f3), v[4:1], v[11], 7'h63};
  endfunction

  function automatic w_t LUI  (input int rd, imm20);      return {20'(imm20), 5'(rd), 7'h37}; endfunction
  function automatic w_t AUIPC(input int rd, imm20);      return {20'(imm20), 5'(rd), 7'h17}; endfunction
  function automatic w_t JAL  (input int rd, off);
    logic [20:0] v; v = 21'(off);
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), 7'h6f};
  endfunction
  function automatic w_t JALR (input int rd, rs1, imm);   return enc_i(imm, rs1, 0, rd, 7'h67); endfunction
  function automatic w_t BEQ  (input int rs1, rs2, off);  return enc_b(off, rs2, rs1, 0); endfunction
  function automatic w_t BNE  (input int rs1, rs2, off);  return enc_b(off, rs2, rs1, 1); endfunction
  function automatic w_t BLT  (input int rs1, rs2, off);  return enc_b(off, rs2, rs1, 4); endfunction
  function automatic w_t BGE  (input int rs1, rs2, off);  return enc_b(off, rs2, rs1, 5); endfunction
  function automatic w_t BLTU (input int rs1, rs2, off);  return enc_b(off, rs2, rs1, 6); endfunction
  function automatic w_t BGEU (input int rs1, rs2, off);  return enc_b(off, rs2, rs1, 7); endfunction
  function automatic w_t LB   (input int rd, rs1, imm);   return enc_i(imm, rs1, 0, rd, 7'h03); endfunction
  function automatic w_t LH   (input int rd, rs1, imm);   return enc_i(imm, rs1, 1, rd, 7'h03); endfunction
  function automatic w_t LW   (input int rd, rs1, imm);   return enc_i(imm, rs1, 2, rd, 7'h03); endfunction
  function automatic w_t LBU  (input int rd, rs1, imm);   return enc_i(imm, rs1, 4, rd, 7'h03); endfunction
  function automatic w_t LHU  (input int rd, rs1, imm);   return enc_i(imm, rs1, 5, rd, 7'h03); endfunction
  function automatic w_t SB   (input int rs2, rs1, imm);  return enc_s(imm, rs2, rs1, 0, 7'h23); endfunction
  function automatic w_t SH   (input int rs2, rs1, imm);  return enc_s(imm, rs2, rs1, 1, 7'h23); endfunction
  function automatic w_t SW   (input int rs2, rs1, imm);  return enc_s(imm, rs2, rs1, 2, 7'h23); endfunction
  function automatic w_t ADDI (input int rd, rs1, imm);   return enc_i(imm, rs1, 0, rd, 7'h13); endfunction
  function automatic w_t SLTI (input int rd, rs1, imm);   return enc_i(imm, rs1, 2, rd, 7'h13); endfunction
  function automatic w_t SLTIU(input int rd, rs1, imm);   return enc_i(imm, rs1, 3, rd, 7'h13); endfunction
  function automatic w_t XORI (input int rd, rs1, imm);   return enc_i(imm, rs1, 4, rd, 7'h13); endfunction
  function automatic w_t ORI  (input int rd, rs1, imm);   return enc_i(imm, rs1, 6, rd, 7'h13); endfunction
  function automatic w_t ANDI (input int rd, rs1, imm);   return enc_i(imm, rs1, 7, rd, 7'h13); endfunction
  function automatic w_t SLLI (input int rd, rs1, sh);    return enc_r(0,  sh, rs1, 1, rd, 7'h13); endfunction
  function automatic w_t SRLI (input int rd, rs1, sh);    return enc_r(0,  sh, rs1, 5, rd, 7'h13); endfunction
  function automatic w_t SRAI (input int rd, rs1, sh);    return enc_r(32, sh, rs1, 5, rd, 7'h13); endfunction
  function automatic w_t ADD  (input int rd, rs1, rs2);   return enc_r(0,  rs2, rs1, 0, rd, 7'h33); endfunction
  function automatic w_t SUB  (input int rd, rs1, rs2);   return enc_r(32, rs2, rs1, 0, rd, 7'h33); endfunction
  function automatic w_t SLL  (input int rd, rs1, rs2);   return enc_r(0,  rs2, rs1, 1, rd, 7'h33); endfunction
  function automatic w_t SLT  (input int rd, rs1, rs2);   return enc_r(0,  rs2, rs1, 2, rd, 7'h33); endfunction
  function automatic w_t SLTU (input int rd, rs1, rs2);   return enc_r(0,  rs2, rs1, 3, rd, 7'h33); endfunction
  function automatic w_t XOR  (input int rd, rs1, rs2);   return enc_r(0,  rs2, rs1, 4, rd, 7'h33); endfunction
  function automatic w_t SRL  (input int rd, rs1, rs2);   return enc_r(0,  rs2, rs1, 5, rd, 7'h33); endfunction
  function automatic w_t SRA  (input int rd, rs1, rs2);   return enc_r(32, rs2, rs1, 5, rd, 7'h33); endfunction
  function automatic w_t OR   (input int rd, rs1, rs2);   return enc_r(0,  rs2, rs1, 6, rd, 7'h33); endfunction
  function automatic w_t AND  (input int rd, rs1, rs2);   return enc_r(0,  rs2, rs1, 7, rd, 7'h33); endfunction
  function automatic w_t MUL  (input int rd, rs1, rs2);   return enc_r(1,  rs2, rs1, 0, rd, 7'h33); endfunction
  function automatic w_t MULH (input int rd, rs1, rs2);   return enc_r(1,  rs2, rs1, 1, rd, 7'h33); endfunction
  function automatic w_t DIV  (input int rd, rs1, rs2);   return enc_r(1,  rs2, rs1, 4, rd, 7'h33); endfunction
  function automatic w_t DIVU (input int rd, rs1, rs2);   return enc_r(1,  rs2, rs1, 5, rd, 7'h33); endfunction
  function automatic w_t REM  (input int rd, rs1, rs2);   return enc_r(1,  rs2, rs1, 6, rd, 7'h33); endfunction
  function automatic w_t REMU (input int rd, rs1, rs2);   return enc_r(1,  rs2, rs1, 7, rd, 7'h33); endfunction
  function automatic w_t CSRRW(input int rd, csr, rs1);   return enc_i(csr, rs1, 1, rd, 7'h73); endfunction
  function automatic w_t CSRRS(input int rd, csr, rs1);   return enc_i(csr, rs1, 2, rd, 7'h73); endfunction
  function automatic w_t CSRRC(input int rd, csr, rs1);   return enc_i(csr, rs1, 3, rd, 7'h73); endfunction
  function automatic w_t CSRRSI(input int rd, csr, zimm); return enc_i(csr, zimm, 6, rd, 7'h73); endfunction
  function automatic w_t ECALL();                         return 32'h0000_0073; endfunction
  function automatic w_t MRET();                          return 32'h3020_0073; endfunction
  function automatic w_t NOP();                           return 32'h0000_0013; endfunction

  // low/high parts of a 32-bit constant for LUI+ADDI
  function automatic int hi20(input logic [31:0] v); return int'((v + 32'h800) >> 12); endfunction
  function automatic int lo12(input logic [31:0] v); return int'($signed(v[11:0])); endfunction
endpackage
