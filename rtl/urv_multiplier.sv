// uRV multiplier: the low 32 bits of a 32x32 product (RISC-V MUL), split over
// the two execute stages. In X1 the operands are cut into 16-bit halves and
// the three partial products that reach the low word are formed and
// registered (the FPGA DSP input/pipeline register); in X2 they are summed.
// Two cycles of latency, one register between operands and result. The upper
// word (MULH, MULHSU, MULHU) is not computed here: the document has those
// instructions emulated through the illegal-instruction exception.
module urv_multiplier (
  input  logic        clk_i,
  input  logic        en_i,      // capture the X1 operands
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] q_o        // valid in the cycle after en_i
);
  logic [31:0] p_ll_q;
  logic [15:0] p_hl_q, p_lh_q;

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      p_ll_q <= a_i[15:0] * b_i[15:0];
      p_hl_q <= 16'(a_i[31:16] * b_i[15:0]);
      p_lh_q <= 16'(a_i[15:0] * b_i[31:16]);
    end
  end

  assign q_o = p_ll_q + {p_hl_q + p_lh_q, 16'h0000};
endmodule
