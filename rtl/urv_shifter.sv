// uRV barrel shifter (SLL, SRL, SRA), split over the two execute stages.
// Stage X1 (combinational, registered at the edge where en_i is high) shifts
// by the upper three bits of the amount, a multiple of four; stage X2
// (combinational after the register) shifts by the last 0..3 bits. Left
// shifts are done as right shifts of the bit-reversed operand. The result is
// therefore available two cycles after the operands (one register between).
// Splitting at four-bit granularity is this design's choice; the document
// states only the two-stage, two-cycle organisation.
module urv_shifter (
  input  logic        clk_i,
  input  logic        en_i,      // capture the X1 operands (instruction leaves X1)
  input  logic [31:0] d_i,
  input  logic [4:0]  shamt_i,
  input  logic        left_i,    // 1: SLL
  input  logic        arith_i,   // 1: SRA (ignored for left shifts)
  output logic [31:0] q_o        // valid in the cycle after en_i
);
  function automatic logic [31:0] rev(input logic [31:0] v);
    for (int i = 0; i < 32; i++) rev[i] = v[31-i];
  endfunction

  logic [31:0] s1_in, s1_out, s1_q, s2_out;
  logic        fill, fill_q, left_q;
  logic [1:0]  amt_lo_q;

  always_comb begin
    s1_in  = left_i ? rev(d_i) : d_i;
    fill   = arith_i && !left_i && d_i[31];
    s1_out = 32'($signed({fill, s1_in}) >>> {shamt_i[4:2], 2'b00});
  end

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      s1_q     <= s1_out;
      fill_q   <= fill;
      left_q   <= left_i;
      amt_lo_q <= shamt_i[1:0];
    end
  end

  always_comb begin
    s2_out = 32'($signed({fill_q, s1_q}) >>> amt_lo_q);
    q_o    = left_q ? rev(s2_out) : s2_out;
  end
endmodule
