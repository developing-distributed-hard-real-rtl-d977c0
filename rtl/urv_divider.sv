// uRV division/remainder unit (DIV, DIVU, REM, REMU), multicycle.
// A restoring divider producing one quotient bit per cycle on the operand
// magnitudes, followed by a sign-correction step. The unit is started while
// the instruction sits in the X1/M stage and holds the pipeline there; done_o
// rises in the 37th cycle of that occupancy (cycle count of a division given
// by the document), and the stage leaves at that edge. ack_i (the instruction
// leaving X1, also used to abandon a division when an interrupt is taken)
// returns the unit to idle. Division by zero and overflow give the results the
// RISC-V ISA fixes (all ones / the dividend; the dividend / zero).
// The restoring algorithm and the idle cycles that pad the count to 37 are this
// design's choice.
module urv_divider #(
  parameter int unsigned LATENCY = 37   // cycles from start to done, inclusive
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  input  logic        start_i,   // level: a division waits in X1
  input  logic        ack_i,     // the instruction leaves X1
  input  logic [31:0] a_i,       // dividend
  input  logic [31:0] b_i,       // divisor
  input  logic [1:0]  op_i,      // funct3[1:0]: 00 DIV, 01 DIVU, 10 REM, 11 REMU
  output logic        done_o,
  output logic [31:0] q_o
);
  logic        busy;
  logic [5:0]  cnt;
  logic [31:0] quo, rem, div;
  logic        neg_q, neg_r, want_rem;
  logic [32:0] trial;
  logic [31:0] result;

  assign trial  = {rem[31:0], quo[31]} - {1'b0, div};
  assign done_o = busy && (cnt == 6'(LATENCY - 1));
  assign q_o    = result;

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (busy && ack_i) begin
      busy <= 1'b0;
    end else if (!busy && start_i) begin
      busy     <= 1'b1;
      cnt      <= 6'd1;
      want_rem <= op_i[1];
      neg_q    <= !op_i[0] && (a_i[31] ^ b_i[31]) && (b_i != 0);
      neg_r    <= !op_i[0] && a_i[31];
      quo      <= (!op_i[0] && a_i[31]) ? -a_i : a_i;
      div      <= (!op_i[0] && b_i[31]) ? -b_i : b_i;
      rem      <= '0;
    end else if (busy && !done_o) begin
      cnt <= cnt + 6'd1;
      if (cnt <= 6'd32) begin
        if (!trial[32]) begin
          rem <= trial[31:0];
          quo <= {quo[30:0], 1'b1};
        end else begin
          rem <= {rem[30:0], quo[31]};
          quo <= {quo[30:0], 1'b0};
        end
      end else if (cnt == 6'd33) begin
        if (want_rem) result <= neg_r ? -rem : rem;
        else          result <= neg_q ? -quo : quo;
      end
    end
  end
endmodule
