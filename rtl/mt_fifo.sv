// Small synchronous FIFO (helper): WIDTH bits, 2**DEPTH_LOG2 entries, write
// ignored when full, read data valid in the cycle rd_i is asserted (first
// word fall-through from a register array).
module mt_fifo #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned DEPTH_LOG2 = 4
) (
  input  logic             clk_i,
  input  logic             rst_n_i,
  input  logic             wr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             rd_i,
  output logic [WIDTH-1:0] rdata_o,
  output logic             empty_o,
  output logic             full_o
);
  logic [WIDTH-1:0]    mem [1 << DEPTH_LOG2];
  logic [DEPTH_LOG2:0] wp, rp;

  assign empty_o = (wp == rp);
  assign full_o  = (wp - rp) == (DEPTH_LOG2+1)'(1 << DEPTH_LOG2);
  assign rdata_o = mem[rp[DEPTH_LOG2-1:0]];

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_i && !full_o) begin
        mem[wp[DEPTH_LOG2-1:0]] <= wdata_i;
        wp <= wp + 1'b1;
      end
      if (rd_i && !empty_o) rp <= rp + 1'b1;
    end
  end
endmodule
