// uRV register file: the 32 architectural registers x0..x31.
// Two read ports and one write port with one clock cycle of read latency, as
// the document describes (it maps onto two FPGA RAM blocks holding the same
// contents, one per read port). Read addresses are sampled at a rising edge and
// the data appears after that edge. A read of the register being written at the
// same edge returns the new value: this is the read-after-write bypass that lets
// an instruction three stages behind the writer see its result. x0 reads as 0.
// Interface: raddr1/raddr2 -> rdata1/rdata2 (next cycle); we/waddr/wdata.
module urv_regfile (
  input  logic        clk_i,
  input  logic [4:0]  raddr1_i,
  input  logic [4:0]  raddr2_i,
  output logic [31:0] rdata1_o,
  output logic [31:0] rdata2_o,
  input  logic        we_i,
  input  logic [4:0]  waddr_i,
  input  logic [31:0] wdata_i
);
  logic [31:0] bank1 [32];   // copy serving read port 1
  logic [31:0] bank2 [32];   // copy serving read port 2
  logic [31:0] q1, q2;
  logic        byp1, byp2, zero1, zero2;
  logic [31:0] wdata_q;

  always_ff @(posedge clk_i) begin
    if (we_i) begin
      bank1[waddr_i] <= wdata_i;
      bank2[waddr_i] <= wdata_i;
    end
    q1      <= bank1[raddr1_i];
    q2      <= bank2[raddr2_i];
    byp1    <= we_i && (waddr_i == raddr1_i);
    byp2    <= we_i && (waddr_i == raddr2_i);
    zero1   <= (raddr1_i == 5'd0);
    zero2   <= (raddr2_i == 5'd0);
    wdata_q <= wdata_i;
  end

  always_comb begin
    rdata1_o = zero1 ? '0 : (byp1 ? wdata_q : q1);
    rdata2_o = zero2 ? '0 : (byp2 ? wdata_q : q2);
  end
endmodule
