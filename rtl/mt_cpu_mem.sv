// Private program/data memory of one CPU Core Block: a true dual-port block
// RAM of SIZE_BYTES, 32 bits wide. Port A serves instruction fetches (read
// only); port B serves data loads and stores with byte enables, and, when the
// CPU leaves it idle, program upload and dump by the host. Both ports have one
// cycle of read latency. The memory is inside the FPGA so that accesses never
// wait on arbitration, which the document gives as the reason for private
// memories; the size is a parameter (64 KiB as in the document's example uRV
// system).
module mt_cpu_mem #(
  parameter int unsigned SIZE_BYTES = 65536
) (
  input  logic        clk_i,
  // port A: instructions
  input  logic [31:0] a_addr_i,
  output logic [31:0] a_rdata_o,
  // port B: data
  input  logic        b_we_i,
  input  logic [3:0]  b_sel_i,
  input  logic [31:0] b_addr_i,
  input  logic [31:0] b_wdata_i,
  output logic [31:0] b_rdata_o
);
  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk_i) begin
    a_rdata_o <= mem[a_addr_i[AW+1:2]];
  end

  always_ff @(posedge clk_i) begin
    if (b_we_i) begin
      for (int i = 0; i < 4; i++)
        if (b_sel_i[i]) mem[b_addr_i[AW+1:2]][8*i +: 8] <= b_wdata_i[8*i +: 8];
    end
    b_rdata_o <= mem[b_addr_i[AW+1:2]];
  end
endmodule
