// Host Message Queue (HMQ): message slots between the CPUs and the host.
// N_OUT outgoing slots carry messages from the CPUs to the host and N_IN
// incoming slots carry messages from the host to the CPUs. The CPU side
// (a slave of the Shared Interconnect) writes outgoing and reads incoming
// slots; the host side (part of the host's Wishbone slave) does the reverse;
// both use the register layout of mt_mq_wb_side. Status goes to the CPUs'
// local registers for polling (in_pending_o, out_full_o) and to the host as
// interrupt requests: irq_out_o while any outgoing slot holds a message, and
// irq_in_o while any incoming slot is empty.
// The structure (slots between a write and a read flow control on each path,
// host interrupts for "not empty" and "empty") follows the document; slot
// counts and sizes are user parameters that it does not fix.
module mt_hmq
  import mt_pkg::*;
#(
  parameter int unsigned N_OUT        = 2,
  parameter int unsigned N_IN         = 2,
  parameter int unsigned ENTRIES_LOG2 = 2,
  parameter int unsigned WORDS_LOG2   = 7
) (
  input  logic             clk_i,
  input  logic             rst_n_i,
  input  wb_m2s_t          cpu_wb_i,
  output wb_s2m_t          cpu_wb_o,
  input  wb_m2s_t          host_wb_i,
  output wb_s2m_t          host_wb_o,
  output logic [N_IN-1:0]  in_pending_o,   // incoming slot not empty
  output logic [N_OUT-1:0] out_full_o,     // outgoing slot full
  output logic             irq_out_o,
  output logic             irq_in_o
);
  localparam int unsigned NS = N_OUT + N_IN;
  localparam int unsigned W  = WORDS_LOG2;

  // per-side port bundles
  logic         c_we [NS], c_commit [NS], c_discard [NS];
  logic         h_we [NS], h_commit [NS], h_discard [NS];
  logic [W-1:0] c_waddr, c_raddr, h_waddr, h_raddr;
  logic [31:0]  c_wdata, h_wdata;
  logic [15:0]  c_size, h_size;
  // slot outputs
  logic [31:0]  r_data [NS];
  logic         empty [NS], full [NS];
  logic [ENTRIES_LOG2:0] count [NS];
  logic [15:0]  head_size [NS], dropped [NS];

  mt_mq_wb_side #(.IS_HOST(1'b0), .N_OUT(N_OUT), .N_IN(N_IN),
                  .ENTRIES_LOG2(ENTRIES_LOG2), .WORDS_LOG2(W)) u_cpu_side (
    .clk_i, .rst_n_i, .wb_i(cpu_wb_i), .wb_o(cpu_wb_o),
    .w_we_o(c_we), .w_addr_o(c_waddr), .w_data_o(c_wdata), .w_commit_o(c_commit), .w_size_o(c_size),
    .r_addr_o(c_raddr), .r_data_i(r_data), .r_discard_o(c_discard),
    .empty_i(empty), .full_i(full), .count_i(count), .head_size_i(head_size), .dropped_i(dropped));

  mt_mq_wb_side #(.IS_HOST(1'b1), .N_OUT(N_OUT), .N_IN(N_IN),
                  .ENTRIES_LOG2(ENTRIES_LOG2), .WORDS_LOG2(W)) u_host_side (
    .clk_i, .rst_n_i, .wb_i(host_wb_i), .wb_o(host_wb_o),
    .w_we_o(h_we), .w_addr_o(h_waddr), .w_data_o(h_wdata), .w_commit_o(h_commit), .w_size_o(h_size),
    .r_addr_o(h_raddr), .r_data_i(r_data), .r_discard_o(h_discard),
    .empty_i(empty), .full_i(full), .count_i(count), .head_size_i(head_size), .dropped_i(dropped));

  for (genvar i = 0; i < NS; i++) begin : g_slot
    localparam bit OUT = (i < N_OUT);
    mt_mq_slot #(.ENTRIES_LOG2(ENTRIES_LOG2), .WORDS_LOG2(W)) u_slot (
      .clk_i, .rst_n_i,
      .w_we_i      (OUT ? c_we[i]     : h_we[i]),
      .w_addr_i    (OUT ? c_waddr     : h_waddr),
      .w_data_i    (OUT ? c_wdata     : h_wdata),
      .w_commit_i  (OUT ? c_commit[i] : h_commit[i]),
      .w_size_i    (OUT ? c_size      : h_size),
      .r_addr_i    (OUT ? h_raddr     : c_raddr),
      .r_data_o    (r_data[i]),
      .r_discard_i (OUT ? h_discard[i] : c_discard[i]),
      .empty_o     (empty[i]),
      .full_o      (full[i]),
      .count_o     (count[i]),
      .head_size_o (head_size[i]),
      .dropped_o   (dropped[i]));
  end

  always_comb begin
    irq_out_o = 1'b0;
    irq_in_o  = 1'b0;
    for (int i = 0; i < N_OUT; i++) begin
      out_full_o[i] = full[i];
      irq_out_o     = irq_out_o || !empty[i];
    end
    for (int i = 0; i < N_IN; i++) begin
      in_pending_o[i] = !empty[N_OUT + i];
      irq_in_o        = irq_in_o || empty[N_OUT + i];
    end
  end
endmodule
