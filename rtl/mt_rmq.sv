// Remote Message Queue (RMQ): message slots between the CPUs and remote
// nodes of the network.
// The CPU side is the same Wishbone slave as the HMQ's (mt_mq_wb_side). The
// network side connects to a packet transport endpoint (in the document, an
// Etherbone/UDP core next to the White Rabbit PTP core) through two word
// streams. Transmit: as soon as a message is committed in an outgoing slot,
// the lowest-numbered non-empty slot is sent word by word on tx_* (tx_slot_o
// says which, tx_last_o marks the last word; a valid/ready handshake) and
// then discarded, so writing a message sends it automatically. Receive:
// words arriving on rx_* are written into the incoming slot rx_slot_i; the
// last word commits the message, and rx_error_i (the transport reports a
// broken transfer) abandons it, so an incomplete message is never received.
// There is no flow control on receive: a full slot drops the message.
// The stream interfaces and the fixed-priority transmit order are this
// design's choice; the transport core itself is outside this design.
module mt_rmq
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
  // to the network
  output logic             tx_valid_o,
  input  logic             tx_ready_i,
  output logic [31:0]      tx_data_o,
  output logic             tx_last_o,
  output logic [2:0]       tx_slot_o,
  // from the network
  input  logic             rx_valid_i,
  input  logic [31:0]      rx_data_i,
  input  logic             rx_last_i,
  input  logic             rx_error_i,
  input  logic [2:0]       rx_slot_i,
  // status
  output logic [N_IN-1:0]  in_pending_o,
  output logic [N_OUT-1:0] out_full_o
);
  localparam int unsigned NS = N_OUT + N_IN;
  localparam int unsigned W  = WORDS_LOG2;

  logic         c_we [NS], c_commit [NS], c_discard [NS];
  logic [W-1:0] c_waddr, c_raddr;
  logic [31:0]  c_wdata;
  logic [15:0]  c_size;
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

  // ---------------------------------------------------------------- transmit
  typedef enum logic [1:0] {TX_IDLE, TX_FETCH, TX_SEND, TX_DONE} tx_state_e;
  tx_state_e   tx_state;
  int unsigned tx_slot;
  logic [W:0]  tx_idx;
  logic [15:0] tx_size;

  assign tx_valid_o = (tx_state == TX_SEND);
  assign tx_data_o  = r_data[tx_slot];
  assign tx_last_o  = (17'(tx_idx) + 17'd1 == 17'(tx_size));
  assign tx_slot_o  = 3'(tx_slot);

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      tx_state <= TX_IDLE;
      tx_slot  <= 0;
      tx_idx   <= '0;
      tx_size  <= '0;
    end else begin
      unique case (tx_state)
        TX_IDLE: begin
          for (int i = N_OUT - 1; i >= 0; i--)
            if (!empty[i]) begin
              tx_slot  <= i;
              tx_size  <= head_size[i];
              tx_idx   <= '0;
              tx_state <= (head_size[i] == 16'd0) ? TX_DONE : TX_FETCH;
            end
        end
        TX_FETCH: tx_state <= TX_SEND;   // word read from the slot buffer
        TX_SEND: if (tx_ready_i) begin
          tx_idx   <= tx_idx + 1'b1;
          tx_state <= tx_last_o ? TX_DONE : TX_FETCH;
        end
        TX_DONE: tx_state <= TX_IDLE;    // discard issued in this state
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------------- receive
  logic [W:0] rx_idx;
  logic       rx_overrun;

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      rx_idx     <= '0;
      rx_overrun <= 1'b0;
    end else if (rx_valid_i || rx_error_i) begin
      if (rx_error_i || rx_last_i) begin
        rx_idx     <= '0;
        rx_overrun <= 1'b0;
      end else begin
        rx_idx <= rx_idx + 1'b1;
        if (rx_idx == (W+1)'((1 << W) - 1)) rx_overrun <= 1'b1;
      end
    end
  end

  // slot ports: CPU side writes outgoing and reads incoming; the network the reverse
  for (genvar i = 0; i < NS; i++) begin : g_slot
    localparam bit OUT = (i < N_OUT);
    logic         nw_we, nw_commit, nr_discard;
    logic [W-1:0] nr_addr;
    assign nw_we      = !OUT && rx_valid_i && !rx_error_i && !rx_overrun &&
                        (int'(rx_slot_i) == i - N_OUT);
    assign nw_commit  = nw_we && rx_last_i;
    assign nr_discard = OUT && (tx_state == TX_DONE) && (tx_slot == i);
    assign nr_addr    = tx_idx[W-1:0];

    mt_mq_slot #(.ENTRIES_LOG2(ENTRIES_LOG2), .WORDS_LOG2(W)) u_slot (
      .clk_i, .rst_n_i,
      .w_we_i      (OUT ? c_we[i]     : nw_we),
      .w_addr_i    (OUT ? c_waddr     : rx_idx[W-1:0]),
      .w_data_i    (OUT ? c_wdata     : rx_data_i),
      .w_commit_i  (OUT ? c_commit[i] : nw_commit),
      .w_size_i    (OUT ? c_size      : 16'(rx_idx) + 16'd1),
      .r_addr_i    (OUT ? nr_addr     : c_raddr),
      .r_data_o    (r_data[i]),
      .r_discard_i (OUT ? nr_discard  : c_discard[i]),
      .empty_o     (empty[i]),
      .full_o      (full[i]),
      .count_o     (count[i]),
      .head_size_o (head_size[i]),
      .dropped_o   (dropped[i]));
  end

  always_comb begin
    for (int i = 0; i < N_OUT; i++) out_full_o[i]  = full[i];
    for (int i = 0; i < N_IN; i++)  in_pending_o[i] = !empty[N_OUT + i];
  end
endmodule
