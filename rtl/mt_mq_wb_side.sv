// Wishbone access to one side of a message queue.
// A queue has N_OUT outgoing slots (CPUs to host or network) and N_IN
// incoming slots. The CPU side (IS_HOST = 0) writes outgoing slots and reads
// incoming ones; the host side (IS_HOST = 1) does the opposite. This block
// is the Wishbone slave of one side and drives the writer or reader ports of
// every slot accordingly (the "write flow control" and "read flow control"
// blocks). Byte address layout inside the queue window (W = WORDS_LOG2):
//   bit  W+6      0: outgoing slot, 1: incoming slot
//   bits W+5..W+3 slot number
//   bit  W+2      0: control registers, 1: message words
//   bits W+1..2   word
// Control registers: word 0 STATUS (read) = {full, empty, 6'b0,
// count[7:0], head_size[15:0]}; word 1 COMMAND (write) with bits [31:30] =
// 01 ready (commit, size in [15:0], writer only) or 10 discard (reader only);
// word 2 DROPPED (read): messages dropped because the slot was full.
// Message words are written by the writer into the message being built and
// read by the reader from the message at the head. Every access is
// acknowledged one cycle after it is seen. The register layout is this
// design's choice; the document gives the write/mark-ready and
// read/indicate-processed sequence.
module mt_mq_wb_side
  import mt_pkg::*;
#(
  parameter bit          IS_HOST      = 1'b0,
  parameter int unsigned N_OUT        = 2,
  parameter int unsigned N_IN         = 2,
  parameter int unsigned ENTRIES_LOG2 = 2,
  parameter int unsigned WORDS_LOG2   = 7
) (
  input  logic                  clk_i,
  input  logic                  rst_n_i,
  input  wb_m2s_t               wb_i,
  output wb_s2m_t               wb_o,
  // writer ports of all slots (outgoing first, then incoming)
  output logic                  w_we_o     [N_OUT+N_IN],
  output logic [WORDS_LOG2-1:0] w_addr_o,
  output logic [31:0]           w_data_o,
  output logic                  w_commit_o [N_OUT+N_IN],
  output logic [15:0]           w_size_o,
  // reader ports
  output logic [WORDS_LOG2-1:0] r_addr_o,
  input  logic [31:0]           r_data_i   [N_OUT+N_IN],
  output logic                  r_discard_o[N_OUT+N_IN],
  // status of all slots
  input  logic                  empty_i    [N_OUT+N_IN],
  input  logic                  full_i     [N_OUT+N_IN],
  input  logic [ENTRIES_LOG2:0] count_i    [N_OUT+N_IN],
  input  logic [15:0]           head_size_i[N_OUT+N_IN],
  input  logic [15:0]           dropped_i  [N_OUT+N_IN]
);
  localparam int unsigned NSLOT = N_OUT + N_IN;
  localparam int unsigned W     = WORDS_LOG2;

  logic        req, is_in, is_data, writer, ack_q, valid_slot;
  logic [2:0]  slot_no;
  int unsigned slot;
  logic [W-1:0] word;
  logic [31:0] rdat_q;
  logic        rd_data_q;
  int unsigned rslot_q;

  always_comb begin
    req     = wb_i.cyc && wb_i.stb && !ack_q;
    is_in   = wb_i.adr[W+6];
    slot_no = wb_i.adr[W+5:W+3];
    is_data = wb_i.adr[W+2];
    word    = wb_i.adr[W+1:2];
    slot    = is_in ? N_OUT + int'(slot_no) : int'(slot_no);
    valid_slot = is_in ? (int'(slot_no) < N_IN) : (int'(slot_no) < N_OUT);
    writer  = (is_in == IS_HOST);   // CPU writes outgoing, host writes incoming

    w_addr_o = word;
    w_data_o = wb_i.dat;
    w_size_o = wb_i.dat[15:0];
    r_addr_o = word;
    for (int i = 0; i < NSLOT; i++) begin
      w_we_o[i]      = 1'b0;
      w_commit_o[i]  = 1'b0;
      r_discard_o[i] = 1'b0;
    end
    if (req && wb_i.we && valid_slot) begin
      if (is_data && writer) w_we_o[slot] = 1'b1;
      if (!is_data && word == W'(1)) begin
        if (writer  && wb_i.dat[31:30] == MQ_CMD_READY)   w_commit_o[slot]  = 1'b1;
        if (!writer && wb_i.dat[31:30] == MQ_CMD_DISCARD) r_discard_o[slot] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      ack_q     <= 1'b0;
      rd_data_q <= 1'b0;
    end else begin
      ack_q     <= req;
      rd_data_q <= req && !wb_i.we && is_data && !writer && valid_slot;
      rslot_q   <= slot;
      rdat_q    <= '0;
      if (req && !wb_i.we && valid_slot && !is_data) begin
        if (word == W'(0))
          rdat_q <= {full_i[slot], empty_i[slot], 6'b0, 8'(count_i[slot]), head_size_i[slot]};
        else if (word == W'(2))
          rdat_q <= {16'h0, dropped_i[slot]};
      end
    end
  end

  assign wb_o.ack = ack_q;
  assign wb_o.dat = rd_data_q ? r_data_i[rslot_q] : rdat_q;
endmodule
