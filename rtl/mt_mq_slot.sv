// One message-queue slot: a FIFO of whole messages, written at one end and
// read at the other.
// The buffer holds 2**ENTRIES_LOG2 messages of up to 2**WORDS_LOG2 32-bit
// words. The writer fills the message at the tail word by word (w_we_i) and
// commits it with its size (w_commit_i): only then does it become visible to
// the reader, so a message that is never committed (for example one whose
// network transfer failed) is never received, not even in part. If the slot is
// full, words and commits are ignored and the message is dropped, counted in
// dropped_o: there is no flow control. The reader sees empty_o, the size of
// the message at the head, reads its words (r_addr_i, data one cycle later)
// and releases it with r_discard_i.
// The behaviour follows the document; the commit-with-size and the
// dropped-message counter are this design's choice.
module mt_mq_slot #(
  parameter int unsigned ENTRIES_LOG2 = 2,
  parameter int unsigned WORDS_LOG2   = 7
) (
  input  logic                  clk_i,
  input  logic                  rst_n_i,
  // writer
  input  logic                  w_we_i,
  input  logic [WORDS_LOG2-1:0] w_addr_i,
  input  logic [31:0]           w_data_i,
  input  logic                  w_commit_i,
  input  logic [15:0]           w_size_i,
  // reader
  input  logic [WORDS_LOG2-1:0] r_addr_i,
  output logic [31:0]           r_data_o,
  input  logic                  r_discard_i,
  // status
  output logic                  empty_o,
  output logic                  full_o,
  output logic [ENTRIES_LOG2:0] count_o,
  output logic [15:0]           head_size_o,
  output logic [15:0]           dropped_o
);
  localparam int unsigned ENTRIES = 1 << ENTRIES_LOG2;

  logic [31:0] mem [ENTRIES << WORDS_LOG2];
  logic [15:0] size_mem [ENTRIES];
  logic [ENTRIES_LOG2:0] wr_ptr, rd_ptr;

  assign count_o     = wr_ptr - rd_ptr;
  assign empty_o     = (wr_ptr == rd_ptr);
  assign full_o      = (count_o == (ENTRIES_LOG2+1)'(ENTRIES));
  assign head_size_o = empty_o ? 16'h0 : size_mem[rd_ptr[ENTRIES_LOG2-1:0]];

  always_ff @(posedge clk_i) begin
    if (w_we_i && !full_o)
      mem[{wr_ptr[ENTRIES_LOG2-1:0], w_addr_i}] <= w_data_i;
    r_data_o <= mem[{rd_ptr[ENTRIES_LOG2-1:0], r_addr_i}];
  end

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      dropped_o <= '0;
    end else begin
      if (w_commit_i) begin
        if (!full_o) begin
          size_mem[wr_ptr[ENTRIES_LOG2-1:0]] <= w_size_i;
          wr_ptr <= wr_ptr + 1'b1;
        end else begin
          dropped_o <= dropped_o + 16'd1;
        end
      end
      if (r_discard_i && !empty_o) rd_ptr <= rd_ptr + 1'b1;
    end
  end
endmodule
