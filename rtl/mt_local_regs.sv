// Local registers and timing unit of one CPU Core Block.
// A Wishbone slave reachable only by its own CPU, so that these operations
// never touch a shared resource:
//   0x00 CORE_ID      (r)  number of this core
//   0x04 CORE_COUNT   (r)  number of cores
//   0x08 TIME_SEC     (r)  current time, seconds
//   0x0C TIME_CYCLES  (r)  current time, clock cycles within the second
//   0x10 DELAY        (rw) write loads a count that then decrements by one
//                          every cycle down to 0; read the current count
//   0x14 HMQ_IN       (r)  bit i: incoming HMQ slot i holds a message
//   0x18 RMQ_IN       (r)  bit i: incoming RMQ slot i holds a message
//   0x1C HMQ_OUT_FULL (r)  bit i: outgoing HMQ slot i is full
//   0x20 RMQ_OUT_FULL (r)  bit i: outgoing RMQ slot i is full
//   0x24 DBG_CHAR     (w)  send byte [7:0] to the host debug console
// Time comes from White Rabbit (wr_time_valid_i with TAI seconds and cycles)
// when present, else from a local counter wrapping at CYCLES_PER_SEC.
// Every access is acknowledged in the cycle after it is seen.
// The four functions are the document's; addresses, widths and the local
// counter's rate are this design's choice.
module mt_local_regs
  import mt_pkg::*;
#(
  parameter int unsigned CORE_ID        = 0,
  parameter int unsigned N_CPUS         = 8,
  parameter int unsigned CYCLES_PER_SEC = 125_000_000
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  input  wb_m2s_t     wb_i,
  output wb_s2m_t     wb_o,
  input  logic        wr_time_valid_i,
  input  logic [31:0] wr_tai_sec_i,
  input  logic [27:0] wr_tai_cycles_i,
  input  logic [7:0]  hmq_in_i,
  input  logic [7:0]  rmq_in_i,
  input  logic [7:0]  hmq_out_full_i,
  input  logic [7:0]  rmq_out_full_i,
  output logic        dbg_valid_o,
  output logic [7:0]  dbg_char_o
);
  logic [31:0] loc_sec, delay;
  logic [27:0] loc_cyc;
  logic        ack_q, req;
  logic [31:0] dat_q;

  assign req = wb_i.cyc && wb_i.stb && !ack_q;

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      loc_sec     <= '0;
      loc_cyc     <= '0;
      delay       <= '0;
      ack_q       <= 1'b0;
      dat_q       <= '0;
      dbg_valid_o <= 1'b0;
      dbg_char_o  <= '0;
    end else begin
      if (loc_cyc == 28'(CYCLES_PER_SEC - 1)) begin
        loc_cyc <= '0;
        loc_sec <= loc_sec + 32'd1;
      end else begin
        loc_cyc <= loc_cyc + 28'd1;
      end
      if (delay != 0) delay <= delay - 32'd1;

      ack_q       <= req;
      dbg_valid_o <= 1'b0;
      dat_q       <= '0;
      if (req && wb_i.we) begin
        unique case (wb_i.adr[5:2])
          4'h4: delay <= wb_i.dat;
          4'h9: begin dbg_valid_o <= 1'b1; dbg_char_o <= wb_i.dat[7:0]; end
          default: ;
        endcase
      end else if (req) begin
        unique case (wb_i.adr[5:2])
          4'h0: dat_q <= 32'(CORE_ID);
          4'h1: dat_q <= 32'(N_CPUS);
          4'h2: dat_q <= wr_time_valid_i ? wr_tai_sec_i : loc_sec;
          4'h3: dat_q <= {4'h0, wr_time_valid_i ? wr_tai_cycles_i : loc_cyc};
          4'h4: dat_q <= delay;
          4'h5: dat_q <= {24'h0, hmq_in_i};
          4'h6: dat_q <= {24'h0, rmq_in_i};
          4'h7: dat_q <= {24'h0, hmq_out_full_i};
          4'h8: dat_q <= {24'h0, rmq_out_full_i};
          default: dat_q <= '0;
        endcase
      end
    end
  end

  assign wb_o.ack = ack_q;
  assign wb_o.dat = dat_q;
endmodule
