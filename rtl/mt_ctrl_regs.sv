// Control and debug registers (host side, common to all cores).
// A Wishbone slave on the host port:
//   0x00 ID           (r)  0x4D54_0100
//   0x04 CORE_COUNT   (r)  number of cores
//   0x08 CORE_RESET   (rw) bit c = 1 holds core c in reset (all set at reset)
//   0x0C CORE_PAUSE   (rw) bit c = 1 stops core c fetching new instructions
//   0x10 UPLOAD_CORE  (rw) core whose private memory UPLOAD_DATA reaches
//   0x14 UPLOAD_ADDR  (rw) byte address in that memory, +4 after each access
//   0x18 UPLOAD_DATA  (rw) write: store the word; read: fetch the word
//   0x1C IRQ_MASK     (rw) bit 0: interrupt on a message in an outgoing HMQ
//                          slot (set at reset); bit 1: on an empty incoming slot
//   0x20 DBG_STATUS   (r)  bit c: core c's debug console has characters
//   0x24 IRQ_STATUS   (r)  the two interrupt sources, unmasked
//   0x40+4c DBG_DATA  (r)  pop core c's console: {valid[8], char[7:0]}
// Program upload and dump go through each Core Block's memory port while the
// CPU does not use it, so they are possible at any time; an UPLOAD_DATA access
// is acknowledged when the memory has answered. Debug characters from each
// core's local registers are kept in a DBG_DEPTH_LOG2-deep FIFO per core
// (overflowing characters are lost).
// Reset, pause/enable, upload/dump and debug readout are the features the
// document lists for cores management; the register map is this design's.
module mt_ctrl_regs
  import mt_pkg::*;
#(
  parameter int unsigned N_CPUS         = 8,
  parameter int unsigned DBG_DEPTH_LOG2 = 4
) (
  input  logic              clk_i,
  input  logic              rst_n_i,
  input  wb_m2s_t           wb_i,
  output wb_s2m_t           wb_o,
  // core control
  output logic [N_CPUS-1:0] core_rst_o,
  output logic [N_CPUS-1:0] core_pause_o,
  // private memory access
  output logic [N_CPUS-1:0] up_req_o,
  output logic              up_we_o,
  output logic [31:0]       up_addr_o,
  output logic [31:0]       up_wdata_o,
  input  logic [N_CPUS-1:0] up_ack_i,
  input  logic [31:0]       up_rdata_i [N_CPUS],
  // debug console
  input  logic [N_CPUS-1:0] dbg_valid_i,
  input  logic [7:0]        dbg_char_i [N_CPUS],
  // interrupts
  input  logic              irq_out_i,
  input  logic              irq_in_i,
  output logic              host_irq_o
);
  localparam int unsigned CW = (N_CPUS > 1) ? $clog2(N_CPUS) : 1;

  logic [31:0] up_core, irq_mask;
  logic        ack_q, req, up_busy;
  logic [31:0] dat_q;
  logic [N_CPUS-1:0] dbg_empty, dbg_nonempty, dbg_pop;
  assign dbg_nonempty = ~dbg_empty;
  logic [7:0]  dbg_data [N_CPUS];
  logic [5:0]  word;

  assign req  = wb_i.cyc && wb_i.stb && !ack_q;
  assign word = wb_i.adr[7:2];

  for (genvar c = 0; c < N_CPUS; c++) begin : g_dbg
    logic unused_full;
    mt_fifo #(.WIDTH(8), .DEPTH_LOG2(DBG_DEPTH_LOG2)) u_fifo (
      .clk_i, .rst_n_i, .wr_i(dbg_valid_i[c]), .wdata_i(dbg_char_i[c]),
      .rd_i(dbg_pop[c]), .rdata_o(dbg_data[c]), .empty_o(dbg_empty[c]), .full_o(unused_full));
  end

  always_comb begin
    dbg_pop = '0;
    if (req && !wb_i.we && word >= 6'h10 && int'(word) - 16 < int'(N_CPUS))
      dbg_pop[CW'(word - 6'h10)] = 1'b1;
  end

  assign host_irq_o = (irq_mask[0] && irq_out_i) || (irq_mask[1] && irq_in_i);

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      core_rst_o   <= '1;
      core_pause_o <= '0;
      up_core      <= '0;
      up_addr_o    <= '0;
      up_wdata_o   <= '0;
      up_we_o      <= 1'b0;
      up_req_o     <= '0;
      up_busy      <= 1'b0;
      irq_mask     <= 32'h1;
      ack_q        <= 1'b0;
      dat_q        <= '0;
    end else begin
      ack_q <= 1'b0;
      if (up_busy) begin
        // waiting for the Core Block's memory
        if (|(up_req_o & up_ack_i)) begin
          up_req_o  <= '0;
          up_busy   <= 1'b0;
          ack_q     <= 1'b1;
          dat_q     <= up_rdata_i[CW'(up_core)];
          up_addr_o <= up_addr_o + 32'd4;
        end
      end else if (req) begin
        dat_q <= '0;
        if (word == 6'h06) begin
          up_busy    <= 1'b1;
          up_we_o    <= wb_i.we;
          up_wdata_o <= wb_i.dat;
          up_req_o   <= N_CPUS'(1) << CW'(up_core);
        end else begin
          ack_q <= 1'b1;
          if (wb_i.we) begin
            unique case (word)
              6'h02: core_rst_o   <= wb_i.dat[N_CPUS-1:0];
              6'h03: core_pause_o <= wb_i.dat[N_CPUS-1:0];
              6'h04: up_core      <= 32'(wb_i.dat[CW-1:0]);
              6'h05: up_addr_o    <= wb_i.dat;
              6'h07: irq_mask     <= wb_i.dat;
              default: ;
            endcase
          end else begin
            unique case (word)
              6'h00: dat_q <= 32'h4D54_0100;
              6'h01: dat_q <= 32'(N_CPUS);
              6'h02: dat_q <= 32'(core_rst_o);
              6'h03: dat_q <= 32'(core_pause_o);
              6'h04: dat_q <= up_core;
              6'h05: dat_q <= up_addr_o;
              6'h07: dat_q <= irq_mask;
              6'h08: dat_q <= 32'(dbg_nonempty);
              6'h09: dat_q <= {30'h0, irq_in_i, irq_out_i};
              default:
                if (word >= 6'h10 && int'(word) - 16 < int'(N_CPUS))
                  dat_q <= dbg_empty[CW'(word - 6'h10)] ? 32'h0 : {23'h0, 1'b1, dbg_data[CW'(word - 6'h10)]};
            endcase
          end
        end
      end
    end
  end

  assign wb_o.ack = ack_q;
  assign wb_o.dat = dat_q;
endmodule
