// uRV data-bus splitter and I/O bridge.
// The CPU's data port is shared between the private block RAM and a Wishbone
// master for peripherals. Accesses below IO_BASE go straight to the RAM, which
// answers one cycle later (the bridge generates the done strobe). Accesses at
// or above IO_BASE start a classic Wishbone cycle: cyc/stb and the request are
// registered and held until ack, and ack completes the CPU's load or store
// (any number of wait states). Interface: CPU side dm_*; RAM side ram_*
// (one-cycle read latency); Wishbone master wb_o/wb_i.
// The document states that peripherals are reached through a Wishbone master
// controlled by a bridge on the data bus; the address split and timing are
// this design's choice.
module urv_iobridge
  import mt_pkg::*;
#(
  parameter logic [31:0] IO_BASE = CPU_IO_BASE
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  // CPU data port
  input  logic [31:0] dm_addr_i,
  input  logic [31:0] dm_data_s_i,
  input  logic [3:0]  dm_data_select_i,
  input  logic        dm_load_i,
  input  logic        dm_store_i,
  output logic [31:0] dm_data_l_o,
  output logic        dm_load_done_o,
  output logic        dm_store_done_o,
  // private RAM
  output logic        ram_we_o,
  output logic        ram_re_o,
  output logic [3:0]  ram_sel_o,
  output logic [31:0] ram_addr_o,
  output logic [31:0] ram_wdata_o,
  input  logic [31:0] ram_rdata_i,
  // Wishbone master
  output wb_m2s_t     wb_o,
  input  wb_s2m_t     wb_i
);
  logic is_io;
  logic ram_ld_q, ram_st_q;
  wb_m2s_t wb_q;

  assign is_io       = (dm_addr_i >= IO_BASE);
  assign ram_we_o    = dm_store_i && !is_io;
  assign ram_re_o    = dm_load_i && !is_io;
  assign ram_sel_o   = dm_data_select_i;
  assign ram_addr_o  = dm_addr_i;
  assign ram_wdata_o = dm_data_s_i;
  assign wb_o        = wb_q;

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      ram_ld_q <= 1'b0;
      ram_st_q <= 1'b0;
      wb_q     <= WB_M2S_IDLE;
    end else begin
      ram_ld_q <= ram_re_o;
      ram_st_q <= ram_we_o;
      if (wb_q.cyc && !wb_i.ack) begin
        // cycle in progress: hold
      end else if ((dm_load_i || dm_store_i) && is_io) begin
        // the CPU may issue its next access in the cycle the previous one
        // is acknowledged; it starts back to back
        wb_q.cyc <= 1'b1;
        wb_q.stb <= 1'b1;
        wb_q.we  <= dm_store_i;
        wb_q.sel <= dm_data_select_i;
        wb_q.adr <= dm_addr_i;
        wb_q.dat <= dm_data_s_i;
      end else begin
        wb_q.cyc <= 1'b0;
        wb_q.stb <= 1'b0;
      end
    end
  end

  assign dm_data_l_o     = ram_ld_q ? ram_rdata_i : wb_i.dat;
  assign dm_load_done_o  = ram_ld_q || (wb_q.cyc && !wb_q.we && wb_i.ack);
  assign dm_store_done_o = ram_st_q || (wb_q.cyc && wb_q.we && wb_i.ack);

  // a CPU request never arrives while a Wishbone cycle is still waiting
  assert property (@(posedge clk_i) disable iff (!rst_n_i)
                   (wb_q.cyc && !wb_i.ack) |-> !(dm_load_i || dm_store_i));
endmodule
