// Mock Turtle core: a deterministic multi-CPU system for distributed hard
// real-time control, to be embedded in an FPGA design.
// N_CPUS CPU Core Blocks (each a uRV RV32IM CPU with private memory, local
// registers and a Dedicated Peripheral Wishbone master) share, through the
// Shared Interconnect crossbar, an atomic Shared Memory, the CPU side of the
// Host Message Queue and of the Remote Message Queue, and a Shared Peripheral
// Wishbone master. The host sees one Wishbone slave (control/debug
// registers, the host side of the HMQ, and the shared memory) and one
// interrupt line. The RMQ's network side and the White Rabbit time are ports,
// for a transport core and a White Rabbit PTP core outside this design.
// CPU address map: 0x0000_0000 private memory; 0x8000_0000 local registers;
// 0x9000_0000 Dedicated Peripheral; 0xA000_0000 shared memory (atomic
// operation in bits [18:16]); 0xA010_0000 HMQ; 0xA020_0000 RMQ; 0xC000_0000
// and above Shared Peripheral. Host map: 0x0000_0000 control registers;
// 0x0001_0000 HMQ; 0x0010_0000 shared memory.
// The RMQ is optional, as in the document (WITH_RMQ): without it the RMQ
// window answers reads with 0 and ignores writes, and nothing is transmitted.
// The block structure follows the document; the sizes it leaves to the user
// (memories, slots) get defaults of this design's choosing, as do the maps.
module mock_turtle_core
  import mt_pkg::*;
#(
  parameter int unsigned N_CPUS          = 8,
  parameter int unsigned MEM_SIZE        = 65536,
  parameter int unsigned SMEM_SIZE       = 16384,
  parameter int unsigned HMQ_N_OUT       = 2,
  parameter int unsigned HMQ_N_IN        = 2,
  parameter int unsigned RMQ_N_OUT       = 2,
  parameter int unsigned RMQ_N_IN        = 2,
  parameter int unsigned MQ_ENTRIES_LOG2 = 2,
  parameter int unsigned MQ_WORDS_LOG2   = 7,
  parameter int unsigned CYCLES_PER_SEC  = 125_000_000,
  parameter bit          WITH_DIVIDER    = 1'b1,
  parameter bit          WITH_RMQ        = 1'b1
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  // host
  input  wb_m2s_t     host_i,
  output wb_s2m_t     host_o,
  output logic        host_irq_o,
  // application-specific cores
  output wb_m2s_t     dp_o [N_CPUS],
  input  wb_s2m_t     dp_i [N_CPUS],
  output wb_m2s_t     sp_o,
  input  wb_s2m_t     sp_i,
  // White Rabbit time
  input  logic        wr_time_valid_i,
  input  logic [31:0] wr_tai_sec_i,
  input  logic [27:0] wr_tai_cycles_i,
  // remote message queue, network side
  output logic        rmq_tx_valid_o,
  input  logic        rmq_tx_ready_i,
  output logic [31:0] rmq_tx_data_o,
  output logic        rmq_tx_last_o,
  output logic [2:0]  rmq_tx_slot_o,
  input  logic        rmq_rx_valid_i,
  input  logic [31:0] rmq_rx_data_i,
  input  logic        rmq_rx_last_i,
  input  logic        rmq_rx_error_i,
  input  logic [2:0]  rmq_rx_slot_i
);
  localparam int unsigned NM = N_CPUS + 1;   // CPUs, then the host

  wb_m2s_t si_m_i [NM];
  wb_s2m_t si_m_o [NM];
  wb_m2s_t si_s_o [4];
  wb_s2m_t si_s_i [4];

  wb_m2s_t ctrl_m, hmq_host_m;
  wb_s2m_t ctrl_s, hmq_host_s;

  logic [N_CPUS-1:0] core_rst, core_pause, up_req, up_ack, dbg_valid;
  logic              up_we, irq_out, irq_in;
  logic [31:0]       up_addr, up_wdata;
  logic [31:0]       up_rdata [N_CPUS];
  logic [7:0]        dbg_char [N_CPUS];
  logic [HMQ_N_IN-1:0]  hmq_in;
  logic [HMQ_N_OUT-1:0] hmq_full;
  logic [RMQ_N_IN-1:0]  rmq_in;
  logic [RMQ_N_OUT-1:0] rmq_full;

  // ------------------------------------------------------------ core blocks
  for (genvar c = 0; c < N_CPUS; c++) begin : g_cb
    mt_cpu_cb #(.CORE_ID(c), .N_CPUS(N_CPUS), .MEM_SIZE(MEM_SIZE),
                .CYCLES_PER_SEC(CYCLES_PER_SEC), .WITH_DIVIDER(WITH_DIVIDER)) u_cb (
      .clk_i(clk_i), .rst_n_i(rst_n_i),
      .core_rst_i(core_rst[c]), .core_pause_i(core_pause[c]),
      .up_req_i(up_req[c]), .up_we_i(up_we), .up_addr_i(up_addr), .up_wdata_i(up_wdata),
      .up_ack_o(up_ack[c]), .up_rdata_o(up_rdata[c]),
      .dp_o(dp_o[c]), .dp_i(dp_i[c]), .si_o(si_m_i[c]), .si_i(si_m_o[c]),
      .wr_time_valid_i(wr_time_valid_i), .wr_tai_sec_i(wr_tai_sec_i), .wr_tai_cycles_i(wr_tai_cycles_i),
      .hmq_in_i(8'(hmq_in)), .rmq_in_i(8'(rmq_in)), .hmq_out_full_i(8'(hmq_full)), .rmq_out_full_i(8'(rmq_full)),
      .dbg_valid_o(dbg_valid[c]), .dbg_char_o(dbg_char[c]));
  end

  // ---------------------------------------------------- shared interconnect
  mt_wb_crossbar #(
    .NM(NM), .NS(4),
    .SLV_BASE({SI_SP_BASE, SI_RMQ_BASE, SI_HMQ_BASE, SI_SMEM_BASE}),
    .SLV_MASK({SI_SP_MASK, SI_RMQ_MASK, SI_HMQ_MASK, SI_SMEM_MASK})
  ) u_si (
    .clk_i(clk_i), .rst_n_i(rst_n_i), .m_i(si_m_i), .m_o(si_m_o), .s_o(si_s_o), .s_i(si_s_i));

  mt_smem #(.SIZE_BYTES(SMEM_SIZE)) u_smem (
    .clk_i(clk_i), .rst_n_i(rst_n_i), .wb_i(si_s_o[0]), .wb_o(si_s_i[0]));

  mt_hmq #(.N_OUT(HMQ_N_OUT), .N_IN(HMQ_N_IN),
           .ENTRIES_LOG2(MQ_ENTRIES_LOG2), .WORDS_LOG2(MQ_WORDS_LOG2)) u_hmq (
    .clk_i(clk_i), .rst_n_i(rst_n_i),
    .cpu_wb_i(si_s_o[1]), .cpu_wb_o(si_s_i[1]),
    .host_wb_i(hmq_host_m), .host_wb_o(hmq_host_s),
    .in_pending_o(hmq_in), .out_full_o(hmq_full), .irq_out_o(irq_out), .irq_in_o(irq_in));

  if (WITH_RMQ) begin : g_rmq
    mt_rmq #(.N_OUT(RMQ_N_OUT), .N_IN(RMQ_N_IN),
             .ENTRIES_LOG2(MQ_ENTRIES_LOG2), .WORDS_LOG2(MQ_WORDS_LOG2)) u_rmq (
      .clk_i(clk_i), .rst_n_i(rst_n_i),
      .cpu_wb_i(si_s_o[2]), .cpu_wb_o(si_s_i[2]),
      .tx_valid_o(rmq_tx_valid_o), .tx_ready_i(rmq_tx_ready_i), .tx_data_o(rmq_tx_data_o),
      .tx_last_o(rmq_tx_last_o), .tx_slot_o(rmq_tx_slot_o),
      .rx_valid_i(rmq_rx_valid_i), .rx_data_i(rmq_rx_data_i), .rx_last_i(rmq_rx_last_i),
      .rx_error_i(rmq_rx_error_i), .rx_slot_i(rmq_rx_slot_i),
      .in_pending_o(rmq_in), .out_full_o(rmq_full));
  end else begin : g_no_rmq
    // no RMQ: its window answers every access with data 0, nothing is sent
    logic ack_q;
    always_ff @(posedge clk_i) begin
      if (!rst_n_i) ack_q <= 1'b0;
      else          ack_q <= si_s_o[2].cyc && si_s_o[2].stb && !ack_q;
    end
    assign si_s_i[2]      = '{ack: ack_q, dat: '0};
    assign rmq_in         = '0;
    assign rmq_full       = '0;
    assign rmq_tx_valid_o = 1'b0;
    assign rmq_tx_data_o  = '0;
    assign rmq_tx_last_o  = 1'b0;
    assign rmq_tx_slot_o  = '0;
  end

  assign sp_o      = si_s_o[3];
  assign si_s_i[3] = sp_i;

  // ------------------------------------------------------------------ host
  mt_host_if u_host (
    .clk_i(clk_i), .rst_n_i(rst_n_i), .host_i(host_i), .host_o(host_o),
    .ctrl_o(ctrl_m), .ctrl_i(ctrl_s), .hmq_o(hmq_host_m), .hmq_i(hmq_host_s),
    .si_o(si_m_i[N_CPUS]), .si_i(si_m_o[N_CPUS]));

  mt_ctrl_regs #(.N_CPUS(N_CPUS)) u_ctrl (
    .clk_i(clk_i), .rst_n_i(rst_n_i), .wb_i(ctrl_m), .wb_o(ctrl_s),
    .core_rst_o(core_rst), .core_pause_o(core_pause),
    .up_req_o(up_req), .up_we_o(up_we), .up_addr_o(up_addr), .up_wdata_o(up_wdata),
    .up_ack_i(up_ack), .up_rdata_i(up_rdata),
    .dbg_valid_i(dbg_valid), .dbg_char_i(dbg_char),
    .irq_out_i(irq_out), .irq_in_i(irq_in), .host_irq_o(host_irq_o));
endmodule
