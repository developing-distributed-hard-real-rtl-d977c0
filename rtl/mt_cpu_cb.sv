// CPU Core Block (CB): one uRV CPU with everything private to it.
// Contents: the CPU, its private dual-port program/data memory (instruction
// port and data port), the I/O bridge that turns data accesses at or above
// 0x8000_0000 into Wishbone cycles, a small crossbar that routes them to the
// local registers (0x8xxx_xxxx), the Dedicated Peripheral master port
// (0x9xxx_xxxx) or the Shared Interconnect (0xA000_0000 and above), and the
// local registers/timing unit. The host reaches the private memory through
// the up_* port (program upload and dump), which borrows the memory's data
// port in any cycle the CPU does not use it; the access is answered with
// up_ack_o one cycle after it is made. core_rst_i holds the CPU in reset and
// core_pause_i stops it fetching: the pipeline drains and waits.
// The block's contents and its three crossbar ports follow the document; the
// address map and the way pause and upload are done are this design's.
// The CPUs of this core do not use interrupts (requests are polled), so the
// CPU's interrupt input is held low.
module mt_cpu_cb
  import mt_pkg::*;
#(
  parameter int unsigned CORE_ID        = 0,
  parameter int unsigned N_CPUS         = 8,
  parameter int unsigned MEM_SIZE       = 65536,
  parameter int unsigned CYCLES_PER_SEC = 125_000_000,
  parameter bit          WITH_DIVIDER   = 1'b1
) (
  input  logic        clk_i,
  input  logic        rst_n_i,
  input  logic        core_rst_i,
  input  logic        core_pause_i,
  // private memory access from the control logic
  input  logic        up_req_i,
  input  logic        up_we_i,
  input  logic [31:0] up_addr_i,
  input  logic [31:0] up_wdata_i,
  output logic        up_ack_o,
  output logic [31:0] up_rdata_o,
  // Wishbone masters
  output wb_m2s_t     dp_o,
  input  wb_s2m_t     dp_i,
  output wb_m2s_t     si_o,
  input  wb_s2m_t     si_i,
  // time and queue status
  input  logic        wr_time_valid_i,
  input  logic [31:0] wr_tai_sec_i,
  input  logic [27:0] wr_tai_cycles_i,
  input  logic [7:0]  hmq_in_i,
  input  logic [7:0]  rmq_in_i,
  input  logic [7:0]  hmq_out_full_i,
  input  logic [7:0]  rmq_out_full_i,
  // debug console
  output logic        dbg_valid_o,
  output logic [7:0]  dbg_char_o
);
  logic        cpu_rst_n;
  logic [31:0] im_addr, im_data, dm_addr, dm_data_s, dm_data_l;
  logic        im_rd, im_valid, dm_load, dm_store, dm_load_done, dm_store_done;
  logic [3:0]  dm_sel;
  logic        ram_we, ram_re;
  logic [3:0]  ram_sel;
  logic [31:0] ram_addr, ram_wdata, ram_rdata;
  logic        up_go, up_pend;
  wb_m2s_t     io_m [1];
  wb_s2m_t     io_s [1];
  wb_m2s_t     xs_o [3];
  wb_s2m_t     xs_i [3];

  assign cpu_rst_n = rst_n_i && !core_rst_i;

  urv_cpu #(.WITH_DIVIDER(WITH_DIVIDER)) u_cpu (
    .clk_i(clk_i), .rst_n_i(cpu_rst_n), .irq_i(1'b0), .time_i({4'h0, wr_tai_cycles_i}),
    .im_addr_o(im_addr), .im_rd_o(im_rd), .im_data_i(im_data), .im_valid_i(im_valid),
    .dm_addr_o(dm_addr), .dm_data_s_o(dm_data_s), .dm_data_select_o(dm_sel),
    .dm_load_o(dm_load), .dm_store_o(dm_store), .dm_data_l_i(dm_data_l),
    .dm_load_done_i(dm_load_done), .dm_store_done_i(dm_store_done));

  always_ff @(posedge clk_i) begin
    if (!cpu_rst_n) im_valid <= 1'b0;
    else            im_valid <= im_rd && !core_pause_i;
  end

  urv_iobridge u_bridge (
    .clk_i(clk_i), .rst_n_i(cpu_rst_n),
    .dm_addr_i(dm_addr), .dm_data_s_i(dm_data_s), .dm_data_select_i(dm_sel),
    .dm_load_i(dm_load), .dm_store_i(dm_store), .dm_data_l_o(dm_data_l),
    .dm_load_done_o(dm_load_done), .dm_store_done_o(dm_store_done),
    .ram_we_o(ram_we), .ram_re_o(ram_re), .ram_sel_o(ram_sel), .ram_addr_o(ram_addr),
    .ram_wdata_o(ram_wdata), .ram_rdata_i(ram_rdata),
    .wb_o(io_m[0]), .wb_i(io_s[0]));

  // host access takes the data port when the CPU leaves it free
  assign up_go = up_req_i && !up_pend && !up_ack_o && !(ram_we || ram_re);

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      up_pend  <= 1'b0;
      up_ack_o <= 1'b0;
    end else begin
      up_pend  <= up_go;
      up_ack_o <= up_pend;
    end
  end

  logic [31:0] mem_b_rdata, up_rdata_q;
  always_ff @(posedge clk_i) if (up_pend) up_rdata_q <= mem_b_rdata;
  assign up_rdata_o = up_rdata_q;
  assign ram_rdata  = mem_b_rdata;

  mt_cpu_mem #(.SIZE_BYTES(MEM_SIZE)) u_mem (
    .clk_i(clk_i),
    .a_addr_i(im_addr), .a_rdata_o(im_data),
    .b_we_i   (up_go ? up_we_i : ram_we),
    .b_sel_i  (up_go ? 4'hF : ram_sel),
    .b_addr_i (up_go ? up_addr_i : ram_addr),
    .b_wdata_i(up_go ? up_wdata_i : ram_wdata),
    .b_rdata_o(mem_b_rdata));

  mt_wb_crossbar #(
    .NM(1), .NS(3),
    .SLV_BASE({CB_SI_BASE & CB_SI_MASK, CB_DP_BASE, CB_LREGS_BASE}),
    .SLV_MASK({CB_SI_MASK, CB_DP_MASK, CB_LREGS_MASK})
  ) u_xbar (
    .clk_i(clk_i), .rst_n_i(cpu_rst_n), .m_i(io_m), .m_o(io_s), .s_o(xs_o), .s_i(xs_i));

  mt_local_regs #(.CORE_ID(CORE_ID), .N_CPUS(N_CPUS), .CYCLES_PER_SEC(CYCLES_PER_SEC)) u_lregs (
    .clk_i(clk_i), .rst_n_i(rst_n_i), .wb_i(xs_o[0]), .wb_o(xs_i[0]),
    .wr_time_valid_i(wr_time_valid_i), .wr_tai_sec_i(wr_tai_sec_i), .wr_tai_cycles_i(wr_tai_cycles_i),
    .hmq_in_i(hmq_in_i), .rmq_in_i(rmq_in_i), .hmq_out_full_i(hmq_out_full_i), .rmq_out_full_i(rmq_out_full_i),
    .dbg_valid_o(dbg_valid_o), .dbg_char_o(dbg_char_o));

  assign dp_o    = xs_o[1];
  assign xs_i[1] = dp_i;
  assign si_o    = xs_o[2];
  assign xs_i[2] = si_i;
endmodule
