// Host port decoder. The host reaches everything through one Wishbone slave;
// this block routes each access by address:
//   0x0000_0000 .. 0x0000_FFFF  control and debug registers
//   0x0001_0000 .. 0x0001_FFFF  host side of the Host Message Queue
//   0x0010_0000 .. 0x001F_FFFF  shared memory, as a master on the Shared
//                               Interconnect (same atomic-operation encoding
//                               in address bits [18:16] as for the CPUs)
// Anything else is acknowledged with data 0. The routing is combinational
// (the host holds its request until ack); the default answer is registered.
// The document says the host reaches all features through one Wishbone slave
// and the shared memory with the same atomic operations; the map is this
// design's choice.
module mt_host_if
  import mt_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_n_i,
  input  wb_m2s_t host_i,
  output wb_s2m_t host_o,
  output wb_m2s_t ctrl_o,
  input  wb_s2m_t ctrl_i,
  output wb_m2s_t hmq_o,
  input  wb_s2m_t hmq_i,
  output wb_m2s_t si_o,
  input  wb_s2m_t si_i
);
  typedef enum logic [1:0] {T_CTRL, T_HMQ, T_SMEM, T_NONE} target_e;
  target_e tgt;
  logic    none_ack;

  always_comb begin
    if (host_i.adr[31:16] == HOST_CTRL_BASE[31:16])                 tgt = T_CTRL;
    else if (host_i.adr[31:16] == HOST_HMQ_BASE[31:16])             tgt = T_HMQ;
    else if (host_i.adr[31:20] == HOST_SMEM_BASE[31:20])            tgt = T_SMEM;
    else                                                            tgt = T_NONE;

    ctrl_o = host_i;
    hmq_o  = host_i;
    si_o   = host_i;
    ctrl_o.cyc = host_i.cyc && tgt == T_CTRL;
    ctrl_o.stb = host_i.stb && tgt == T_CTRL;
    hmq_o.cyc  = host_i.cyc && tgt == T_HMQ;
    hmq_o.stb  = host_i.stb && tgt == T_HMQ;
    si_o.cyc   = host_i.cyc && tgt == T_SMEM;
    si_o.stb   = host_i.stb && tgt == T_SMEM;
    si_o.adr   = SI_SMEM_BASE | {12'h000, host_i.adr[19:0]};

    unique case (tgt)
      T_CTRL:  host_o = ctrl_i;
      T_HMQ:   host_o = hmq_i;
      T_SMEM:  host_o = si_i;
      default: host_o = '{ack: none_ack, dat: '0};
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) none_ack <= 1'b0;
    else          none_ack <= host_i.cyc && host_i.stb && tgt == T_NONE && !none_ack;
  end
endmodule
