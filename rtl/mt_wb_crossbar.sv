// Wishbone crossbar: NM masters, NS slaves, classic single transfers.
// Each master's address is decoded against the slaves' (base, mask) pairs,
// the first match winning; a request that matches no slave is answered by an
// internal responder (ack, data 0) so that no master can hang. Every slave has
// its own round-robin arbiter: a grant is registered and covers one transfer
// (released on the slave's ack, or when the master drops cyc), so a master
// cannot keep a slave by holding cyc, and different masters reach different
// slaves in the same cycle. Grant latency is one cycle.
// Used as the Shared Interconnect (CPUs and host to shared memory, message
// queues and the shared peripheral port) and as the small crossbar inside each
// CPU Core Block. The document names a central multiport crossbar; the
// arbitration policy is this design's choice.
module mt_wb_crossbar
  import mt_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter int unsigned NS = 2,
  // slave s occupies bits [32*s +: 32]
  parameter logic [NS-1:0][31:0] SLV_BASE = {32'h8000_0000, 32'h0000_0000},
  parameter logic [NS-1:0][31:0] SLV_MASK = {32'h8000_0000, 32'h8000_0000}
) (
  input  logic    clk_i,
  input  logic    rst_n_i,
  input  wb_m2s_t m_i [NM],
  output wb_s2m_t m_o [NM],
  output wb_m2s_t s_o [NS],
  input  wb_s2m_t s_i [NS]
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [NS:0]  m_sel  [NM];     // one-hot target of each master; bit NS: no match
  logic         busy   [NS];
  logic [MW-1:0] grant [NS];
  logic [MW-1:0] last  [NS];
  logic         nomatch_ack [NM];

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      m_sel[m] = '0;
      for (int s = NS - 1; s >= 0; s--)
        if ((m_i[m].adr & SLV_MASK[s]) == SLV_BASE[s]) m_sel[m] = (NS+1)'(1) << s;
      if (m_sel[m] == '0) m_sel[m][NS] = 1'b1;
    end
  end

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      for (int s = 0; s < NS; s++) begin
        busy[s]  <= 1'b0;
        grant[s] <= '0;
        last[s]  <= MW'(NM - 1);
      end
      for (int m = 0; m < NM; m++) nomatch_ack[m] <= 1'b0;
    end else begin
      for (int s = 0; s < NS; s++) begin
        if (busy[s]) begin
          // one transfer per grant: released on ack, or if the master gives up
          if (!m_i[grant[s]].cyc || s_i[s].ack) busy[s] <= 1'b0;
        end else begin
          // round robin: first requester after the last one served
          for (int k = NM; k >= 1; k--) begin
            automatic int m = (int'(last[s]) + k) % NM;
            if (m_i[m].cyc && m_i[m].stb && m_sel[m][s]) begin
              busy[s]  <= 1'b1;
              grant[s] <= MW'(m);
              last[s]  <= MW'(m);
            end
          end
        end
      end
      for (int m = 0; m < NM; m++)
        nomatch_ack[m] <= m_i[m].cyc && m_i[m].stb && m_sel[m][NS] && !nomatch_ack[m];
    end
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_o[s] = WB_M2S_IDLE;
      if (busy[s]) begin
        s_o[s] = m_i[grant[s]];
        s_o[s].cyc = m_i[grant[s]].cyc && m_sel[grant[s]][s];
        s_o[s].stb = m_i[grant[s]].stb && m_sel[grant[s]][s];
      end
    end
    for (int m = 0; m < NM; m++) begin
      m_o[m] = WB_S2M_IDLE;
      if (nomatch_ack[m]) m_o[m].ack = 1'b1;
      for (int s = 0; s < NS; s++)
        if (busy[s] && grant[s] == MW'(m)) m_o[m] = s_i[s];
    end
  end
endmodule
