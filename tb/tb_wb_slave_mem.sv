// Wishbone slave memory model for testbenches: 256 words, optional random
// wait states, counts the accesses it served.
module tb_wb_slave_mem
  import mt_pkg::*;
(
  input  logic    clk_i,
  input  logic    rand_wait_i,
  input  wb_m2s_t m_i,
  output wb_s2m_t s_o
);
  logic [31:0] mem [256];
  int          wait_cnt = 0;
  int          served = 0;
  initial s_o = WB_S2M_IDLE;
  initial for (int i = 0; i < 256; i++) mem[i] = 32'hA500_0000 + i;

  always @(posedge clk_i) begin
    s_o.ack <= 1'b0;
    if (m_i.cyc && m_i.stb && !s_o.ack) begin
      if (wait_cnt == 0 && rand_wait_i) wait_cnt = $urandom_range(0, 3) + 1;
      if (wait_cnt <= 1) begin
        wait_cnt = 0;
        s_o.ack <= 1'b1;
        served++;
        if (m_i.we) begin
          for (int i = 0; i < 4; i++)
            if (m_i.sel[i]) mem[m_i.adr[9:2]][8*i +: 8] <= m_i.dat[8*i +: 8];
        end else begin
          s_o.dat <= mem[m_i.adr[9:2]];
        end
      end else begin
        wait_cnt--;
      end
    end
  end
endmodule
