// Wishbone classic master for testbenches: call write() and read() by
// hierarchical reference. Each transfer raises cyc/stb, waits for ack and
// drops them after it; it also counts the cycles the transfer took.
module tb_wb_master
  import mt_pkg::*;
(
  input  logic    clk_i,
  output wb_m2s_t m_o,
  input  wb_s2m_t s_i
);
  int last_cycles;
  initial m_o = WB_M2S_IDLE;

  task automatic write(input logic [31:0] adr, input logic [31:0] dat, input logic [3:0] sel = 4'hF);
    @(posedge clk_i);
    m_o <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, sel: sel, adr: adr, dat: dat};
    last_cycles = 0;
    do begin @(posedge clk_i); last_cycles++; end while (!s_i.ack && last_cycles < 1000);
    m_o <= WB_M2S_IDLE;
  endtask

  task automatic read(input logic [31:0] adr, output logic [31:0] dat);
    @(posedge clk_i);
    m_o <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, sel: 4'hF, adr: adr, dat: 32'h0};
    last_cycles = 0;
    do begin @(posedge clk_i); last_cycles++; end while (!s_i.ack && last_cycles < 1000);
    dat = s_i.dat;
    m_o <= WB_M2S_IDLE;
  endtask
endmodule
