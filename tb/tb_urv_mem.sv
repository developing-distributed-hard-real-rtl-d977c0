// Dual-port memory model for the CPU testbench: instruction port with one
// cycle of latency, data port with one cycle plus optional random wait states.
module tb_urv_mem #(
  parameter int WORDS = 4096
) (
  input  logic        clk_i,
  input  logic        rand_wait_i,
  input  logic [31:0] im_addr_i,
  input  logic        im_rd_i,
  output logic [31:0] im_data_o,
  output logic        im_valid_o,
  input  logic [31:0] dm_addr_i,
  input  logic [31:0] dm_data_s_i,
  input  logic [3:0]  dm_sel_i,
  input  logic        dm_load_i,
  input  logic        dm_store_i,
  output logic [31:0] dm_data_l_o,
  output logic        dm_load_done_o,
  output logic        dm_store_done_o
);
  logic [31:0] mem [WORDS];
  logic        pend_ld, pend_st;
  logic [31:0] pend_addr;
  int          wait_cnt;

  always_ff @(posedge clk_i) begin
    im_data_o  <= mem[im_addr_i[$clog2(WORDS)+1:2]];
    im_valid_o <= im_rd_i && (!rand_wait_i || ($urandom_range(0, 3) != 0));
  end

  always_ff @(posedge clk_i) begin
    dm_load_done_o  <= 1'b0;
    dm_store_done_o <= 1'b0;
    if (dm_store_i) begin
      for (int i = 0; i < 4; i++)
        if (dm_sel_i[i]) mem[dm_addr_i[$clog2(WORDS)+1:2]][8*i +: 8] <= dm_data_s_i[8*i +: 8];
    end
    if (dm_load_i || dm_store_i) begin
      wait_cnt = rand_wait_i ? int'($urandom_range(0, 3)) : 0;
      if (wait_cnt == 0) begin
        dm_data_l_o     <= mem[dm_addr_i[$clog2(WORDS)+1:2]];
        dm_load_done_o  <= dm_load_i;
        dm_store_done_o <= dm_store_i;
      end else begin
        pend_ld   <= dm_load_i;
        pend_st   <= dm_store_i;
        pend_addr <= dm_addr_i;
      end
    end else if (pend_ld || pend_st) begin
      if (wait_cnt <= 1) begin
        dm_data_l_o     <= mem[pend_addr[$clog2(WORDS)+1:2]];
        dm_load_done_o  <= pend_ld;
        dm_store_done_o <= pend_st;
        pend_ld <= 1'b0;
        pend_st <= 1'b0;
      end
      wait_cnt = wait_cnt - 1;
    end
  end

  initial begin
    pend_ld = 1'b0;
    pend_st = 1'b0;
  end
endmodule
