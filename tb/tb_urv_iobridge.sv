// Testbench of the uRV data-bus splitter and I/O bridge: RAM accesses
// complete one cycle after the request; accesses at or above 0x8000_0000 run
// a Wishbone cycle (slave model with random wait states) and complete on ack
// with the slave's data; stores reach the slave with their byte selects.
`timescale 1ns/1ps
module tb_urv_iobridge;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] addr, wdata, rdata, ram_addr, ram_wdata, ram_rdata;
  logic [3:0] sel, ram_sel;
  logic ld, st, ld_done, st_done, ram_we, ram_re;
  wb_m2s_t wb_m; wb_s2m_t wb_s;
  int checks = 0, failures = 0;

  urv_iobridge dut (.clk_i(clk), .rst_n_i(rst_n), .dm_addr_i(addr), .dm_data_s_i(wdata),
    .dm_data_select_i(sel), .dm_load_i(ld), .dm_store_i(st), .dm_data_l_o(rdata),
    .dm_load_done_o(ld_done), .dm_store_done_o(st_done), .ram_we_o(ram_we), .ram_re_o(ram_re),
    .ram_sel_o(ram_sel), .ram_addr_o(ram_addr), .ram_wdata_o(ram_wdata), .ram_rdata_i(ram_rdata),
    .wb_o(wb_m), .wb_i(wb_s));
  tb_wb_slave_mem slv (.clk_i(clk), .rand_wait_i(1'b1), .m_i(wb_m), .s_o(wb_s));
  mt_cpu_mem #(.SIZE_BYTES(1024)) ram (.clk_i(clk), .a_addr_i(32'h0), .a_rdata_o(),
    .b_we_i(ram_we), .b_sel_i(ram_sel), .b_addr_i(ram_addr), .b_wdata_i(ram_wdata), .b_rdata_o(ram_rdata));

  task automatic access(input bit is_st, input logic [31:0] a, d, input logic [3:0] s,
                        output logic [31:0] q, output int lat);
    addr = a; wdata = d; sel = s; ld = !is_st; st = is_st;
    @(posedge clk); #1 ld = 0; st = 0; lat = 1;
    while (!(ld_done || st_done)) begin @(posedge clk); #1 lat++; end
    q = rdata;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] q; int lat; logic [31:0] model [256];
    ld = 0; st = 0; addr = 0; wdata = 0; sel = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 256; i++) model[i] = 32'hA500_0000 + i;
    @(posedge clk); #1 for (int i = 0; i < 256; i++) slv.mem[i] = model[i];  // after reset
    for (int n = 0; n < 300; n++) begin
      automatic bit io = $urandom_range(0, 1);
      automatic bit is_st = $urandom_range(0, 1);
      automatic logic [7:0] w = 8'($urandom);
      automatic logic [31:0] a = io ? (32'h8000_0000 | {22'h0, w, 2'b00}) : {22'h0, w, 2'b00};
      automatic logic [31:0] d = $urandom;
      access(is_st, a, d, 4'hF, q, lat);
      checks++;
      if (!io && lat != 1) begin failures++; $display("FAIL ram latency %0d", lat); end
      if (io && is_st) model[w] = d;
      if (io && !is_st) begin
        checks++;
        if (q !== model[w]) begin failures++; $display("FAIL io read %h exp %h", q, model[w]); end
      end
    end
    // RAM store then load
    access(1, 32'h40, 32'h1122_3344, 4'hF, q, lat);
    access(1, 32'h40, 32'hAA00_0000, 4'h8, q, lat);
    access(0, 32'h40, 0, 4'hF, q, lat);
    checks++; if (q !== 32'hAA22_3344) begin failures++; $display("FAIL ram %h", q); end
    checks++; if (slv.served < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
