// Testbench of the Wishbone crossbar: three masters issue random reads and
// writes concurrently to two slave memories (random wait states) and to an
// unmapped address; every read must return the value last written at that
// address, unmapped accesses must be answered, and both contention on one
// slave and parallel service of two slaves must occur.
`timescale 1ns/1ps
module tb_mt_wb_crossbar;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wb_m2s_t m_i [3]; wb_s2m_t m_o [3]; wb_m2s_t s_o [2]; wb_s2m_t s_i [2];
  int checks = 0, failures = 0, contention = 0, parallel = 0;
  logic [31:0] model [2][256];

  mt_wb_crossbar #(.NM(3), .NS(2), .SLV_BASE({32'h2000_0000, 32'h1000_0000}),
                   .SLV_MASK({32'hF000_0000, 32'hF000_0000})) dut (
    .clk_i(clk), .rst_n_i(rst_n), .m_i(m_i), .m_o(m_o), .s_o(s_o), .s_i(s_i));
  for (genvar i = 0; i < 3; i++) begin : g_m
    tb_wb_master u (.clk_i(clk), .m_o(m_i[i]), .s_i(m_o[i]));
  end
  tb_wb_slave_mem s0 (.clk_i(clk), .rand_wait_i(1'b1), .m_i(s_o[0]), .s_o(s_i[0]));
  tb_wb_slave_mem s1 (.clk_i(clk), .rand_wait_i(1'b1), .m_i(s_o[1]), .s_o(s_i[1]));

  always @(posedge clk) begin
    int req0 = 0;
    for (int m = 0; m < 3; m++) if (m_i[m].cyc && m_i[m].adr[31:28] == 4'h1) req0++;
    if (req0 > 1) contention++;
    if (s_o[0].stb && s_o[1].stb) parallel++;
  end

  // each master owns a word range so that the expected value is known
  task automatic run_master(input int m);
    logic [31:0] q;
    for (int n = 0; n < 150; n++) begin
      automatic int sl = $urandom_range(0, 2);
      automatic int w  = m * 64 + $urandom_range(0, 63);
      automatic logic [31:0] a = (sl == 2) ? 32'h5000_0000 : (32'h1000_0000 + 32'(sl) * 32'h1000_0000 + 32'(w * 4));
      if ($urandom_range(0, 1) && sl != 2) begin
        automatic logic [31:0] d = $urandom;
        case (m)
          0: g_m[0].u.write(a, d); 1: g_m[1].u.write(a, d); default: g_m[2].u.write(a, d);
        endcase
        model[sl][w] = d;
      end else begin
        case (m)
          0: g_m[0].u.read(a, q); 1: g_m[1].u.read(a, q); default: g_m[2].u.read(a, q);
        endcase
        checks++;
        if (sl == 2) begin if (q !== 0) failures++; end
        else if (q !== model[sl][w]) begin
          failures++; if (failures < 10) $display("FAIL m%0d s%0d w%0d %h exp %h", m, sl, w, q, model[sl][w]);
        end
      end
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) for (int i = 0; i < 256; i++) model[s][i] = 32'hA500_0000 + i;
    repeat (2) @(posedge clk); rst_n = 1;
    fork run_master(0); run_master(1); run_master(2); join
    checks += 2;
    if (contention == 0) begin failures++; $display("FAIL no contention"); end
    if (parallel == 0)   begin failures++; $display("FAIL no parallel service"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
