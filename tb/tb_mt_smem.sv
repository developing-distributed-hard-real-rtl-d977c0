// Testbench of the shared memory: direct reads and byte-masked writes and the
// six atomic operations (add, subtract, set, clear, flip by write;
// test-and-set by read), selected by address bits [18:16], against a model.
`timescale 1ns/1ps
module tb_mt_smem;
  import mt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  wb_m2s_t m; wb_s2m_t s;
  int checks = 0, failures = 0;
  int op_seen [7];
  logic [31:0] model [64];
  mt_smem #(.SIZE_BYTES(256)) dut (.clk_i(clk), .rst_n_i(rst_n), .wb_i(m), .wb_o(s));
  tb_wb_master u (.clk_i(clk), .m_o(m), .s_i(s));
  initial begin
    logic [31:0] q;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin model[i] = $urandom; u.write(32'(i * 4), model[i]); end
    for (int n = 0; n < 1500; n++) begin
      automatic int w = $urandom_range(0, 63);
      automatic int op = $urandom_range(0, 6);
      automatic bit we = $urandom_range(0, 1);
      automatic logic [31:0] d = $urandom;
      automatic logic [31:0] a = {13'h0, 3'(op), 8'h0, 6'(w), 2'b00};
      if (op == 5 || op == 4) d = 32'(1) << $urandom_range(0, 31);
      if (we) begin
        automatic logic [3:0] sel = (op == 0) ? 4'($urandom) : 4'hF;
        u.write(a, d, sel);
        case (op)
          0: for (int i = 0; i < 4; i++) if (sel[i]) model[w][8*i +: 8] = d[8*i +: 8];
          1: model[w] = model[w] + d;
          3: model[w] = model[w] - d;
          4: model[w] = model[w] | d;
          5: model[w] = model[w] & ~d;
          6: model[w] = model[w] ^ d;
          default: ;
        endcase
      end else begin
        u.read(a, q);
        checks++;
        if (q !== model[w]) begin failures++; if (failures < 10) $display("FAIL op%0d w%0d %h exp %h", op, w, q, model[w]); end
        if (op == 2) model[w] = 1;
      end
      op_seen[op]++;
    end
    for (int i = 0; i < 64; i++) begin
      u.read(32'(i * 4), q); checks++;
      if (q !== model[i]) failures++;
    end
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
