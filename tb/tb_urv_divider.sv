// Testbench of the uRV divider: DIV, DIVU, REM, REMU on random and corner-case
// operands (division by zero, most negative by -1), checking each result and
// that done rises in the 37th cycle after the start, the document's figure.
`timescale 1ns/1ps
module tb_urv_divider;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ack, done;
  logic [31:0] a, b, q;
  logic [1:0] op;
  int checks = 0, failures = 0;
  urv_divider dut (.clk_i(clk), .rst_n_i(rst_n), .start_i(start), .ack_i(ack), .a_i(a), .b_i(b),
                   .op_i(op), .done_o(done), .q_o(q));

  function automatic logic [31:0] model(input logic [31:0] x, y, input logic [1:0] o);
    case (o)
      2'd0: return (y == 0) ? 32'hFFFF_FFFF : (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) ? x : 32'($signed(x) / $signed(y));
      2'd1: return (y == 0) ? 32'hFFFF_FFFF : x / y;
      2'd2: return (y == 0) ? x : (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) ? 0 : 32'($signed(x) % $signed(y));
      default: return (y == 0) ? x : x % y;
    endcase
  endfunction

  initial begin
    int cyc;
    logic [31:0] exp;
    start = 0; ack = 0; a = 0; b = 0; op = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      a = $urandom; b = $urandom >> $urandom_range(0, 31); op = 2'($urandom);
      if (n < 8) begin a = 32'h8000_0000; b = (n < 4) ? 32'hFFFF_FFFF : 0; op = 2'(n); end
      if (n >= 8 && n < 12) begin a = -32'd7; b = 32'd2; op = 2'(n); end
      exp = model(a, b, op);
      #1 start = 1; cyc = 0;
      while (!done) begin @(posedge clk); #1; cyc++; if (cyc > 100) break; end
      // done is high now, in cycle number cyc counted from the start cycle 0
      checks += 2;
      if (q !== exp) begin failures++; if (failures < 10) $display("FAIL %h op%0d %h: %h exp %h", a, op, b, q, exp); end
      if (cyc + 1 != 37) begin failures++; if (failures < 10) $display("FAIL latency %0d", cyc + 1); end
      ack = 1; @(posedge clk); #1; ack = 0; start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
