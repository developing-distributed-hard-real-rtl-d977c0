// Testbench of the uRV CSR unit: read/write of each implemented CSR, the
// illegal flag for unknown addresses, trap entry (mepc, mcause, MIE cleared,
// MPIE saved), MRET, the interrupt-pending logic and the cycle counter.
`timescale 1ns/1ps
module tb_urv_csr;
  import urv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic irq, we, trap, trap_irq, mret, illegal, pend;
  logic [11:0] addr;
  logic [31:0] wdata, rdata, mtvec, mepc, trap_pc;
  logic [3:0] cause;
  int checks = 0, failures = 0;
  urv_csr dut (.clk_i(clk), .rst_n_i(rst_n), .irq_i(irq), .time_i(32'h1234), .addr_i(addr),
    .rdata_o(rdata), .illegal_o(illegal), .we_i(we), .wdata_i(wdata), .trap_i(trap),
    .trap_irq_i(trap_irq), .trap_cause_i(cause), .trap_pc_i(trap_pc), .mret_i(mret),
    .mtvec_o(mtvec), .mepc_o(mepc), .irq_pending_o(pend));

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    addr = a; wdata = d; we = 1; @(posedge clk); #1; we = 0;
  endtask
  initial begin
    logic [31:0] c0;
    irq = 0; we = 0; trap = 0; trap_irq = 0; mret = 0; addr = 0; wdata = 0; cause = 0; trap_pc = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    wr(CSR_MSCRATCH, 32'hDEAD_BEEF); addr = CSR_MSCRATCH; #1 chk(rdata, 32'hDEAD_BEEF, "mscratch");
    wr(CSR_MTVEC, 32'h0000_0403);    addr = CSR_MTVEC; #1 chk(rdata, 32'h400, "mtvec"); chk(mtvec, 32'h400, "mtvec_o");
    addr = 12'h7C0; #1 chk(32'(illegal), 1, "illegal");
    addr = CSR_TIME; #1 chk(rdata, 32'h1234, "time"); chk(32'(illegal), 0, "legal");
    addr = CSR_CYCLE; #1 c0 = rdata; repeat (5) @(posedge clk); #1 chk(rdata - c0, 5, "cycle");
    wr(CSR_MIE, 32'h800); wr(CSR_MSTATUS, 32'h8);
    irq = 1; #1 chk(32'(pend), 1, "pending");
    trap = 1; trap_irq = 1; cause = CAUSE_EXT_IRQ; trap_pc = 32'h120; @(posedge clk); #1 trap = 0; trap_irq = 0;
    chk(mepc, 32'h120, "mepc"); addr = CSR_MCAUSE; #1 chk(rdata, 32'h8000_000B, "mcause");
    addr = CSR_MSTATUS; #1 chk(rdata, 32'h80, "mstatus after trap"); chk(32'(pend), 0, "masked");
    mret = 1; @(posedge clk); #1 mret = 0;
    addr = CSR_MSTATUS; #1 chk(rdata, 32'h88, "mstatus after mret"); chk(32'(pend), 1, "pending again");
    irq = 0; trap = 1; cause = CAUSE_ILLEGAL; trap_pc = 32'h40; @(posedge clk); #1 trap = 0;
    addr = CSR_MCAUSE; #1 chk(rdata, 32'h2, "mcause exc"); chk(mepc, 32'h40, "mepc exc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
