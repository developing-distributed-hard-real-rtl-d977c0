// uRV control and status registers, exception and interrupt state.
// Implements the machine-mode CSRs a bare-metal, single-task program needs:
// mstatus (MIE, MPIE only), mie and mip (a single external interrupt bit,
// bit 11: the reduced interrupt layout), mtvec, mscratch, mepc, mcause, a
// 32-bit cycle counter (cycle/mcycle) and the time input (time). Reads are
// combinational in X1; CSR writes, exception entry and MRET take effect at the
// edge where the instruction leaves X1. An unknown CSR address is reported as
// illegal so that the pipeline raises an illegal-instruction exception.
// The document says only that CSRs, an interrupt with a simplified layout and a
// limited set of exceptions exist; which CSRs and bits are kept is this
// design's choice.
module urv_csr
  import urv_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_n_i,
  input  logic        irq_i,
  input  logic [31:0] time_i,
  // read (combinational)
  input  logic [11:0] addr_i,
  output logic [31:0] rdata_o,
  output logic        illegal_o,
  // write
  input  logic        we_i,
  input  logic [31:0] wdata_i,
  // trap entry / return
  input  logic        trap_i,
  input  logic        trap_irq_i,
  input  logic [3:0]  trap_cause_i,
  input  logic [31:0] trap_pc_i,
  input  logic        mret_i,
  output logic [31:0] mtvec_o,
  output logic [31:0] mepc_o,
  output logic        irq_pending_o
);
  logic        mie_bit, mpie_bit, meie;
  logic [31:0] mtvec, mscratch, mepc, mcycle;
  logic        mcause_irq;
  logic [3:0]  mcause_code;

  assign mtvec_o       = mtvec;
  assign mepc_o        = mepc;
  assign irq_pending_o = mie_bit && meie && irq_i;

  always_comb begin
    illegal_o = 1'b0;
    rdata_o   = '0;
    unique case (addr_i)
      CSR_MSTATUS:             rdata_o = 32'({mpie_bit, 3'b000, mie_bit, 3'b000});
      CSR_MIE:                 rdata_o = 32'({meie, 11'h000});
      CSR_MIP:                 rdata_o = 32'({irq_i, 11'h000});
      CSR_MTVEC:               rdata_o = mtvec;
      CSR_MSCRATCH:            rdata_o = mscratch;
      CSR_MEPC:                rdata_o = mepc;
      CSR_MCAUSE:              rdata_o = {mcause_irq, 27'h0, mcause_code};
      CSR_MCYCLE, CSR_CYCLE:   rdata_o = mcycle;
      CSR_TIME:                rdata_o = time_i;
      CSR_MIMPID:              rdata_o = 32'h0000_0001;
      default:                 illegal_o = 1'b1;
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (!rst_n_i) begin
      mie_bit     <= 1'b0;
      mpie_bit    <= 1'b0;
      meie        <= 1'b0;
      mtvec       <= '0;
      mscratch    <= '0;
      mepc        <= '0;
      mcycle      <= '0;
      mcause_irq  <= 1'b0;
      mcause_code <= '0;
    end else begin
      mcycle <= mcycle + 32'd1;
      if (trap_i) begin
        mepc        <= trap_pc_i;
        mcause_irq  <= trap_irq_i;
        mcause_code <= trap_cause_i;
        mpie_bit    <= mie_bit;
        mie_bit     <= 1'b0;
      end else if (mret_i) begin
        mie_bit  <= mpie_bit;
        mpie_bit <= 1'b1;
      end else if (we_i) begin
        unique case (addr_i)
          CSR_MSTATUS:  begin mie_bit <= wdata_i[3]; mpie_bit <= wdata_i[7]; end
          CSR_MIE:      meie     <= wdata_i[11];
          CSR_MTVEC:    mtvec    <= {wdata_i[31:2], 2'b00};
          CSR_MSCRATCH: mscratch <= wdata_i;
          CSR_MEPC:     mepc     <= {wdata_i[31:2], 2'b00};
          CSR_MCAUSE:   begin mcause_irq <= wdata_i[31]; mcause_code <= wdata_i[3:0]; end
          CSR_MCYCLE:   mcycle   <= wdata_i;
          default: ;
        endcase
      end
    end
  end
endmodule
