// Shared constants of the uRV RV32IM CPU: major opcodes, function codes,
// CSR addresses and exception causes as fixed by the RISC-V ISA, plus the
// encodings of the pipeline's internal unit selects (this design's choice).
package urv_pkg;

  localparam logic [4:0] OPC_LOAD   = 5'b00000;
  localparam logic [4:0] OPC_MISC   = 5'b00011;  // FENCE
  localparam logic [4:0] OPC_OPIMM  = 5'b00100;
  localparam logic [4:0] OPC_AUIPC  = 5'b00101;
  localparam logic [4:0] OPC_STORE  = 5'b01000;
  localparam logic [4:0] OPC_OP     = 5'b01100;
  localparam logic [4:0] OPC_LUI    = 5'b01101;
  localparam logic [4:0] OPC_BRANCH = 5'b11000;
  localparam logic [4:0] OPC_JALR   = 5'b11001;
  localparam logic [4:0] OPC_JAL    = 5'b11011;
  localparam logic [4:0] OPC_SYSTEM = 5'b11100;

  // Which unit produces the result written back in X2/W.
  typedef enum logic [1:0] {
    RES_ALU   = 2'd0,  // ALU, CSR, jump link, LUI/AUIPC, divider: bypassable
    RES_SHIFT = 2'd1,
    RES_MUL   = 2'd2,
    RES_LOAD  = 2'd3
  } res_sel_e;

  // CSR addresses
  localparam logic [11:0] CSR_MSTATUS  = 12'h300;
  localparam logic [11:0] CSR_MIE      = 12'h304;
  localparam logic [11:0] CSR_MTVEC    = 12'h305;
  localparam logic [11:0] CSR_MSCRATCH = 12'h340;
  localparam logic [11:0] CSR_MEPC     = 12'h341;
  localparam logic [11:0] CSR_MCAUSE   = 12'h342;
  localparam logic [11:0] CSR_MIP      = 12'h344;
  localparam logic [11:0] CSR_MCYCLE   = 12'hB00;
  localparam logic [11:0] CSR_CYCLE    = 12'hC00;
  localparam logic [11:0] CSR_TIME     = 12'hC01;
  localparam logic [11:0] CSR_MIMPID   = 12'hF13;

  // Exception causes
  localparam logic [3:0] CAUSE_ILLEGAL   = 4'd2;
  localparam logic [3:0] CAUSE_BREAK     = 4'd3;
  localparam logic [3:0] CAUSE_LOAD_MIS  = 4'd4;
  localparam logic [3:0] CAUSE_STORE_MIS = 4'd6;
  localparam logic [3:0] CAUSE_ECALL     = 4'd11;
  localparam logic [3:0] CAUSE_EXT_IRQ   = 4'd11;  // with the interrupt flag set

endpackage
