// Shared types and constants of the Mock Turtle core.
// The Wishbone bus (classic, single transfers, 32-bit data) is carried as two
// structs: master-to-slave (wb_m2s_t) and slave-to-master (wb_s2m_t). A master
// holds cyc/stb and the request fields stable until it samples ack high; the
// slave raises ack for exactly one cycle per transfer.
// The address maps below are this design's choice; the document only fixes the
// idea that the high address bits of a shared-memory access select an atomic
// operation (add at +0x1_0000, test-and-set at +0x2_0000).
package mt_pkg;

  typedef struct packed {
    logic        cyc;
    logic        stb;
    logic        we;
    logic [3:0]  sel;
    logic [31:0] adr;
    logic [31:0] dat;
  } wb_m2s_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] dat;
  } wb_s2m_t;

  localparam wb_m2s_t WB_M2S_IDLE = '{cyc: 1'b0, stb: 1'b0, we: 1'b0, sel: 4'h0, adr: '0, dat: '0};
  localparam wb_s2m_t WB_S2M_IDLE = '{ack: 1'b0, dat: '0};

  // CPU address map (data side). Below 0x8000_0000: private memory.
  localparam logic [31:0] CPU_IO_BASE    = 32'h8000_0000;  // I/O bridge region
  localparam logic [31:0] CB_LREGS_BASE  = 32'h8000_0000;  // local registers
  localparam logic [31:0] CB_DP_BASE     = 32'h9000_0000;  // dedicated peripheral
  localparam logic [31:0] CB_LREGS_MASK  = 32'hF000_0000;
  localparam logic [31:0] CB_DP_MASK     = 32'hF000_0000;
  localparam logic [31:0] CB_SI_BASE     = 32'hA000_0000;  // everything else above: shared interconnect
  localparam logic [31:0] CB_SI_MASK     = 32'h0000_0000;

  // Shared interconnect slaves (addresses as seen by the CPUs).
  localparam logic [31:0] SI_SMEM_BASE   = 32'hA000_0000;
  localparam logic [31:0] SI_SMEM_MASK   = 32'hFFF0_0000;
  localparam logic [31:0] SI_HMQ_BASE    = 32'hA010_0000;
  localparam logic [31:0] SI_HMQ_MASK    = 32'hFFF0_0000;
  localparam logic [31:0] SI_RMQ_BASE    = 32'hA020_0000;
  localparam logic [31:0] SI_RMQ_MASK    = 32'hFFF0_0000;
  localparam logic [31:0] SI_SP_BASE     = 32'hC000_0000;
  localparam logic [31:0] SI_SP_MASK     = 32'hC000_0000;

  // Host address map.
  localparam logic [31:0] HOST_CTRL_BASE = 32'h0000_0000;  // control/debug registers
  localparam logic [31:0] HOST_HMQ_BASE  = 32'h0001_0000;  // host side of the HMQ
  localparam logic [31:0] HOST_SMEM_BASE = 32'h0010_0000;  // shared memory, same atomic encoding

  // Shared memory atomic operation, address bits [18:16].
  typedef enum logic [2:0] {
    SMEM_DIRECT = 3'd0,
    SMEM_ADD    = 3'd1,
    SMEM_TSET   = 3'd2,
    SMEM_SUB    = 3'd3,
    SMEM_SET    = 3'd4,
    SMEM_CLEAR  = 3'd5,
    SMEM_FLIP   = 3'd6
  } smem_op_e;

  // Message queue command word (written to a slot's command register).
  localparam logic [1:0] MQ_CMD_READY   = 2'b01;  // commit the message, size in [15:0]
  localparam logic [1:0] MQ_CMD_DISCARD = 2'b10;  // message at the head processed

endpackage
