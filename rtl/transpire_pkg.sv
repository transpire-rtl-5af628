// transpire_pkg: types and constants shared by the TRANSPIRE CGRA.
//
// Holds the 64-bit instruction word of a processing element (PE), its
// opcodes, operand selectors and data-type field, the operation latencies
// the Instruction Synchronizer counts (1, 2 and 5 cycles, as the floating
// point operator table of the architecture gives them), the context-bus
// record and the TCDM request types. The instruction encoding itself is this
// design's own: the architecture fixes only the instruction memory size
// (21 x 64 bits), that load/store carry CRF addresses for the address
// generator, and that conditional jumps carry two targets.
package transpire_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned IRF_DEPTH = 21;
  localparam int unsigned CRF_DEPTH = 20;
  localparam int unsigned RRF_DEPTH = 8;
  localparam int unsigned PC_W     = 5;
  localparam int unsigned ADDR_W   = 32;

  typedef enum logic [5:0] {
    OP_NOP   = 6'h00,
    OP_EXIT  = 6'h01,
    OP_JMP   = 6'h02,
    OP_CJMP  = 6'h03,
    // integer ALU, 1 cycle
    OP_ADD   = 6'h08,
    OP_SUB   = 6'h09,
    OP_MUL   = 6'h0A,
    OP_AND   = 6'h0B,
    OP_OR    = 6'h0C,
    OP_XOR   = 6'h0D,
    OP_SLL   = 6'h0E,
    OP_SRL   = 6'h0F,
    OP_SRA   = 6'h10,
    OP_SLT   = 6'h11,
    OP_SLTU  = 6'h12,
    OP_SEQ   = 6'h13,
    OP_MOV   = 6'h14,
    // mSFU
    OP_FADD  = 6'h20,
    OP_FSUB  = 6'h21,
    OP_FMUL  = 6'h22,
    OP_FABS  = 6'h23,
    OP_FLT   = 6'h24,
    // DS unit
    OP_FDIV  = 6'h28,
    OP_FSQRT = 6'h29,
    // memory
    OP_LD    = 6'h30,
    OP_ST    = 6'h31
  } opcode_e;

  // Operand source selector
  typedef enum logic [3:0] {
    SRC_R0 = 4'd0, SRC_R1 = 4'd1, SRC_R2 = 4'd2, SRC_R3 = 4'd3,
    SRC_R4 = 4'd4, SRC_R5 = 4'd5, SRC_R6 = 4'd6, SRC_R7 = 4'd7,
    SRC_OPR = 4'd8, SRC_N = 4'd9, SRC_S = 4'd10, SRC_W = 4'd11, SRC_E = 4'd12,
    SRC_CRF = 4'd13, SRC_ZERO = 4'd14, SRC_ZERO2 = 4'd15
  } src_e;

  // Data type of FP operations, access size of memory operations
  typedef enum logic [1:0] {
    FMT_W32   = 2'd0,   // binary32 / 32-bit word
    FMT_H16   = 2'd1,   // 2 x binary16alt / 16-bit half
    FMT_B8    = 2'd2,   // 4 x binary8 / byte
    FMT_RSV   = 2'd3
  } fmt_e;

  typedef struct packed {
    opcode_e          op;      // [63:58]
    logic             wr_rrf;  // [57]
    logic [2:0]       rd;      // [56:54]
    logic             wr_opr;  // [53]
    src_e             src_a;   // [52:49]
    src_e             src_b;   // [48:45]
    logic [4:0]       crf;     // [44:40]
    logic [PC_W-1:0]  jt;      // [39:35]
    logic [PC_W-1:0]  jf;      // [34:30]
    fmt_e             fmt;     // [29:28]
    src_e             ix0;     // [27:24]
    src_e             ix1;     // [23:20]
    src_e             ix2;     // [19:16]
    src_e             ix3;     // [15:12]
    logic [11:0]      rsv;     // [11:0]
  } instr_t;

  // Cycles an operation occupies its PE
  function automatic logic [2:0] op_latency(opcode_e op);
    case (op)
      OP_FADD, OP_FSUB, OP_FMUL: return 3'd2;
      OP_FDIV, OP_FSQRT:         return 3'd5;
      OP_LD:                     return 3'd2;
      default:                   return 3'd1;
    endcase
  endfunction

  // Context bus: one broadcast write into IRF or CRF of the PEs in pe_mask
  typedef struct packed {
    logic        we;
    logic [7:0]  pe_mask;
    logic        is_crf;
    logic [4:0]  idx;
    logic [63:0] data;
  } ctx_bus_t;

  // TCDM request from a master
  typedef struct packed {
    logic              req;
    logic              we;
    logic [3:0]        be;
    logic [ADDR_W-1:0] addr;
    logic [31:0]       wdata;
  } tcdm_req_t;

endpackage
