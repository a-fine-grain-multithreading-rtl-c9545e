// Shared constants and types of the multithreaded superscalar core.
//
// The core fetches and decodes four instructions per cycle, keeps up to six
// hardware threads in its Thread Attribute Store, and maps 32 logical
// registers onto 64 physical ones with a per-thread Register Relocation Map
// (RRM). Those sizes follow the published architecture. The instruction set
// below is this design's own: the architecture is described without one, so a
// small 32-bit RISC encoding is used that contains the instruction kinds the
// architecture relies on (ALU operations, branches, local and remote loads and
// stores, a long-latency divide, fork and join).
//
// Encoding (all fields fixed):
//   [31:26] opcode   [25:21] rd   [20:16] rs1   [15:11] rs2   [15:0] imm16
// imm16 is sign-extended. Branch, jump and fork targets are pc + imm (word
// addresses). FORK and JOIN carry the new thread's RRM in rd[2:0].
package mt_pkg;

  localparam int unsigned XLEN     = 32;  // data path width
  localparam int unsigned NLREG    = 32;  // logical registers
  localparam int unsigned NPREG    = 64;  // physical registers
  localparam int unsigned LREG_W   = 5;
  localparam int unsigned PREG_W   = 6;
  localparam int unsigned RRM_W    = 3;
  localparam int unsigned FETCH_W  = 4;   // instructions per fetch block / decode
  localparam int unsigned NTHREADS = 6;   // TAS entries
  localparam int unsigned TID_W    = 3;
  localparam int unsigned WIN      = 16;  // central window entries
  localparam int unsigned TAG_W    = 4;   // window slot number = tag

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [RRM_W-1:0]  rrm_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,  OP_SUB = 6'd2,  OP_AND = 6'd3,  OP_OR  = 6'd4,
    OP_XOR  = 6'd5,  OP_SLT = 6'd6,  OP_SLL = 6'd7,  OP_SRL = 6'd8,
    OP_ADDI = 6'd9,  OP_LUI = 6'd10,
    OP_DIV  = 6'd16,                       // long latency: thread suspending
    OP_LD   = 6'd20, OP_ST  = 6'd21,       // local memory
    OP_LDR  = 6'd22, OP_STR = 6'd23,       // remote memory (LDR suspends)
    OP_BEQ  = 6'd32, OP_BNE = 6'd33, OP_JMP = 6'd34,
    OP_FORK = 6'd40, OP_JOIN = 6'd41
  } opcode_e;

  // Functional unit class an instruction is issued to.
  typedef enum logic [2:0] {
    FU_ALU, FU_DIV, FU_MEM, FU_BR, FU_THR, FU_NONE
  } fu_e;

  // One decoded instruction, as written into the central window.
  typedef struct packed {
    logic    valid;
    opcode_e op;
    fu_e     fu;
    logic    has_dst;
    preg_t   dst;
    logic    use_s1;
    preg_t   s1;
    logic    use_s2;
    preg_t   s2;
    word_t   imm;
    word_t   pc;
    tid_t    tid;
    logic    tsi;       // thread suspending instruction
    logic    susp;      // its thread was suspended for it
    rrm_t    new_rrm;   // FORK/JOIN: RRM handed to the new/continuing thread
  } dec_t;

  // Field helpers.
  function automatic opcode_e f_op(input word_t ins);
    return opcode_e'(ins[31:26]);
  endfunction
  function automatic word_t f_imm(input word_t ins);
    return {{16{ins[15]}}, ins[15:0]};
  endfunction

  // Instruction builders, used by testbenches to write programs.
  function automatic word_t enc_r(input opcode_e op, input int rd, input int rs1, input int rs2);
    return {op, 5'(rd), 5'(rs1), 5'(rs2), 11'd0};
  endfunction
  function automatic word_t enc_i(input opcode_e op, input int rd, input int rs1, input int imm);
    return {op, 5'(rd), 5'(rs1), 16'(imm)};
  endfunction
  // Stores and branches: rs2 sits in [15:11], so their offset is 11 bits.
  function automatic word_t enc_s(input opcode_e op, input int rs1, input int rs2, input int imm);
    return {op, 5'd0, 5'(rs1), 5'(rs2), 11'(imm)};
  endfunction

endpackage
