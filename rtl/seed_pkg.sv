// seed_pkg: types and constants shared by the issue/execute cluster.
//
// The cluster prevents scheduling-priority inversion: no younger instruction
// may take a resource that an older instruction would have won had both been
// ready in the same cycle. Instructions are ordered by their reorder-buffer
// position. A position carries one extra wrap bit so that two positions can be
// compared after the circular buffer's pointers have wrapped around; this
// comparison (rob_older) is used by the MSHR allocation policy, which decides
// age outside the instruction queue.
//
// Widths that the design leaves open (register tags, ROB size, data width) are
// fixed here: 64-bit data, 256 physical registers and a 256-position ROB id.
package seed_pkg;

  localparam int unsigned XLEN      = 64;   // data path width
  localparam int unsigned PREG_W    = 8;    // physical register tag width
  localparam int unsigned NPREG     = 1 << PREG_W;
  localparam int unsigned ROB_IDX_W = 8;    // ROB position width (without wrap bit)
  localparam int unsigned LINE_OFF_W = 6;   // 64-byte cache lines
  localparam int unsigned WORD_OFF_W = 3;   // 8 64-bit words per line
  localparam int unsigned LINE_W    = XLEN - LINE_OFF_W;   // line address width
  localparam int unsigned LINE_BITS = 8 << LINE_OFF_W;     // 512 data bits per line

  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [XLEN-1:0]   xlen_t;
  typedef logic [LINE_W-1:0] line_addr_t;

  // ROB position with wrap bit.
  typedef struct packed {
    logic                 wrap;
    logic [ROB_IDX_W-1:0] idx;
  } rob_id_t;

  // True when a is strictly older (earlier in program order) than b.
  function automatic logic rob_older(rob_id_t a, rob_id_t b);
    if (a.wrap == b.wrap) return a.idx < b.idx;
    else                  return a.idx > b.idx;
  endfunction

  // Functional-unit class of an instruction. DIV is the only non-pipelined
  // class in this cluster; ALU and LOAD are single-cycle or fully pipelined.
  typedef enum logic [1:0] {
    FU_ALU  = 2'd0,
    FU_LOAD = 2'd1,
    FU_DIV  = 2'd2
  } fu_class_t;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4,
    ALU_SLL = 3'd5,
    ALU_SRL = 3'd6,
    ALU_SLT = 3'd7
  } alu_op_t;

  // Divider operation: unsigned quotient or remainder.
  typedef enum logic {
    DIV_QUO = 1'b0,
    DIV_REM = 1'b1
  } div_op_t;

  // Micro-op as carried through the instruction queues.
  typedef struct packed {
    rob_id_t   rob;
    fu_class_t fu;
    alu_op_t   alu_op;
    div_op_t   div_op;
    preg_t     dst;
    preg_t     src1;
    preg_t     src2;
    xlen_t     imm;      // ALU: used instead of src2 when use_imm; LOAD: offset
    logic      use_imm;
  } uop_t;

  // MSHR target: where the data of a coalesced load goes.
  typedef struct packed {
    rob_id_t                rob;
    preg_t                  dst;
    logic [WORD_OFF_W-1:0]  word;
  } mshr_tgt_t;

  // Outcome of a load that missed in the L1, as decided by the MSHR file.
  typedef enum logic [1:0] {
    MISS_ALLOC  = 2'd0,   // non-speculative miss allocated a new MSHR
    MISS_TARGET = 2'd1,   // load became a target of an existing MSHR
    MISS_DELAY  = 2'd2,   // speculative miss with no MSHR: delayed (Delay-on-Miss)
    MISS_RETRY  = 2'd3    // no MSHR or target available: retry later
  } miss_kind_t;

  // Why a load must be sent again by the load queue.
  typedef enum logic [1:0] {
    REPLAY_DELAYED   = 2'd0,
    REPLAY_RETRY     = 2'd1,
    REPLAY_PREEMPTED = 2'd2
  } replay_kind_t;

endpackage
