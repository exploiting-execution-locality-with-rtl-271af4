// dkip_pkg: types and constants shared by the decoupled kilo-instruction back-end.
//
// An instruction that leaves the cache processor (CP) for the memory processor (MP)
// is described by an llop_t: an operation, a class bit (integer or floating-point
// reservation stations), a destination and two source logical registers, and which
// of the two sources (at most one) was READY when the instruction left the CP.
// The READY operand's value travels separately, through the MPRF.
//
// Logical registers follow the 64-bit Alpha ISA used for the evaluation: 32 integer
// and 32 floating-point registers, numbered 0..31 and 32..63. The operation set is
// this design's own abstraction: the evaluation runs Alpha binaries, but the
// hardware description names no opcodes. OP_LDRET marks a load whose data comes from
// the load/store processor; it occupies an LLIB slot so extraction can stop at it.
package dkip_pkg;

  parameter int XLEN = 64;              // Alpha data path width
  parameter int NLREG = 64;             // 32 integer + 32 floating-point logical registers
  localparam int LREG_W = $clog2(NLREG);
  parameter int CP_PREG_W = 8;          // CP physical register: class bit + 7-bit index (128/128)
  parameter int NWB = 4;                // MP result buses: one per functional unit

  typedef logic [XLEN-1:0]      word_t;
  typedef logic [LREG_W-1:0]    lreg_t;
  typedef logic [CP_PREG_W-1:0] preg_t;

  typedef enum logic [2:0] {
    OP_ADD   = 3'd0,
    OP_SUB   = 3'd1,
    OP_AND   = 3'd2,
    OP_OR    = 3'd3,
    OP_XOR   = 3'd4,
    OP_MUL   = 3'd5,
    OP_LDRET = 3'd6                     // missing load: value arrives from the load/store processor
  } op_e;

  // Which source was READY (had a value) in the CP. Never both: then the
  // instruction would not have long issue latency.
  typedef enum logic [1:0] {
    RDY_NONE = 2'd0,
    RDY_SRC1 = 2'd1,
    RDY_SRC2 = 2'd2
  } rdy_e;

  typedef struct packed {
    op_e   op;
    logic  is_fp;
    lreg_t dst;
    lreg_t src1;
    lreg_t src2;
    rdy_e  rdy;
  } llop_t;

  localparam int TAG_W = 7;             // {station number (2 bits), entry (5 bits)}
  typedef logic [TAG_W-1:0] tag_t;

  // Result bus of the memory processor
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t value;
  } wb_t;

  // Operand as held in a reservation station
  typedef struct packed {
    logic             rdy;
    tag_t             tag;
    word_t            value;
  } opnd_t;

  function automatic word_t alu(op_e op, word_t a, word_t b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_MUL:  return a * b;
      default: return a;
    endcase
  endfunction

endpackage
