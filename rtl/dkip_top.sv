// dkip_top: back-end of a decoupled kilo-instruction processor (D-KIP).
//
// Two cores share one instruction stream. The cache processor (CP) is a small,
// fast out-of-order core whose structures are sized for cache hits; of it, this
// design contains the reorder buffer, the point where the two cores meet. The
// memory processor (MP) is a simple, wide back-end for the instructions that
// depend on L2 misses. At the CP ROB head, executed instructions are dropped and
// long-latency ones move, in program order, into the MP's long-latency instruction
// buffer (LLIB), their READY operand going to the MP register file (MPRF). The
// MP drains the LLIB in order as the missing loads return and executes the
// instructions in its reservation stations, keeping register state in a future file.
//
// Not contained, and reached through ports: the CP front end, rename, issue
// queues, register file and units (dispatch, completion, long-latency
// classification, branch flush, register read port), the load/store processor
// with the caches and memory (missing-load data returned by LLIB slot), and
// checkpoint recovery (LLIB tail rollback).
//
// Timing: everything is synchronous to clk with an active-low asynchronous reset.
// An instruction leaves the ROB in the cycle it is at the head and is in the LLIB
// the next cycle; it can leave the LLIB in that cycle and enter a station; a
// station issues at the earliest one cycle later and the result is on the bus one
// cycle after issue.
module dkip_top
  import dkip_pkg::*;
#(
  parameter int ROB_DEPTH  = 92,
  parameter int WIDTH      = 4,
  parameter int LLIB_DEPTH = 1024,
  parameter int EXT_W      = 4,
  parameter int RS_ENTRIES = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CP side
  input  logic [WIDTH-1:0]              disp_valid,
  input  llop_t                         disp_op   [WIDTH],
  input  preg_t                         disp_preg [WIDTH],
  output logic [$clog2(ROB_DEPTH)-1:0]  disp_idx  [WIDTH],
  output logic [$clog2(ROB_DEPTH):0]    rob_free,
  input  logic [WIDTH-1:0]              cmp_valid,
  input  logic [$clog2(ROB_DEPTH)-1:0]  cmp_idx   [WIDTH],
  input  logic [WIDTH-1:0]              ll_valid,
  input  logic [$clog2(ROB_DEPTH)-1:0]  ll_idx    [WIDTH],
  input  logic                          flush_valid,
  input  logic [$clog2(ROB_DEPTH)-1:0]  flush_idx,
  output preg_t                         rf_raddr  [WIDTH],
  input  word_t                         rf_rdata  [WIDTH],
  // hand-over to the MP: which ROB slot went to which LLIB slot
  output logic [WIDTH-1:0]              xfer_valid,
  output logic [$clog2(ROB_DEPTH)-1:0]  xfer_rob_idx  [WIDTH],
  output logic [$clog2(LLIB_DEPTH)-1:0] xfer_llib_idx [WIDTH],
  // load/store processor side
  input  logic                          ldret_valid,
  input  logic [$clog2(LLIB_DEPTH)-1:0] ldret_idx,
  input  word_t                         ldret_data,
  // checkpoint recovery
  input  logic                          rb_valid,
  input  logic [$clog2(LLIB_DEPTH)-1:0] rb_tail,
  // MP results and state
  output wb_t                           wb        [NWB],
  output word_t                         arch_val  [NLREG],
  output logic [NLREG-1:0]              arch_rdy,
  // activity
  output logic [$clog2(WIDTH+1)-1:0]    drop_cnt,
  output logic                          head_stall,
  output logic                          llib_full_stall,
  output logic [$clog2(EXT_W+1)-1:0]    ext_cnt,
  output logic                          llib_blocked,
  output logic                          rs_stall,
  output logic                          intra_fwd,
  output logic [$clog2(LLIB_DEPTH):0]   llib_count,
  output logic [$clog2(ROB_DEPTH):0]    rob_count,
  output logic                          mp_idle
);
  localparam int LCW = $clog2(LLIB_DEPTH) + 1;

  logic [LCW-1:0] llib_free;
  llop_t          x_op  [WIDTH];
  word_t          x_val [WIDTH];

  cp_rob #(.DEPTH(ROB_DEPTH), .W(WIDTH), .LLIB_CNT_W(LCW)) u_rob (
    .clk, .rst_n,
    .disp_valid, .disp_op, .disp_preg, .disp_idx, .free_cnt(rob_free),
    .cmp_valid, .cmp_idx, .ll_valid, .ll_idx,
    .flush_valid, .flush_idx,
    .llib_free,
    .mp_valid(xfer_valid), .mp_op(x_op), .mp_val(x_val), .mp_rob_idx(xfer_rob_idx),
    .rf_raddr, .rf_rdata,
    .drop_cnt, .head_stall, .llib_full_stall, .count(rob_count)
  );

  memory_processor #(.LLIB_DEPTH(LLIB_DEPTH), .INS_W(WIDTH), .EXT_W(EXT_W),
                     .RS_ENTRIES(RS_ENTRIES)) u_mp (
    .clk, .rst_n,
    .ins_valid(xfer_valid), .ins_op(x_op), .ins_val(x_val), .ins_idx(xfer_llib_idx),
    .llib_free,
    .ldret_valid, .ldret_idx, .ldret_data,
    .rb_valid, .rb_tail,
    .wb, .arch_val, .arch_rdy,
    .ext_cnt, .llib_blocked, .rs_stall, .intra_fwd, .llib_count, .idle(mp_idle)
  );
endmodule
