// llib: long-latency instruction buffer of the memory processor.
//
// A strictly in-order FIFO of instructions that depend on an outstanding L2 miss.
// It holds only the operation and the logical register descriptors that carry the
// dependences; a READY operand value sits in the MPRF slot with the same index.
// A load that misses occupies one slot as an OP_LDRET marker whose "done" bit is
// set when the load/store processor returns its data. Extraction scans from the
// head in program order and hands over up to OUT_W instructions per cycle, stopping
// at the first marker whose load has not returned. So once the oldest outstanding
// load returns, the instructions behind it up to the next unfinished load drain.
//
// Interface:
//   insert : ins_valid[k] (a contiguous run from k=0), ins_op[k]; ins_idx[k] is the
//            slot each entry gets (the MPRF write address). free_cnt says how many
//            slots are free; the producer must not insert more.
//   return : ldret_valid/ldret_idx marks the marker in that slot done.
//   extract: hd_valid[k] is set for the first entries that may leave this cycle
//            (a prefix); hd_op/hd_idx describe them; the consumer takes ext_cnt of
//            them (ext_cnt <= number of hd_valid bits set). All outputs are read
//            combinationally from the current state; updates happen at the clock edge.
//   rollback: rb_valid discards every entry from slot rb_tail to the tail; it must
//            discard at least one entry (rb_tail equal to the head empties the buffer).
//
// Size (1024 entries) and extraction rate (4 per cycle) follow the published design; the
// insertion width (4, the CP commit width), the marker scheme for loads and the
// rollback port are this design's choices.
module llib
  import dkip_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int IN_W  = 4,
  parameter int OUT_W = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // insertion from the CP reorder buffer
  input  logic [IN_W-1:0]               ins_valid,
  input  llop_t                         ins_op   [IN_W],
  output logic [$clog2(DEPTH)-1:0]      ins_idx  [IN_W],
  output logic [$clog2(DEPTH):0]        free_cnt,
  // load data returned from the load/store processor
  input  logic                          ldret_valid,
  input  logic [$clog2(DEPTH)-1:0]      ldret_idx,
  // extraction towards the reservation stations
  output logic [OUT_W-1:0]              hd_valid,
  output llop_t                         hd_op    [OUT_W],
  output logic [$clog2(DEPTH)-1:0]      hd_idx   [OUT_W],
  input  logic [$clog2(OUT_W+1)-1:0]    ext_cnt,
  // rollback to a checkpoint
  input  logic                          rb_valid,
  input  logic [$clog2(DEPTH)-1:0]      rb_tail,
  output logic [$clog2(DEPTH):0]        count,
  output logic                          blocked   // head is an unfinished load
);
  localparam int AW = $clog2(DEPTH);

  llop_t             mem  [DEPTH];
  logic [DEPTH-1:0]  done;
  logic [AW:0]       head, tail;   // one extra wrap bit

  logic [$clog2(IN_W+1)-1:0] n_ins;

  assign count    = tail - head;
  assign free_cnt = (AW+1)'(DEPTH) - count;

  always_comb begin
    n_ins = '0;
    for (int k = 0; k < IN_W; k++)
      if (ins_valid[k]) n_ins = n_ins + 1'b1;
    for (int k = 0; k < IN_W; k++)
      ins_idx[k] = AW'(tail[AW-1:0] + AW'(k));
  end

  always_comb begin
    logic run;   // all older entries of the group can leave too
    run = 1'b1;
    for (int k = 0; k < OUT_W; k++) begin
      hd_idx[k]   = AW'(head[AW-1:0] + AW'(k));
      hd_op[k]    = mem[hd_idx[k]];
      run         = run && ((AW+1)'(k) < count) && done[hd_idx[k]];
      hd_valid[k] = run;
    end
    blocked = (count != '0) && !done[head[AW-1:0]];
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < IN_W; k++)
      if (ins_valid[k]) mem[ins_idx[k]] <= ins_op[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      done <= '0;
    end else begin
      for (int k = 0; k < IN_W; k++)
        if (ins_valid[k]) done[ins_idx[k]] <= (ins_op[k].op != OP_LDRET);
      if (ldret_valid) done[ldret_idx] <= 1'b1;
      head <= head + (AW+1)'(ext_cnt);
      if (rb_valid)
        // keep the wrap bit consistent: the new tail lies between head and tail
        tail <= (rb_tail >= head[AW-1:0]) ? {head[AW], rb_tail}
                                          : {~head[AW], rb_tail};
      else
        tail <= tail + (AW+1)'(n_ins);
    end
  end

  initial assert ((1 << AW) == DEPTH) else $error("llib: DEPTH must be a power of two");
  always_ff @(posedge clk) if (rst_n) begin
    for (int k = 1; k < IN_W; k++)
      assert (!(ins_valid[k] && !ins_valid[k-1])) else $error("llib: insertion not contiguous");
    assert ((AW+1)'(n_ins) <= free_cnt) else $error("llib: overflow");
    for (int k = 0; k < OUT_W; k++)
      assert (!(32'(ext_cnt) > k && !hd_valid[k])) else $error("llib: extraction beyond ready prefix");
    assert (!(rb_valid && n_ins != '0)) else $error("llib: insertion during rollback");
  end
endmodule
