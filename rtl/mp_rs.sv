// mp_rs: reservation station of the memory processor (an IRS or an FPRS).
//
// Holds instructions extracted from the LLIB until both operands are available and
// feeds one functional unit. An operand arrives either with its value or with the
// tag of its producer; result buses (wb) are compared against waiting tags every
// cycle and fill in the value. Each cycle the lowest-numbered entry whose operands
// are both present is issued, and its entry is freed at the same clock edge.
//
// Interface:
//   alloc : up to IN_W instructions per cycle (al_valid a contiguous run from bit 0).
//           al_tag[k] is the tag the k-th one will carry, {RS_ID, entry}; al_ok[k]
//           says a free entry exists for it. Operands given at allocation are taken
//           as they are: the supplier (the future file) has already forwarded any
//           result bus value of the same cycle.
//   issue : is_valid with op, operand values and destination tag, combinational
//           from the current state; the functional unit takes one per cycle.
//
// The published design shows two integer and two floating-point reservation stations, each
// with one unit, but gives no size or selection rule; 32 entries, two allocations
// per cycle and lowest-index-first selection are this design's choices.
module mp_rs
  import dkip_pkg::*;
#(
  parameter int ENTRIES = 32,
  parameter int IN_W    = 2,
  parameter logic [1:0] RS_ID = 2'd0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [IN_W-1:0]              al_valid,
  input  op_e                          al_op  [IN_W],
  input  opnd_t                        al_s1  [IN_W],
  input  opnd_t                        al_s2  [IN_W],
  output logic [IN_W-1:0]              al_ok,
  output tag_t                         al_tag [IN_W],
  input  wb_t                          wb     [NWB],
  output logic                         is_valid,
  output op_e                          is_op,
  output word_t                        is_a,
  output word_t                        is_b,
  output tag_t                         is_tag,
  output logic [$clog2(ENTRIES):0]     count
);
  localparam int EW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] busy;
  op_e                op_q [ENTRIES];
  opnd_t              s1_q [ENTRIES];
  opnd_t              s2_q [ENTRIES];

  logic [EW-1:0]      al_idx [IN_W];
  logic [EW-1:0]      is_idx;

  // operand after this cycle's result buses
  function automatic opnd_t wake(opnd_t o);
    opnd_t r;
    r = o;
    if (!o.rdy)
      for (int w = 0; w < NWB; w++)
        if (wb[w].valid && wb[w].tag == o.tag) begin
          r.rdy   = 1'b1;
          r.value = wb[w].value;
        end
    return r;
  endfunction

  opnd_t s1_w [ENTRIES];
  opnd_t s2_w [ENTRIES];
  always_comb
    for (int e = 0; e < ENTRIES; e++) begin
      s1_w[e] = wake(s1_q[e]);
      s2_w[e] = wake(s2_q[e]);
    end

  // free entry search: the IN_W lowest-numbered free entries
  always_comb begin
    logic [ENTRIES-1:0] taken;
    taken = busy;
    for (int k = 0; k < IN_W; k++) begin
      al_ok[k]  = 1'b0;
      al_idx[k] = '0;
      for (int e = ENTRIES - 1; e >= 0; e--)
        if (!taken[e]) begin
          al_ok[k]  = 1'b1;
          al_idx[k] = EW'(e);
        end
      if (al_ok[k]) taken[al_idx[k]] = 1'b1;
      al_tag[k] = tag_t'({RS_ID, al_idx[k]});
    end
  end

  // issue selection: lowest-numbered entry with both operands present
  always_comb begin
    is_valid = 1'b0;
    is_idx   = '0;
    for (int e = ENTRIES - 1; e >= 0; e--)
      if (busy[e] && s1_q[e].rdy && s2_q[e].rdy) begin
        is_valid = 1'b1;
        is_idx   = EW'(e);
      end
    is_op  = op_q[is_idx];
    is_a   = s1_q[is_idx].value;
    is_b   = s2_q[is_idx].value;
    is_tag = tag_t'({RS_ID, is_idx});
  end

  always_comb begin
    count = '0;
    for (int e = 0; e < ENTRIES; e++) count = count + (EW+1)'(busy[e]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        op_q[e] <= OP_ADD;
        s1_q[e] <= '0;
        s2_q[e] <= '0;
      end
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        s1_q[e] <= s1_w[e];
        s2_q[e] <= s2_w[e];
      end
      if (is_valid) busy[is_idx] <= 1'b0;
      for (int k = 0; k < IN_W; k++)
        if (al_valid[k]) begin
          busy[al_idx[k]] <= 1'b1;
          op_q[al_idx[k]] <= al_op[k];
          s1_q[al_idx[k]] <= al_s1[k];
          s2_q[al_idx[k]] <= al_s2[k];
        end
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    for (int k = 0; k < IN_W; k++)
      assert (!(al_valid[k] && !al_ok[k])) else $error("mp_rs: allocation into a full station");
  end
  initial assert (EW + 2 == TAG_W) else $error("mp_rs: ENTRIES does not match the tag width");
endmodule
