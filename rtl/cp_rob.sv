// cp_rob: reorder buffer of the cache processor (CP).
//
// The CP is a small out-of-order core sized for cache hits only. Its ROB exists to
// roll back mispredicted branches; it never holds an instruction for the length of
// a memory access. At the head, in program order and up to W per cycle:
//   * an instruction the CP has executed is simply dropped: from here on it is
//     covered by a checkpoint, so nothing about it needs to be kept;
//   * an instruction classified long-latency (it depends on an outstanding L2 miss,
//     or is itself a load that missed) moves to the memory processor: its
//     operation and register descriptors go to the LLIB, and the value of its one
//     READY source is read from the CP register file and goes to the MPRF;
//   * an instruction that is neither stops the head for this cycle.
// Long-latency instructions leave only while the LLIB has room for a full group.
//
// Interface:
//   disp_*  : up to W dispatches per cycle (contiguous from bit 0); disp_idx gives
//             each its ROB slot; free_cnt is the room left. disp_preg is the CP
//             physical register of the READY source.
//   cmp_*   : the CP marks slots executed; ll_* marks slots long-latency.
//   flush_* : a mispredicted branch in slot flush_idx discards every younger entry
//             (no commit happens in that cycle).
//   mp_*    : long-latency instructions leaving this cycle (contiguous), with
//             rf_raddr/rf_rdata a combinational read port into the CP register file.
// The 92-entry size and 4-wide commit follow the published D-KIP design; the port
// protocol, the flush rule and the full-group LLIB check are this design's choices.
module cp_rob
  import dkip_pkg::*;
#(
  parameter int DEPTH = 92,
  parameter int W     = 4,
  parameter int LLIB_CNT_W = 11
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [W-1:0]               disp_valid,
  input  llop_t                      disp_op   [W],
  input  preg_t                      disp_preg [W],
  output logic [$clog2(DEPTH)-1:0]   disp_idx  [W],
  output logic [$clog2(DEPTH):0]     free_cnt,
  input  logic [W-1:0]               cmp_valid,
  input  logic [$clog2(DEPTH)-1:0]   cmp_idx   [W],
  input  logic [W-1:0]               ll_valid,
  input  logic [$clog2(DEPTH)-1:0]   ll_idx    [W],
  input  logic                       flush_valid,
  input  logic [$clog2(DEPTH)-1:0]   flush_idx,
  input  logic [LLIB_CNT_W-1:0]      llib_free,
  output logic [W-1:0]               mp_valid,
  output llop_t                      mp_op     [W],
  output word_t                      mp_val    [W],
  output logic [$clog2(DEPTH)-1:0]   mp_rob_idx[W],
  output preg_t                      rf_raddr  [W],
  input  word_t                      rf_rdata  [W],
  // activity, for observation
  output logic [$clog2(W+1)-1:0]     drop_cnt,     // executed instructions dropped
  output logic                       head_stall,   // head neither executed nor long-latency
  output logic                       llib_full_stall,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH) + 1;

  llop_t            op_q   [DEPTH];
  preg_t            preg_q [DEPTH];
  logic [DEPTH-1:0] done_q, ll_q;
  logic [AW-1:0]    head, tail;
  logic [CW-1:0]    cnt;

  function automatic logic [AW-1:0] wrap_add(logic [AW-1:0] a, int k);
    int s;
    s = int'(a) + k;
    if (s >= DEPTH) s = s - DEPTH;
    return AW'(s);
  endfunction

  logic [$clog2(W+1)-1:0] n_disp, n_commit;

  assign count    = cnt;
  assign free_cnt = CW'(DEPTH) - cnt;

  always_comb begin
    n_disp = '0;
    for (int k = 0; k < W; k++) begin
      disp_idx[k] = wrap_add(tail, k);
      if (disp_valid[k]) n_disp = n_disp + 1'b1;
    end
  end

  // head scan
  always_comb begin
    logic                 go;
    logic [AW-1:0]        e;
    int                   n_ll;
    go              = !flush_valid;
    n_ll            = 0;
    n_commit        = '0;
    drop_cnt        = '0;
    head_stall      = 1'b0;
    llib_full_stall = 1'b0;
    for (int k = 0; k < W; k++) begin
      mp_valid[k]   = 1'b0;
      mp_op[k]      = '0;
      mp_rob_idx[k] = '0;
      rf_raddr[k]   = '0;
    end
    for (int k = 0; k < W; k++) begin
      e = wrap_add(head, k);
      if (go && CW'(k) < cnt) begin
        if (ll_q[e]) begin
          if (llib_free >= LLIB_CNT_W'(W)) begin
            mp_valid[n_ll]   = 1'b1;
            mp_op[n_ll]      = op_q[e];
            mp_rob_idx[n_ll] = e;
            rf_raddr[n_ll]   = preg_q[e];
            n_ll     = n_ll + 1;
            n_commit = n_commit + 1'b1;
          end else begin
            llib_full_stall = 1'b1;
            go = 1'b0;
          end
        end else if (done_q[e]) begin
          drop_cnt = drop_cnt + 1'b1;
          n_commit = n_commit + 1'b1;
        end else begin
          head_stall = (k == 0);
          go = 1'b0;
        end
      end else go = 1'b0;
    end
    for (int k = 0; k < W; k++)
      mp_val[k] = mp_valid[k] ? rf_rdata[k] : '0;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < W; k++)
      if (disp_valid[k]) begin
        op_q[disp_idx[k]]   <= disp_op[k];
        preg_q[disp_idx[k]] <= disp_preg[k];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head   <= '0;
      tail   <= '0;
      cnt    <= '0;
      done_q <= '0;
      ll_q   <= '0;
    end else begin
      for (int k = 0; k < W; k++) begin
        if (cmp_valid[k]) done_q[cmp_idx[k]] <= 1'b1;
        if (ll_valid[k])  ll_q[ll_idx[k]]    <= 1'b1;
      end
      for (int k = 0; k < W; k++)
        if (disp_valid[k]) begin
          done_q[disp_idx[k]] <= 1'b0;
          ll_q[disp_idx[k]]   <= 1'b0;
        end
      head <= wrap_add(head, int'(n_commit));
      if (flush_valid) begin
        // keep entries head..flush_idx; nothing commits or dispatches this cycle
        tail <= wrap_add(flush_idx, 1);
        cnt  <= CW'(((int'(flush_idx) - int'(head) + DEPTH) % DEPTH) + 1);
      end else begin
        tail <= wrap_add(tail, int'(n_disp));
        cnt  <= cnt + CW'(n_disp) - CW'(n_commit);
      end
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    for (int k = 1; k < W; k++)
      assert (!(disp_valid[k] && !disp_valid[k-1])) else $error("cp_rob: dispatch not contiguous");
    assert (CW'(n_disp) <= free_cnt) else $error("cp_rob: overflow");
    assert (!(flush_valid && n_disp != '0)) else $error("cp_rob: dispatch during flush");
  end
endmodule
