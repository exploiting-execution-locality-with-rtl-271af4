// tb_cp_rob: self-checking test of the cache processor's reorder buffer.
//
// Random instructions are dispatched (up to four per cycle) and later marked either
// executed or long-latency, in random order; now and then a branch flush cuts the
// buffer back, and the LLIB is at times reported almost full. A queue model
// predicts, cycle by cycle, which head entries are dropped, which move to the
// memory processor (in order, compacted, with the READY value read through the
// register-file port), and when the head stalls.
module tb_cp_rob;
  import dkip_pkg::*;

  localparam int DEPTH = 92;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]    disp_valid, cmp_valid, ll_valid, mp_valid;
  llop_t         disp_op [4], mp_op [4];
  preg_t         disp_preg [4], rf_raddr [4];
  logic [AW-1:0] disp_idx [4], cmp_idx [4], ll_idx [4], mp_rob_idx [4];
  logic [AW:0]   free_cnt, count;
  logic          flush_valid;
  logic [AW-1:0] flush_idx;
  logic [10:0]   llib_free;
  word_t         mp_val [4], rf_rdata [4];
  logic [2:0]    drop_cnt;
  logic          head_stall, llib_full_stall;

  cp_rob #(.DEPTH(DEPTH), .W(4), .LLIB_CNT_W(11)) dut (.*);

  // register file stand-in: the value is a fixed function of the register number
  function automatic word_t rf_value(preg_t p);
    return {8'hA5, 48'(p) * 48'h9E3779B97F4A, p};
  endfunction
  always_comb for (int k = 0; k < 4; k++) rf_rdata[k] = rf_value(rf_raddr[k]);

  typedef struct { llop_t op; preg_t preg; int idx; bit done; bit ll; } ent_t;
  ent_t q [$];
  int   tail_idx;
  int   checks = 0, failures = 0;
  int   n_drop = 0, n_ll = 0, n_hstall = 0, n_lstall = 0, n_flush = 0, n_full = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   n, keep, go, nll, ndrop, nc, nl;
    bit   hs, ls;
    ent_t x, sent [4];
    disp_valid = '0; cmp_valid = '0; ll_valid = '0; flush_valid = 1'b0; flush_idx = '0;
    llib_free = 11'd1024;
    for (int k = 0; k < 4; k++) begin
      disp_op[k] = '0; disp_preg[k] = '0; cmp_idx[k] = '0; ll_idx[k] = '0;
    end
    tail_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      disp_valid = '0; cmp_valid = '0; ll_valid = '0; flush_valid = 1'b0;
      llib_free = ($urandom_range(0, 9) == 0) ? 11'($urandom_range(0, 3)) : 11'd1024;
      // mark some entries executed or long-latency
      nc = 0; nl = 0;
      for (int i = 0; i < q.size(); i++)
        if (!q[i].done && !q[i].ll && $urandom_range(0, 7) == 0) begin
          if ($urandom_range(0, 2) == 0 && nl < 4) begin
            ll_valid[nl] = 1'b1; ll_idx[nl] = AW'(q[i].idx); nl++;
          end else if (nc < 4) begin
            cmp_valid[nc] = 1'b1; cmp_idx[nc] = AW'(q[i].idx); nc++;
          end
        end
      if ($urandom_range(0, 99) == 0 && q.size() > 1) begin
        keep = $urandom_range(1, q.size());
        flush_valid = 1'b1;
        flush_idx   = AW'(q[keep - 1].idx);
      end else begin
        n = ((cyc / 300) % 2 == 0) ? 4 : $urandom_range(0, 4);
        if (n > DEPTH - q.size()) n = DEPTH - q.size();
        for (int k = 0; k < n; k++) begin
          disp_valid[k]     = 1'b1;
          disp_op[k].op     = op_e'($urandom_range(0, 6));
          disp_op[k].is_fp  = 1'($urandom);
          disp_op[k].dst    = lreg_t'($urandom);
          disp_op[k].src1   = lreg_t'($urandom);
          disp_op[k].src2   = lreg_t'($urandom);
          disp_op[k].rdy    = rdy_e'($urandom_range(0, 2));
          disp_preg[k]      = preg_t'($urandom);
        end
      end
      // expected head behaviour
      go = !flush_valid; nll = 0; ndrop = 0; hs = 0; ls = 0;
      for (int k = 0; k < 4 && go; k++) begin
        if (k >= q.size()) go = 0;
        else if (q[k].ll) begin
          if (llib_free >= 4) begin
            sent[nll] = q[k]; nll++;
          end else begin
            ls = 1; go = 0;
          end
        end else if (q[k].done) ndrop++;
        else begin
          hs = (k == 0); go = 0;
        end
      end
      #1;
      check(int'(count) == q.size() && int'(free_cnt) == DEPTH - q.size(), "count");
      for (int k = 0; k < 4; k++)
        if (disp_valid[k]) check(int'(disp_idx[k]) == (tail_idx + k) % DEPTH, "disp_idx");
      check(int'(drop_cnt) == ndrop, "drop_cnt");
      check(head_stall == hs, "head_stall");
      check(llib_full_stall == ls, "llib_full_stall");
      for (int k = 0; k < 4; k++) begin
        check(mp_valid[k] == (k < nll), "mp_valid");
        if (k < nll) begin
          check(mp_op[k] == sent[k].op, "mp_op");
          check(int'(mp_rob_idx[k]) == sent[k].idx, "mp_rob_idx");
          check(mp_val[k] == rf_value(sent[k].preg), "mp_val");
        end
      end
      n_drop += ndrop; n_ll += nll; n_hstall += hs; n_lstall += ls;
      if (q.size() == DEPTH) n_full++;
      @(posedge clk);
      // model update
      for (int k = 0; k < nll + ndrop; k++) void'(q.pop_front());
      if (flush_valid) begin
        n_flush++;
        while (q.size() > keep) void'(q.pop_back());
        tail_idx = (int'(flush_idx) + 1) % DEPTH;
      end
      for (int i = 0; i < q.size(); i++) begin
        for (int k = 0; k < 4; k++) begin
          if (cmp_valid[k] && int'(cmp_idx[k]) == q[i].idx) q[i].done = 1;
          if (ll_valid[k]  && int'(ll_idx[k])  == q[i].idx) q[i].ll   = 1;
        end
      end
      for (int k = 0; k < 4; k++)
        if (disp_valid[k]) begin
          x.op = disp_op[k]; x.preg = disp_preg[k]; x.idx = tail_idx;
          x.done = 0; x.ll = 0;
          q.push_back(x);
          tail_idx = (tail_idx + 1) % DEPTH;
        end
    end
    check(n_drop > 0 && n_ll > 0 && n_hstall > 0 && n_lstall > 0 && n_flush > 0 && n_full > 0,
          "a mechanism was never exercised");
    $display("dropped=%0d to_llib=%0d head_stalls=%0d llib_stalls=%0d flushes=%0d full=%0d",
             n_drop, n_ll, n_hstall, n_lstall, n_flush, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
