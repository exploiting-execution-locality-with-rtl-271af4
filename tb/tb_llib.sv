// tb_llib: self-checking test of the long-latency instruction buffer.
//
// A 16-entry LLIB (so that wrap-around and full conditions are frequent) is driven
// with random insertions of compute instructions and missing-load markers, random
// load returns, random extraction counts and occasional rollbacks. A queue model in
// the testbench predicts slot numbers, free space, which head entries may leave
// (the prefix up to the first unreturned load, at most 4) and their contents.
module tb_llib;
  import dkip_pkg::*;

  localparam int DEPTH = 16;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]    ins_valid;
  llop_t         ins_op  [4];
  logic [AW-1:0] ins_idx [4];
  logic [AW:0]   free_cnt, count;
  logic          ldret_valid;
  logic [AW-1:0] ldret_idx;
  logic [3:0]    hd_valid;
  llop_t         hd_op   [4];
  logic [AW-1:0] hd_idx  [4];
  logic [2:0]    ext_cnt;
  logic          rb_valid;
  logic [AW-1:0] rb_tail;
  logic          blocked;

  llib #(.DEPTH(DEPTH), .IN_W(4), .OUT_W(4)) dut (.*);

  // model
  llop_t         m_op   [$];
  bit            m_done [$];
  int            m_head;        // slot of the oldest entry
  int            checks = 0, failures = 0;
  int            n_full = 0, n_blocked = 0, n_ext4 = 0, n_rb = 0, n_ret = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic llop_t rand_op();
    llop_t o;
    o.op    = ($urandom_range(0, 3) == 0) ? OP_LDRET : op_e'($urandom_range(0, 5));
    o.is_fp = 1'($urandom);
    o.dst   = lreg_t'($urandom);
    o.src1  = lreg_t'($urandom);
    o.src2  = lreg_t'($urandom);
    o.rdy   = rdy_e'($urandom_range(0, 2));
    return o;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, prefix, p, keep;
    llop_t nop [4];
    ins_valid = '0; ldret_valid = 1'b0; ldret_idx = '0; ext_cnt = '0;
    rb_valid = 1'b0; rb_tail = '0;
    for (int k = 0; k < 4; k++) ins_op[k] = '0;
    m_head = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      ins_valid = '0; ldret_valid = 1'b0; ext_cnt = '0; rb_valid = 1'b0;
      // prefix of extractable entries per the model
      prefix = 0;
      while (prefix < 4 && prefix < m_op.size() && m_done[prefix]) prefix++;
      if ($urandom_range(0, 199) == 0 && m_op.size() > 0) begin
        keep = $urandom_range(0, m_op.size() - 1);
        rb_valid = 1'b1;
        rb_tail  = AW'(m_head + keep);
      end else begin
        // insertion: bursty so that the buffer fills
        n = (cyc % 400 < 200) ? $urandom_range(0, 4) : $urandom_range(0, 1);
        if (n > DEPTH - m_op.size()) n = DEPTH - m_op.size();
        for (int k = 0; k < n; k++) begin
          nop[k] = rand_op();
          ins_valid[k] = 1'b1;
          ins_op[k]    = nop[k];
        end
        ext_cnt = 3'((cyc % 400 < 200) ? $urandom_range(0, prefix > 1 ? 1 : prefix) : $urandom_range(0, prefix));
        // return a random outstanding load
        if ($urandom_range(0, 3) == 0)
          for (int i = 0; i < m_op.size(); i++)
            if (!m_done[i] && !ldret_valid && $urandom_range(0, 2) == 0) begin
              ldret_valid = 1'b1;
              ldret_idx   = AW'(m_head + i);
            end
      end
      #1;
      check(free_cnt == (AW+1)'(DEPTH - m_op.size()), "free_cnt");
      check(count == (AW+1)'(m_op.size()), "count");
      check(blocked == (m_op.size() > 0 && !m_done[0]), "blocked");
      for (int k = 0; k < 4; k++) begin
        check(hd_valid[k] == (k < prefix), "hd_valid");
        if (k < prefix) begin
          check(hd_op[k] == m_op[k], "hd_op");
          check(hd_idx[k] == AW'(m_head + k), "hd_idx");
        end
        if (ins_valid[k]) check(ins_idx[k] == AW'(m_head + m_op.size() + k), "ins_idx");
      end
      if (m_op.size() == DEPTH) n_full++;
      if (blocked) n_blocked++;
      if (ext_cnt == 3'd4) n_ext4++;
      @(posedge clk);
      // model update: returns, extraction, insertion or rollback
      if (ldret_valid) begin
        p = (int'(ldret_idx) - m_head + DEPTH) % DEPTH;
        m_done[p] = 1'b1;
        n_ret++;
      end
      for (int k = 0; k < int'(ext_cnt); k++) begin
        void'(m_op.pop_front());
        void'(m_done.pop_front());
      end
      m_head = (m_head + int'(ext_cnt)) % DEPTH;
      if (rb_valid) begin
        n_rb++;
        while (m_op.size() > keep) begin
          void'(m_op.pop_back());
          void'(m_done.pop_back());
        end
      end
      for (int k = 0; k < 4; k++)
        if (ins_valid[k]) begin
          m_op.push_back(nop[k]);
          m_done.push_back(nop[k].op != OP_LDRET);
        end
    end
    check(n_full > 0, "buffer never full");
    check(n_blocked > 0, "never blocked on a load");
    check(n_ext4 > 0, "never extracted 4");
    check(n_rb > 0, "never rolled back");
    $display("full=%0d blocked=%0d ext4=%0d rollbacks=%0d returns=%0d", n_full, n_blocked, n_ext4, n_rb, n_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
