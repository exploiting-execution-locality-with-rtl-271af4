// tb_mp_rs: self-checking test of a memory-processor reservation station.
//
// Instructions are allocated (up to two per cycle) with operands that are either
// present or wait on the tag of one of 16 outside producers; producers later put
// their value on a result bus. A model of the 32 entries predicts the tags handed
// out at allocation, the waking of waiting operands, the choice of the issued
// entry (the lowest-numbered one with both operands) and the operand values, and
// checks that the station fills up and refuses allocation when full.
module tb_mp_rs;
  import dkip_pkg::*;

  localparam int N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] al_valid, al_ok;
  op_e        al_op  [2];
  opnd_t      al_s1  [2], al_s2 [2];
  tag_t       al_tag [2];
  wb_t        wb     [NWB];
  logic       is_valid;
  op_e        is_op;
  word_t      is_a, is_b;
  tag_t       is_tag;
  logic [5:0] count;

  mp_rs #(.ENTRIES(N), .IN_W(2), .RS_ID(2'd0)) dut (.*);

  // model of the entries
  bit    e_busy [N];
  op_e   e_op   [N];
  opnd_t e_s1   [N], e_s2 [N];
  // outside producers: tags {3, i}
  bit    p_pend [16];
  word_t p_val  [16];

  int checks = 0, failures = 0, n_full = 0, n_wake = 0, n_issue = 0;

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
    int    nfree, n, exp_e, p;
    int    exp_idx [2];
    bit    bcast [16];
    opnd_t o;
    al_valid = '0;
    for (int k = 0; k < 2; k++) begin
      al_op[k] = OP_ADD; al_s1[k] = '0; al_s2[k] = '0;
    end
    for (int w = 0; w < NWB; w++) wb[w] = '0;
    for (int e = 0; e < N; e++) begin
      e_busy[e] = 1'b0; e_s1[e] = '0; e_s2[e] = '0; e_op[e] = OP_ADD;
    end
    for (int i = 0; i < 16; i++) begin
      p_pend[i] = 1'b0; p_val[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // producers that finish this cycle
      for (int i = 0; i < 16; i++) bcast[i] = 1'b0;
      for (int w = 0; w < NWB; w++) begin
        wb[w] = '0;
        p = $urandom_range(0, 15);
        if (p_pend[p] && !bcast[p] && $urandom_range(0, 3) == 0) begin
          bcast[p]    = 1'b1;
          wb[w].valid = 1'b1;
          wb[w].tag   = tag_t'({2'd3, 5'(p)});
          wb[w].value = p_val[p];
        end
      end
      // expected free entries
      nfree = 0;
      for (int k = 0; k < 2; k++) exp_idx[k] = -1;
      for (int e = 0; e < N; e++)
        if (!e_busy[e]) begin
          if (nfree < 2) exp_idx[nfree] = e;
          nfree++;
        end
      // allocations: long bursts fill the station
      n = ((cyc / 500) % 2 == 0) ? 2 : $urandom_range(0, 1);
      if (n > nfree) n = nfree;
      al_valid = '0;
      for (int k = 0; k < n; k++) begin
        al_valid[k] = 1'b1;
        al_op[k]    = op_e'($urandom_range(0, 5));
        for (int s = 0; s < 2; s++) begin
          p = $urandom_range(0, 15);
          if ($urandom_range(0, 1) == 0 && !bcast[p]) begin
            if (!p_pend[p]) begin
              p_pend[p] = 1'b1;
              p_val[p]  = {$urandom, $urandom};
            end
            o = '{rdy: 1'b0, tag: tag_t'({2'd3, 5'(p)}), value: word_t'($urandom)};
          end else
            o = '{rdy: 1'b1, tag: tag_t'($urandom), value: {$urandom, $urandom}};
          if (s == 0) al_s1[k] = o; else al_s2[k] = o;
        end
      end
      // expected issue
      exp_e = -1;
      for (int e = N - 1; e >= 0; e--)
        if (e_busy[e] && e_s1[e].rdy && e_s2[e].rdy) exp_e = e;
      #1;
      check(int'(count) == N - nfree, "count");
      for (int k = 0; k < 2; k++) begin
        check(al_ok[k] == (exp_idx[k] >= 0), "al_ok");
        if (exp_idx[k] >= 0) check(al_tag[k] == tag_t'({2'd0, 5'(exp_idx[k])}), "al_tag");
      end
      check(is_valid == (exp_e >= 0), "is_valid");
      if (exp_e >= 0) begin
        check(is_tag == tag_t'({2'd0, 5'(exp_e)}), "is_tag");
        check(is_op == e_op[exp_e], "is_op");
        check(is_a == e_s1[exp_e].value && is_b == e_s2[exp_e].value, "operands");
        n_issue++;
      end
      if (nfree == 0) n_full++;
      @(posedge clk);
      // model update: wake, issue, allocate
      for (int e = 0; e < N; e++)
        if (e_busy[e])
          for (int w = 0; w < NWB; w++)
            if (wb[w].valid) begin
              if (!e_s1[e].rdy && e_s1[e].tag == wb[w].tag) begin
                e_s1[e].rdy = 1'b1; e_s1[e].value = wb[w].value; n_wake++;
              end
              if (!e_s2[e].rdy && e_s2[e].tag == wb[w].tag) begin
                e_s2[e].rdy = 1'b1; e_s2[e].value = wb[w].value; n_wake++;
              end
            end
      if (exp_e >= 0) e_busy[exp_e] = 1'b0;
      for (int k = 0; k < n; k++) begin
        e_busy[exp_idx[k]] = 1'b1;
        e_op[exp_idx[k]]   = al_op[k];
        e_s1[exp_idx[k]]   = al_s1[k];
        e_s2[exp_idx[k]]   = al_s2[k];
      end
      for (int i = 0; i < 16; i++) if (bcast[i]) p_pend[i] = 1'b0;
    end
    check(n_full > 0, "station never full");
    check(n_wake > 0, "no operand woken");
    $display("full=%0d wakeups=%0d issues=%0d", n_full, n_wake, n_issue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
