// tb_future_file: self-checking test of the memory processor's future file.
//
// Random groups of up to four in-order instructions (sources and destinations
// drawn from a few registers so that they collide often) look up their sources
// and claim their destinations, while result buses carry values for tags that are
// pending. The reference is sequential: apply this cycle's results to a copy of
// the table, then walk the group in program order, reading each slot's sources
// from the copy and then writing its destination into it.
module tb_future_file;
  import dkip_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]       s_valid, s_isval;
  lreg_t            s_src1 [4], s_src2 [4], s_dst [4];
  tag_t             s_tag  [4];
  word_t            s_val  [4];
  opnd_t            s_opnd1 [4], s_opnd2 [4];
  wb_t              wb [NWB];
  word_t            arch_val [NLREG];
  logic [NLREG-1:0] arch_rdy;

  future_file #(.NSLOT(4)) dut (.*);

  bit    m_rdy [NLREG];
  tag_t  m_tag [NLREG];
  word_t m_val [NLREG];
  int    checks = 0, failures = 0, n_fwd = 0, n_bypass = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic lreg_t pick_reg();
    return ($urandom_range(0, 3) == 0) ? lreg_t'($urandom) : lreg_t'($urandom_range(0, 5));
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit    t_rdy [NLREG];
    tag_t  t_tag [NLREG];
    word_t t_val [NLREG];
    int    n, r;
    s_valid = '0; s_isval = '0;
    for (int k = 0; k < 4; k++) begin
      s_src1[k] = '0; s_src2[k] = '0; s_dst[k] = '0; s_tag[k] = '0; s_val[k] = '0;
    end
    for (int w = 0; w < NWB; w++) wb[w] = '0;
    for (int i = 0; i < NLREG; i++) begin
      m_rdy[i] = 1'b1; m_tag[i] = '0; m_val[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      n = $urandom_range(0, 4);
      s_valid = '0; s_isval = '0;
      for (int k = 0; k < 4; k++) begin
        s_valid[k] = (k < n);
        s_src1[k]  = pick_reg();
        s_src2[k]  = pick_reg();
        s_dst[k]   = pick_reg();
        s_isval[k] = ($urandom_range(0, 4) == 0);
        s_tag[k]   = tag_t'($urandom);
        s_val[k]   = {$urandom, $urandom};
      end
      // results for some pending registers
      for (int w = 0; w < NWB; w++) begin
        wb[w] = '0;
        r = $urandom_range(0, 7);
        if (!m_rdy[r] && $urandom_range(0, 1) == 1) begin
          wb[w].valid = 1'b1;
          wb[w].tag   = m_tag[r];
          wb[w].value = {$urandom, $urandom};
        end
      end
      // reference
      for (int i = 0; i < NLREG; i++) begin
        t_rdy[i] = m_rdy[i]; t_tag[i] = m_tag[i]; t_val[i] = m_val[i];
        if (!m_rdy[i])
          for (int w = 0; w < NWB; w++)
            if (wb[w].valid && wb[w].tag == m_tag[i]) begin
              t_rdy[i] = 1'b1; t_val[i] = wb[w].value;
            end
      end
      #1;
      for (int k = 0; k < n; k++) begin
        check(s_opnd1[k].rdy == t_rdy[s_src1[k]], "src1 rdy");
        if (t_rdy[s_src1[k]]) check(s_opnd1[k].value == t_val[s_src1[k]], "src1 value");
        else                  check(s_opnd1[k].tag == t_tag[s_src1[k]], "src1 tag");
        check(s_opnd2[k].rdy == t_rdy[s_src2[k]], "src2 rdy");
        if (t_rdy[s_src2[k]]) check(s_opnd2[k].value == t_val[s_src2[k]], "src2 value");
        else                  check(s_opnd2[k].tag == t_tag[s_src2[k]], "src2 tag");
        if (!m_rdy[s_src1[k]] && t_rdy[s_src1[k]]) n_bypass++;
        for (int j = 0; j < k; j++) if (s_dst[j] == s_src1[k]) n_fwd++;
        t_rdy[s_dst[k]] = s_isval[k];
        t_tag[s_dst[k]] = s_tag[k];
        if (s_isval[k]) t_val[s_dst[k]] = s_val[k];
      end
      @(posedge clk);
      for (int i = 0; i < NLREG; i++) begin
        m_rdy[i] = t_rdy[i]; m_tag[i] = t_tag[i]; m_val[i] = t_val[i];
      end
      #1;
      for (int i = 0; i < NLREG; i++) begin
        check(arch_rdy[i] == m_rdy[i], "state rdy");
        if (m_rdy[i]) check(arch_val[i] == m_val[i], "state value");
      end
    end
    check(n_fwd > 0 && n_bypass > 0, "forwarding cases not reached");
    $display("in-group forwards=%0d result-bus bypasses=%0d", n_fwd, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
