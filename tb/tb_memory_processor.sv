// tb_memory_processor: end-to-end test of the memory processor.
//
// Streams of long-latency instructions (as the CP ROB would hand them over) are
// inserted, up to four per cycle, with the value of their READY source; missing
// loads enter as markers and their data is returned by a load/store stand-in after
// a random delay and in random order. The reference executes the same stream
// sequentially on 64 registers that start at zero. After each phase the testbench
// waits until the processor is idle and compares all 64 future-file registers.
// Phases alternate between random code and long multiply chains that fill the
// multiplier stations, so that extraction stalls on a full station, on an
// unreturned load, extracts four in a cycle and forwards inside a group. A short
// directed part first checks the latencies and the four-per-cycle extraction.
module tb_memory_processor;
  import dkip_pkg::*;

  localparam int LD  = 1024;
  localparam int AW  = $clog2(LD);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]       ins_valid;
  llop_t            ins_op  [4];
  word_t            ins_val [4];
  logic [AW-1:0]    ins_idx [4];
  logic [AW:0]      llib_free, llib_count;
  logic             ldret_valid;
  logic [AW-1:0]    ldret_idx;
  word_t            ldret_data;
  logic             rb_valid;
  logic [AW-1:0]    rb_tail;
  wb_t              wb [NWB];
  word_t            arch_val [NLREG];
  logic [NLREG-1:0] arch_rdy;
  logic [2:0]       ext_cnt;
  logic             llib_blocked, rs_stall, intra_fwd, idle;

  memory_processor dut (.*);

  word_t g [NLREG];   // sequential reference
  int    checks = 0, failures = 0;
  int    n_block = 0, n_rsfull = 0, n_ext4 = 0, n_fwd = 0, n_ret = 0, n_wb = 0, n_ops = 0;

  // outstanding loads: slot, data, due cycle
  int    ld_slot [$];
  word_t ld_data [$];
  int    ld_due  [$];
  int    cyc = 0;

  function automatic word_t ref_alu(op_e op, word_t a, word_t b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_MUL: return a * b;
      default: return a;
    endcase
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int w = 0; w < NWB; w++) if (wb[w].valid) n_wb++;
      if (llib_blocked) n_block++;
      if (rs_stall) n_rsfull++;
      if (ext_cnt == 3'd4) n_ext4++;
      if (intra_fwd) n_fwd++;
    end
  end

  function automatic lreg_t pick(int phase);
    return (phase % 2 == 1) ? lreg_t'($urandom_range(0, 3)) : lreg_t'($urandom_range(0, 11));
  endfunction

  function automatic llop_t gen(int phase);
    llop_t o;
    o.is_fp = 1'($urandom);
    o.dst   = pick(phase);
    o.src1  = pick(phase);
    o.src2  = pick(phase);
    o.rdy   = rdy_e'($urandom_range(0, 2));
    if ($urandom_range(0, 5) == 0) o.op = OP_LDRET;
    else if (phase % 2 == 1) begin
      o.op   = OP_MUL;      // chain: dst = dst * x
      o.src1 = o.dst;
      if (o.rdy == RDY_SRC1) o.rdy = RDY_SRC2;
    end else o.op = op_e'($urandom_range(0, 5));
    return o;
  endfunction

  // Directed timing checks, run on the empty processor:
  //  * an instruction inserted at clock edge E leaves the LLIB in the next cycle
  //    and its result is on a bus right after edge E+3;
  //  * four independent instructions inserted together leave in one cycle;
  //  * an instruction behind a missing load leaves only in the cycle after the
  //    load's data is returned.
  task automatic directed_timing();
    int edges;
    @(negedge clk);
    ins_valid  = 4'b0001;
    ins_op[0]  = '{op: OP_ADD, is_fp: 1'b0, dst: 6'd1, src1: 6'd2, src2: 6'd3, rdy: RDY_SRC1};
    ins_val[0] = 64'd40;
    g[1] = 64'd40 + g[3];
    @(negedge clk);
    ins_valid = '0;
    checks++;
    if (ext_cnt != 3'd1) begin failures++; $display("FAIL insert-to-extract latency"); end
    edges = 1;
    while (!wb[0].valid && !wb[1].valid && edges < 10) begin
      @(negedge clk);
      edges++;
    end
    checks++;
    if (edges != 3) begin failures++; $display("FAIL insert-to-result latency %0d edges, expected 3", edges); end
    // four at once: two integer and two floating-point adds
    @(negedge clk);
    ins_valid = 4'b1111;
    for (int k = 0; k < 4; k++) begin
      ins_op[k]  = '{op: OP_ADD, is_fp: 1'(k / 2), dst: lreg_t'(8 + 32 * (k / 2) + k), src1: 6'd0,
                     src2: 6'd0, rdy: RDY_SRC1};
      ins_val[k] = word_t'(k + 5);
      g[8 + 32 * (k / 2) + k] = word_t'(k + 5);
    end
    @(negedge clk);
    ins_valid = '0;
    checks++;
    if (ext_cnt != 3'd4) begin failures++; $display("FAIL four-wide extraction: %0d", ext_cnt); end
    // a load marker followed by its consumer
    @(negedge clk);
    ins_valid = 4'b0011;
    ins_op[0] = '{op: OP_LDRET, is_fp: 1'b0, dst: 6'd20, src1: 6'd0, src2: 6'd0, rdy: RDY_NONE};
    ins_op[1] = '{op: OP_ADD, is_fp: 1'b0, dst: 6'd21, src1: 6'd20, src2: 6'd20, rdy: RDY_NONE};
    g[20] = 64'd1000;
    g[21] = 64'd2000;
    #1;
    ld_slot.push_back(int'(ins_idx[0]));
    @(negedge clk);
    ins_valid = '0;
    repeat (20) begin
      checks++;
      if (ext_cnt != '0 || !llib_blocked) failures++;
      @(negedge clk);
    end
    ldret_valid = 1'b1;
    ldret_idx   = AW'(ld_slot.pop_front());
    ldret_data  = 64'd1000;
    @(negedge clk);
    ldret_valid = 1'b0;
    checks++;
    if (ext_cnt != 3'd2) begin failures++; $display("FAIL release after load return: %0d", ext_cnt); end
    repeat (5) @(negedge clk);
    checks++;
    if (arch_val[21] != 64'd2000 || arch_val[1] != g[1]) begin failures++; $display("FAIL directed values"); end
    n_ops += 6;
  endtask

  initial begin
    int    n, left, pick_i;
    llop_t o [4];
    word_t v [4], a, b;
    ins_valid = '0; ldret_valid = 1'b0; ldret_idx = '0; ldret_data = '0;
    rb_valid = 1'b0; rb_tail = '0;
    for (int k = 0; k < 4; k++) begin
      ins_op[k] = '0; ins_val[k] = '0;
    end
    for (int r = 0; r < NLREG; r++) g[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    directed_timing();
    for (int phase = 0; phase < 8; phase++) begin
      left = 600;
      while (left > 0 || ld_slot.size() > 0 || !idle) begin
        @(negedge clk);
        ins_valid   = '0;
        ldret_valid = 1'b0;
        // insert a group
        n = (left > 0) ? $urandom_range(1, 4) : 0;
        if (n > left) n = left;
        if (n > int'(llib_free)) n = int'(llib_free);
        for (int k = 0; k < n; k++) begin
          o[k] = gen(phase);
          v[k] = (phase % 2 == 1) ? word_t'($urandom_range(1, 7)) : {$urandom, $urandom};
          ins_valid[k] = 1'b1;
          ins_op[k]    = o[k];
          ins_val[k]   = (o[k].op == OP_LDRET) ? '0 : v[k];
        end
        // return one load that is due, chosen at random among the due ones
        pick_i = -1;
        for (int i = 0; i < ld_slot.size(); i++)
          if (ld_due[i] <= cyc && (pick_i < 0 || $urandom_range(0, 1) == 0)) pick_i = i;
        if (pick_i >= 0) begin
          ldret_valid = 1'b1;
          ldret_idx   = AW'(ld_slot[pick_i]);
          ldret_data  = ld_data[pick_i];
          ld_slot.delete(pick_i);
          ld_data.delete(pick_i);
          ld_due.delete(pick_i);
          n_ret++;
        end
        #1;
        // reference execution in program order; note each load's slot
        for (int k = 0; k < n; k++) begin
          a = (o[k].rdy == RDY_SRC1) ? v[k] : g[o[k].src1];
          b = (o[k].rdy == RDY_SRC2) ? v[k] : g[o[k].src2];
          if (o[k].op == OP_LDRET) begin
            ld_slot.push_back(int'(ins_idx[k]));
            ld_data.push_back(v[k]);
            ld_due.push_back(cyc + $urandom_range(5, 120));
            g[o[k].dst] = v[k];
          end else begin
            g[o[k].dst] = ref_alu(o[k].op, a, b);
            n_ops++;
          end
        end
        left -= n;
      end
      repeat (3) @(posedge clk);
      for (int r = 0; r < NLREG; r++) begin
        checks++;
        if (!arch_rdy[r] || arch_val[r] !== g[r]) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d r%0d: %h expected %h", phase, r, arch_val[r], g[r]);
        end
      end
    end
    checks += 5;
    if (n_wb != n_ops) begin failures++; $display("FAIL results %0d, expected %0d", n_wb, n_ops); end
    if (n_block == 0)  begin failures++; $display("FAIL never blocked on a load"); end
    if (n_rsfull == 0) begin failures++; $display("FAIL never stalled on a full station"); end
    if (n_ext4 == 0)   begin failures++; $display("FAIL never extracted four"); end
    if (n_fwd == 0)    begin failures++; $display("FAIL never forwarded inside a group"); end
    $display("cycles=%0d ops=%0d loads=%0d blocked=%0d station_full=%0d extract4=%0d group_fwd=%0d",
             cyc, n_ops, n_ret, n_block, n_rsfull, n_ext4, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
