// tb_dkip_top: end-to-end test of the decoupled back-end at its full size.
//
// The testbench plays the parts the design leaves outside: the CP front end and
// units, the CP register file, and the load/store processor with a 400-cycle
// memory. It generates a program; an instruction is long-latency when it is a load
// that misses or reads a register whose newest producer was long-latency (NOT
// READY), and otherwise the CP executes it. Instructions are dispatched into the
// ROB and marked executed or long-latency a few cycles later, out of order; now and
// then a branch is followed by wrong-path instructions that a flush removes.
// Missing loads return their data 400 cycles after they reach the LLIB.
//
// The reference runs the program sequentially. At the end every register whose
// newest producer was long-latency must hold the reference value in the future
// file, and the memory processor must have produced one result per long-latency
// compute instruction. Each mechanism (drop at the ROB head, hand-over to the LLIB,
// head stall, LLIB-full stall, branch flush, LLIB blocked on a load, four
// extractions in a cycle, full station, forwarding inside a group) is counted and
// must occur.
module tb_dkip_top;
  import dkip_pkg::*;

  localparam int ROB = 92;
  localparam int RAW = $clog2(ROB);
  localparam int LAW = 10;
  localparam int MEM_LAT = 400;
  localparam int NINSTR = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]       disp_valid, cmp_valid, ll_valid, xfer_valid;
  llop_t            disp_op   [4];
  preg_t            disp_preg [4], rf_raddr [4];
  logic [RAW-1:0]   disp_idx  [4], cmp_idx [4], ll_idx [4], xfer_rob_idx [4];
  logic [RAW:0]     rob_free, rob_count;
  logic             flush_valid;
  logic [RAW-1:0]   flush_idx;
  word_t            rf_rdata  [4];
  logic [LAW-1:0]   xfer_llib_idx [4];
  logic             ldret_valid;
  logic [LAW-1:0]   ldret_idx;
  word_t            ldret_data;
  logic             rb_valid;
  logic [LAW-1:0]   rb_tail;
  wb_t              wb [NWB];
  word_t            arch_val [NLREG];
  logic [NLREG-1:0] arch_rdy;
  logic [2:0]       drop_cnt, ext_cnt;
  logic             head_stall, llib_full_stall, llib_blocked, rs_stall, intra_fwd, mp_idle;
  logic [LAW:0]     llib_count;

  dkip_top dut (.*);

  // CP register file stand-in: slot = READY value captured at dispatch
  word_t rf [256];
  always_comb for (int k = 0; k < 4; k++) rf_rdata[k] = rf[rf_raddr[k]];

  // program state
  word_t g  [NLREG];   // sequential reference
  bit    nr [NLREG];   // newest producer was long-latency
  // per ROB slot: is a missing load, and its data
  bit    slot_miss [ROB];
  word_t slot_data [ROB];
  // pending CP marks
  int    mk_idx [$], mk_due [$];
  bit    mk_ll  [$];
  // outstanding loads in the load/store stand-in
  int    ls_slot [$], ls_due [$];
  word_t ls_data [$];

  int cyc = 0, checks = 0, failures = 0;
  int n_drop = 0, n_xfer = 0, n_hstall = 0, n_lstall = 0, n_flush = 0, n_block = 0;
  int n_ext4 = 0, n_rsfull = 0, n_fwd = 0, n_wb = 0, n_llops = 0, n_miss = 0, max_llib = 0;

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observation and the load/store stand-in's intake
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_drop   += int'(drop_cnt);
      n_hstall += int'(head_stall);
      n_lstall += int'(llib_full_stall);
      n_block  += int'(llib_blocked);
      n_rsfull += int'(rs_stall);
      n_fwd    += int'(intra_fwd);
      if (ext_cnt == 3'd4) n_ext4++;
      if (int'(llib_count) > max_llib) max_llib = int'(llib_count);
      for (int w = 0; w < NWB; w++) if (wb[w].valid) n_wb++;
      for (int k = 0; k < 4; k++)
        if (xfer_valid[k]) begin
          n_xfer++;
          if (slot_miss[xfer_rob_idx[k]]) begin
            ls_slot.push_back(int'(xfer_llib_idx[k]));
            ls_data.push_back(slot_data[xfer_rob_idx[k]]);
            ls_due.push_back(cyc + MEM_LAT);
          end
        end
    end
  end

  initial begin
    int    issued, n, nc, nl, br_state, br_idx, nregs, pidx;
    llop_t o;
    word_t a, b, v;
    bit    ll, miss, is_br;
    disp_valid = '0; cmp_valid = '0; ll_valid = '0; flush_valid = 1'b0; flush_idx = '0;
    ldret_valid = 1'b0; ldret_idx = '0; ldret_data = '0; rb_valid = 1'b0; rb_tail = '0;
    for (int k = 0; k < 4; k++) begin
      disp_op[k] = '0; disp_preg[k] = '0; cmp_idx[k] = '0; ll_idx[k] = '0;
    end
    for (int r = 0; r < NLREG; r++) begin
      g[r] = word_t'(r * 7 + 1); nr[r] = 0;
    end
    for (int i = 0; i < 256; i++) rf[i] = '0;
    issued = 0; br_state = 0; br_idx = 0; pidx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (issued < NINSTR || rob_count != '0 || !mp_idle || ls_slot.size() > 0) begin
      @(negedge clk);
      disp_valid = '0; cmp_valid = '0; ll_valid = '0; flush_valid = 1'b0; ldret_valid = 1'b0;
      // program phases: wide register use, then narrow multiply-heavy chains
      nregs = ((issued / 1500) % 2 == 0) ? 16 : 4;
      // CP marks whose time has come
      nc = 0; nl = 0;
      for (int i = 0; i < mk_idx.size(); i++)
        if (mk_due[i] <= cyc) begin
          if (mk_ll[i] && nl < 4) begin
            ll_valid[nl] = 1'b1; ll_idx[nl] = RAW'(mk_idx[i]); nl++;
            mk_due[i] = 1 << 30;
          end else if (!mk_ll[i] && nc < 4) begin
            cmp_valid[nc] = 1'b1; cmp_idx[nc] = RAW'(mk_idx[i]); nc++;
            mk_due[i] = 1 << 30;
          end
        end
      for (int i = mk_idx.size() - 1; i >= 0; i--)
        if (mk_due[i] == (1 << 30)) begin
          mk_idx.delete(i); mk_due.delete(i); mk_ll.delete(i);
        end
      // one load return per cycle, oldest first
      if (ls_slot.size() > 0 && ls_due[0] <= cyc) begin
        ldret_valid = 1'b1;
        ldret_idx   = LAW'(ls_slot[0]);
        ldret_data  = ls_data[0];
        void'(ls_slot.pop_front()); void'(ls_data.pop_front()); void'(ls_due.pop_front());
      end
      if (br_state == 2) begin
        // the branch resolves as mispredicted: drop the wrong path, then mark it
        flush_valid = 1'b1;
        flush_idx   = RAW'(br_idx);
        mk_idx.push_back(br_idx); mk_due.push_back(cyc + 1); mk_ll.push_back(0);
        br_state = 0;
        n_flush++;
      end else if (br_state == 1) begin
        // wrong-path instructions: never marked, removed by the flush
        n = $urandom_range(1, 4);
        if (n > int'(rob_free)) n = int'(rob_free);
        for (int k = 0; k < n; k++) begin
          disp_valid[k] = 1'b1;
          disp_op[k]    = '{op: OP_ADD, is_fp: 1'b0, dst: lreg_t'($urandom), src1: '0, src2: '0, rdy: RDY_NONE};
          disp_preg[k]  = '0;
        end
        br_state = 2;
      end else if (issued < NINSTR) begin
        n = $urandom_range(2, 4);
        if (n > int'(rob_free)) n = int'(rob_free);
        if (n > NINSTR - issued) n = NINSTR - issued;
        #1;
        for (int k = 0; k < n; k++) begin
          o.is_fp = 1'($urandom);
          o.dst   = lreg_t'($urandom_range(0, nregs - 1) + (o.is_fp ? 32 : 0));
          o.src1  = lreg_t'($urandom_range(0, nregs - 1) + (o.is_fp ? 32 : 0));
          o.src2  = lreg_t'($urandom_range(0, nregs - 1) + (o.is_fp ? 32 : 0));
          o.rdy   = RDY_NONE;
          miss    = 0;
          is_br   = 0;
          if ($urandom_range(0, 5) == 0) begin
            o.op = OP_LDRET;
            v    = {$urandom, $urandom};
            miss = ($urandom_range(0, 2) == 0);
            ll   = miss;
            g[o.dst] = v;
          end else begin
            o.op = (nregs == 4 && $urandom_range(0, 1) == 0) ? OP_MUL : op_e'($urandom_range(0, 5));
            a  = g[o.src1];
            b  = g[o.src2];
            ll = nr[o.src1] || nr[o.src2];
            if (ll && !nr[o.src1]) begin o.rdy = RDY_SRC1; v = a; end
            if (ll && !nr[o.src2]) begin o.rdy = RDY_SRC2; v = b; end
            g[o.dst] = ref_alu(o.op, a, b);
            if (ll) n_llops++;
            is_br = !ll && (k == n - 1) && $urandom_range(0, 59) == 0;
          end
          nr[o.dst] = ll;
          n_miss += int'(miss);
          disp_valid[k] = 1'b1;
          disp_op[k]    = o;
          disp_preg[k]  = preg_t'(pidx);
          rf[pidx]      = v;
          pidx = (pidx + 1) % 256;
          slot_miss[disp_idx[k]] = miss;
          slot_data[disp_idx[k]] = v;
          if (is_br) begin
            br_idx   = int'(disp_idx[k]);
            br_state = 1;
          end else begin
            mk_idx.push_back(int'(disp_idx[k]));
            mk_due.push_back(cyc + $urandom_range(1, 6));
            mk_ll.push_back(ll);
          end
        end
        issued += n;
      end
    end
    repeat (3) @(posedge clk);
    for (int r = 0; r < NLREG; r++)
      if (nr[r]) begin
        checks++;
        if (!arch_rdy[r] || arch_val[r] !== g[r]) begin
          failures++;
          if (failures < 10) $display("FAIL r%0d: %h expected %h", r, arch_val[r], g[r]);
        end
      end
    checks++;
    if (n_wb != n_llops) begin failures++; $display("FAIL %0d MP results, expected %0d", n_wb, n_llops); end
    checks += 9;
    if (n_drop == 0)   begin failures++; $display("FAIL no instruction dropped at the ROB head"); end
    if (n_xfer == 0)   begin failures++; $display("FAIL no hand-over to the LLIB"); end
    if (n_hstall == 0) begin failures++; $display("FAIL no ROB head stall"); end
    if (n_lstall == 0) begin failures++; $display("FAIL LLIB never full"); end
    if (n_flush == 0)  begin failures++; $display("FAIL no branch flush"); end
    if (n_block == 0)  begin failures++; $display("FAIL LLIB never blocked on a load"); end
    if (n_ext4 == 0)   begin failures++; $display("FAIL never four extractions in a cycle"); end
    if (n_rsfull == 0) begin failures++; $display("FAIL no full station"); end
    if (n_fwd == 0)    begin failures++; $display("FAIL no forwarding inside a group"); end
    $display("cycles=%0d instr=%0d IPC=%0d.%02d misses=%0d to_llib=%0d mp_results=%0d max_llib=%0d",
             cyc, NINSTR, NINSTR / cyc, (NINSTR * 100 / cyc) % 100, n_miss, n_xfer, n_wb, max_llib);
    $display("dropped=%0d head_stall=%0d llib_full=%0d flushes=%0d llib_blocked=%0d extract4=%0d station_full=%0d group_fwd=%0d",
             n_drop, n_hstall, n_lstall, n_flush, n_block, n_ext4, n_rsfull, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
