// memory_processor: the second-level core of the decoupled kilo-instruction processor.
//
// Instructions that the cache processor found to depend on an L2 miss arrive here
// in program order, together with the value of their one READY source (if any).
// They wait in the LLIB; the READY values wait in the MPRF slot of the same index.
// Each cycle the head of the LLIB is scanned in order: up to EXT_W instructions
// leave, stopping at a load marker whose data has not returned from the
// load/store processor or at an instruction for which no reservation station entry
// is free. Leaving instructions read their READY operand from the MPRF, look up
// their NOT READY sources in the future file (value or producer tag) and enter one
// of four reservation stations: two integer (IRS) and two floating-point (FPRS),
// each with one functional unit. A load marker instead writes its returned value
// into the future file. Units broadcast their results on four result buses that
// wake the stations and fill the future file.
//
// Steering: a multiply must go to station 0 of its class, whose unit has the
// multiplier; other operations go to station 1 of their class if it has room, else
// to station 0. Each station takes up to two instructions per cycle.
//
// Interface: ins_* insertion (up to 4 per cycle, contiguous), ins_idx returns the
// LLIB slot of each (a load marker's slot is where its data must be returned);
// ldret_* returns missing-load data; rb_* rolls the LLIB tail back; wb carries the
// results; arch_* shows the future file. Structure and sizes follow the published
// D-KIP design (LLIB and MPRF 1024 entries, extraction 4 per cycle, four
// units); station size, steering and the marker scheme are this design's choices.
module memory_processor
  import dkip_pkg::*;
#(
  parameter int LLIB_DEPTH = 1024,
  parameter int INS_W      = 4,
  parameter int EXT_W      = 4,
  parameter int RS_ENTRIES = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [INS_W-1:0]              ins_valid,
  input  llop_t                         ins_op   [INS_W],
  input  word_t                         ins_val  [INS_W],
  output logic [$clog2(LLIB_DEPTH)-1:0] ins_idx  [INS_W],
  output logic [$clog2(LLIB_DEPTH):0]   llib_free,
  input  logic                          ldret_valid,
  input  logic [$clog2(LLIB_DEPTH)-1:0] ldret_idx,
  input  word_t                         ldret_data,
  input  logic                          rb_valid,
  input  logic [$clog2(LLIB_DEPTH)-1:0] rb_tail,
  output wb_t                           wb       [NWB],
  output word_t                         arch_val [NLREG],
  output logic [NLREG-1:0]              arch_rdy,
  // activity, for observation
  output logic [$clog2(EXT_W+1)-1:0]    ext_cnt,
  output logic                          llib_blocked,   // head waits for a load
  output logic                          rs_stall,       // head instruction found no station entry
  output logic                          intra_fwd,      // a source came from an older slot of the group
  output logic [$clog2(LLIB_DEPTH):0]   llib_count,
  output logic                          idle            // LLIB, stations and units empty
);
  localparam int AW   = $clog2(LLIB_DEPTH);
  localparam int NRS  = 4;
  localparam int RSIN = 2;

  // LLIB
  logic [EXT_W-1:0] hd_valid;
  llop_t            hd_op  [EXT_W];
  logic [AW-1:0]    hd_idx [EXT_W];

  llib #(.DEPTH(LLIB_DEPTH), .IN_W(INS_W), .OUT_W(EXT_W)) u_llib (
    .clk, .rst_n,
    .ins_valid, .ins_op, .ins_idx, .free_cnt(llib_free),
    .ldret_valid, .ldret_idx,
    .hd_valid, .hd_op, .hd_idx, .ext_cnt,
    .rb_valid, .rb_tail,
    .count(llib_count), .blocked(llib_blocked)
  );

  // MPRF: same index as the LLIB
  word_t rd_val [EXT_W];

  mprf #(.DEPTH(LLIB_DEPTH), .NBANK(4), .IN_W(INS_W), .OUT_W(EXT_W)) u_mprf (
    .clk,
    .wr_valid(ins_valid), .wr_idx(ins_idx), .wr_data(ins_val),
    .ld_valid(ldret_valid), .ld_idx(ldret_idx), .ld_data(ldret_data),
    .rd_idx(hd_idx), .rd_data(rd_val)
  );

  // steering
  logic [EXT_W-1:0] placed;
  logic [1:0]       slot_rs  [EXT_W];
  logic             slot_pos [EXT_W];  // allocation port used in that station
  tag_t             slot_tag [EXT_W];

  logic [RSIN-1:0]  rs_al_ok  [NRS];
  tag_t             rs_al_tag [NRS][RSIN];

  always_comb begin
    logic        go;
    logic [1:0]  used [NRS];
    logic [1:0]  c0, c1, pick;
    logic        ok;
    go = 1'b1;
    for (int s = 0; s < NRS; s++) used[s] = '0;
    rs_stall = 1'b0;
    for (int k = 0; k < EXT_W; k++) begin
      placed[k]   = 1'b0;
      slot_rs[k]  = '0;
      slot_pos[k] = 1'b0;
      slot_tag[k] = '0;
      c0   = hd_op[k].is_fp ? 2'd2 : 2'd0;
      c1   = c0 + 2'd1;
      pick = c0;
      ok   = 1'b0;
      if (go && hd_valid[k]) begin
        if (hd_op[k].op == OP_LDRET) ok = 1'b1;
        else begin
          if (hd_op[k].op != OP_MUL && used[c1] < 2'(RSIN) && rs_al_ok[c1][used[c1][0]]) begin
            pick = c1;
            ok   = 1'b1;
          end else if (used[c0] < 2'(RSIN) && rs_al_ok[c0][used[c0][0]]) begin
            pick = c0;
            ok   = 1'b1;
          end
          if (!ok) rs_stall = 1'b1;
        end
      end
      if (go && hd_valid[k] && ok) begin
        placed[k] = 1'b1;
        if (hd_op[k].op != OP_LDRET) begin
          slot_rs[k]  = pick;
          slot_pos[k] = used[pick][0];
          slot_tag[k] = rs_al_tag[pick][used[pick][0]];
          used[pick]  = used[pick] + 2'd1;
        end
      end else go = 1'b0;
    end
    ext_cnt = '0;
    for (int k = 0; k < EXT_W; k++) ext_cnt = ext_cnt + $bits(ext_cnt)'(placed[k]);
  end

  // future file
  logic [EXT_W-1:0] s_isval;
  lreg_t            s_src1 [EXT_W], s_src2 [EXT_W], s_dst [EXT_W];
  opnd_t            ff_o1  [EXT_W], ff_o2  [EXT_W];
  opnd_t            op1    [EXT_W], op2    [EXT_W];

  always_comb begin
    for (int k = 0; k < EXT_W; k++) begin
      s_src1[k]  = hd_op[k].src1;
      s_src2[k]  = hd_op[k].src2;
      s_dst[k]   = hd_op[k].dst;
      s_isval[k] = (hd_op[k].op == OP_LDRET);
      // the READY source comes from the MPRF, the other from the future file
      op1[k] = ff_o1[k];
      op2[k] = ff_o2[k];
      if (hd_op[k].rdy == RDY_SRC1) op1[k] = '{rdy: 1'b1, tag: '0, value: rd_val[k]};
      if (hd_op[k].rdy == RDY_SRC2) op2[k] = '{rdy: 1'b1, tag: '0, value: rd_val[k]};
    end
  end

  future_file #(.NSLOT(EXT_W)) u_ff (
    .clk, .rst_n,
    .s_valid(placed), .s_src1, .s_src2, .s_dst, .s_isval,
    .s_tag(slot_tag), .s_val(rd_val),
    .s_opnd1(ff_o1), .s_opnd2(ff_o2),
    .wb, .arch_val, .arch_rdy
  );

  always_comb begin
    intra_fwd = 1'b0;
    for (int k = 1; k < EXT_W; k++)
      for (int j = 0; j < k; j++)
        if (placed[k] && placed[j] &&
            ((hd_op[k].rdy != RDY_SRC1 && hd_op[k].src1 == hd_op[j].dst) ||
             (hd_op[k].rdy != RDY_SRC2 && hd_op[k].src2 == hd_op[j].dst)))
          intra_fwd = 1'b1;
  end

  // reservation stations and units
  logic [NRS-1:0] rs_busy;
  for (genvar s = 0; s < NRS; s++) begin : g_rs
    logic [RSIN-1:0] al_valid;
    op_e             al_op [RSIN];
    opnd_t           al_s1 [RSIN], al_s2 [RSIN];
    logic            is_valid;
    op_e             is_op;
    word_t           is_a, is_b;
    tag_t            is_tag;
    logic [$clog2(RS_ENTRIES):0] cnt;

    always_comb begin
      for (int j = 0; j < RSIN; j++) begin
        al_valid[j] = 1'b0;
        al_op[j]    = OP_ADD;
        al_s1[j]    = '0;
        al_s2[j]    = '0;
        for (int k = 0; k < EXT_W; k++)
          if (placed[k] && hd_op[k].op != OP_LDRET &&
              slot_rs[k] == 2'(s) && slot_pos[k] == 1'(j)) begin
            al_valid[j] = 1'b1;
            al_op[j]    = hd_op[k].op;
            al_s1[j]    = op1[k];
            al_s2[j]    = op2[k];
          end
      end
    end

    mp_rs #(.ENTRIES(RS_ENTRIES), .IN_W(RSIN), .RS_ID(2'(s))) u_rs (
      .clk, .rst_n,
      .al_valid, .al_op, .al_s1, .al_s2,
      .al_ok(rs_al_ok[s]), .al_tag(rs_al_tag[s]),
      .wb,
      .is_valid, .is_op, .is_a, .is_b, .is_tag,
      .count(cnt)
    );

    mp_fu #(.HAS_MUL(s == 0 || s == 2)) u_fu (
      .clk, .rst_n,
      .in_valid(is_valid), .in_op(is_op), .in_a(is_a), .in_b(is_b), .in_tag(is_tag),
      .out(wb[s])
    );

    assign rs_busy[s] = (cnt != '0) || wb[s].valid;
  end

  assign idle = (llib_count == '0) && (rs_busy == '0);

  initial assert (RS_ENTRIES == (1 << (TAG_W - 2)))
    else $error("memory_processor: RS_ENTRIES does not match the tag width");
endmodule
