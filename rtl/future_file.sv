// future_file: register map of the memory processor.
//
// For every logical register it holds either its newest value or, while that value
// is still being computed in a reservation station, the tag of the producing
// station entry. Because the LLIB is extracted strictly in program order, one such
// table kept up to date at extraction gives every extracted instruction the correct
// producer for each NOT READY source, Tomasulo style.
//
// Each cycle up to NSLOT extracted instructions, in program order, look up their two
// sources and then claim their destination:
//   * a source that an older instruction of the same group writes takes that
//     instruction's tag (or value, for a returned-load marker);
//   * otherwise the table entry is used, with a result appearing on a result bus in
//     this same cycle forwarded into the lookup;
//   * a compute instruction leaves its tag in its destination entry; an OP_LDRET
//     marker writes the returned load value directly.
// Result buses fill entries still waiting for their tag. Lookups are combinational,
// updates happen at the clock edge. At reset every register holds the value 0.
//
// The published D-KIP design names the future file and places it between the LLIB and the
// reservation stations; its organisation here is this design's choice.
module future_file
  import dkip_pkg::*;
#(
  parameter int NSLOT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NSLOT-1:0]  s_valid,
  input  lreg_t             s_src1  [NSLOT],
  input  lreg_t             s_src2  [NSLOT],
  input  lreg_t             s_dst   [NSLOT],
  input  logic [NSLOT-1:0]  s_isval,          // destination gets a value (load marker)
  input  tag_t              s_tag   [NSLOT],  // producer tag of a compute instruction
  input  word_t             s_val   [NSLOT],  // value of a load marker
  output opnd_t             s_opnd1 [NSLOT],
  output opnd_t             s_opnd2 [NSLOT],
  input  wb_t               wb      [NWB],
  output word_t             arch_val [NLREG], // current contents, for observation
  output logic [NLREG-1:0]  arch_rdy
);
  logic [NLREG-1:0] rdy_q;
  tag_t             tag_q [NLREG];
  word_t            val_q [NLREG];

  function automatic opnd_t lookup(lreg_t r, int k);
    opnd_t o;
    o.rdy   = rdy_q[r];
    o.tag   = tag_q[r];
    o.value = val_q[r];
    if (!rdy_q[r])
      for (int w = 0; w < NWB; w++)
        if (wb[w].valid && wb[w].tag == tag_q[r]) begin
          o.rdy   = 1'b1;
          o.value = wb[w].value;
        end
    for (int j = 0; j < NSLOT; j++)
      if (j < k && s_valid[j] && s_dst[j] == r) begin
        o.rdy   = s_isval[j];
        o.tag   = s_tag[j];
        o.value = s_val[j];
      end
    return o;
  endfunction

  always_comb begin
    for (int k = 0; k < NSLOT; k++) begin
      s_opnd1[k] = lookup(s_src1[k], k);
      s_opnd2[k] = lookup(s_src2[k], k);
    end
    for (int r = 0; r < NLREG; r++) arch_val[r] = val_q[r];
    arch_rdy = rdy_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_q <= '1;
      for (int r = 0; r < NLREG; r++) begin
        tag_q[r] <= '0;
        val_q[r] <= '0;
      end
    end else begin
      for (int r = 0; r < NLREG; r++) begin
        if (!rdy_q[r])
          for (int w = 0; w < NWB; w++)
            if (wb[w].valid && wb[w].tag == tag_q[r]) begin
              rdy_q[r] <= 1'b1;
              val_q[r] <= wb[w].value;
            end
        for (int j = 0; j < NSLOT; j++)
          if (s_valid[j] && s_dst[j] == lreg_t'(r)) begin
            rdy_q[r] <= s_isval[j];
            tag_q[r] <= s_tag[j];
            if (s_isval[j]) val_q[r] <= s_val[j];
          end
      end
    end
  end
endmodule
