// mp_fu: functional unit behind one memory-processor reservation station.
//
// Computes op(a, b) for the operation set of dkip_pkg and drives the result, with
// the producer tag, onto its result bus one clock after issue (a single pipeline
// register). It accepts one instruction per cycle. Only a unit built with HAS_MUL
// performs OP_MUL; the dispatcher never sends a multiply to the others.
//
// The published design gives the memory processor four adders and one multiplier and shows
// one unit per station; unit latencies are not given, and one cycle is this
// design's choice. Floating-point stations use the same 64-bit operation set: no
// floating-point format is described.
module mp_fu
  import dkip_pkg::*;
#(
  parameter bit HAS_MUL = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  op_e   in_op,
  input  word_t in_a,
  input  word_t in_b,
  input  tag_t  in_tag,
  output wb_t   out
);
  word_t res;

  always_comb begin
    unique case (in_op)
      OP_ADD:  res = in_a + in_b;
      OP_SUB:  res = in_a - in_b;
      OP_AND:  res = in_a & in_b;
      OP_OR:   res = in_a | in_b;
      OP_XOR:  res = in_a ^ in_b;
      OP_MUL:  res = HAS_MUL ? in_a * in_b : '0;
      default: res = in_a;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else begin
      out.valid <= in_valid;
      out.tag   <= in_tag;
      out.value <= res;
    end
  end

  always_ff @(posedge clk) if (rst_n)
    assert (!(in_valid && in_op == OP_MUL && !HAS_MUL)) else $error("mp_fu: multiply on a unit without multiplier");
endmodule
