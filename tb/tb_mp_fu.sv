// tb_mp_fu: self-checking test of the memory-processor functional unit.
//
// Random operations and operands are issued every cycle into a unit with the
// multiplier; the result bus must show the valid bit, the tag and the expected
// value exactly one cycle later. A second unit without multiplier gets the
// non-multiply operations.
module tb_mp_fu;
  import dkip_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid;
  op_e   in_op, in_op2;
  word_t in_a, in_b;
  tag_t  in_tag;
  wb_t   out, out2;

  mp_fu #(.HAS_MUL(1'b1)) dut  (.clk, .rst_n, .in_valid, .in_op, .in_a, .in_b, .in_tag, .out);
  mp_fu #(.HAS_MUL(1'b0)) dut2 (.clk, .rst_n, .in_valid, .in_op(in_op2), .in_a, .in_b, .in_tag, .out(out2));

  int checks = 0, failures = 0;

  function automatic word_t expect_res(op_e op, word_t a, word_t b);
    word_t r;
    case (op)
      OP_ADD: r = a + b;
      OP_SUB: r = a + ~b + 64'd1;
      OP_AND: r = ~(~a | ~b);
      OP_OR:  r = ~(~a & ~b);
      OP_XOR: r = (a | b) & ~(a & b);
      OP_MUL: begin
        r = '0;
        for (int i = 0; i < XLEN; i++) if (b[i]) r = r + (a << i);
      end
      default: r = a;
    endcase
    return r;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit    v;
    op_e   op, op2;
    word_t a, b;
    tag_t  t;
    in_valid = 1'b0; in_op = OP_ADD; in_op2 = OP_ADD; in_a = '0; in_b = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      v   = ($urandom_range(0, 3) != 0);
      op  = op_e'($urandom_range(0, 5));
      op2 = op_e'($urandom_range(0, 4));
      a   = {$urandom, $urandom};
      b   = ($urandom_range(0, 3) == 0) ? word_t'($urandom_range(0, 9)) : {$urandom, $urandom};
      t   = tag_t'($urandom);
      in_valid = v; in_op = op; in_op2 = op2; in_a = a; in_b = b; in_tag = t;
      @(posedge clk);
      #1;
      checks += 3;
      if (out.valid !== v || (v && (out.tag !== t || out.value !== expect_res(op, a, b)))) begin
        failures++;
        if (failures < 10) $display("FAIL op %s: %h expected %h", op.name(), out.value, expect_res(op, a, b));
      end
      if (out2.valid !== v || (v && out2.value !== expect_res(op2, a, b))) failures++;
      if (v && out2.tag !== t) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
