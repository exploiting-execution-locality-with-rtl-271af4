// tb_mprf: self-checking test of the banked MP register file.
//
// The file is written the way the LLIB uses it: up to four consecutive slots per
// cycle from a moving tail, plus an occasional load-return write into an older
// slot, and read four consecutive slots per cycle from a moving head that trails
// the tail. Every read is compared with an array model; a read of a slot
// rewritten in the same cycle must still return the old value.
module tb_mprf;
  import dkip_pkg::*;

  localparam int DEPTH = 1024;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]    wr_valid;
  logic [AW-1:0] wr_idx  [4];
  word_t         wr_data [4];
  logic          ld_valid;
  logic [AW-1:0] ld_idx;
  word_t         ld_data;
  logic [AW-1:0] rd_idx  [4];
  word_t         rd_data [4];

  mprf #(.DEPTH(DEPTH), .NBANK(4), .IN_W(4), .OUT_W(4)) dut (.*);

  word_t model [DEPTH];
  int    checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tail, head, n;
    tail = 0; head = 0;
    wr_valid = '0; ld_valid = 1'b0; ld_idx = '0; ld_data = '0;
    for (int k = 0; k < 4; k++) begin
      wr_idx[k] = '0; wr_data[k] = '0; rd_idx[k] = '0;
    end
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      wr_valid = '0; ld_valid = 1'b0;
      n = $urandom_range(0, 4);
      for (int k = 0; k < n; k++) begin
        wr_valid[k] = 1'b1;
        wr_idx[k]   = AW'(tail + k);
        wr_data[k]  = {$urandom, $urandom};
      end
      // load return into a slot between head and tail, in a bank the stream writes
      // may also use this cycle
      if (tail - head > 4 && $urandom_range(0, 1) == 1) begin
        ld_valid = 1'b1;
        ld_idx   = AW'(head + 4 + $urandom_range(0, tail - head - 5));
        ld_data  = {$urandom, $urandom};
      end
      for (int k = 0; k < 4; k++) rd_idx[k] = AW'(head + k);
      #1;
      if (tail - head >= 4)
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (rd_data[k] !== model[rd_idx[k]]) begin
            failures++;
            if (failures < 10) $display("FAIL slot %0d: %h expected %h", rd_idx[k], rd_data[k], model[rd_idx[k]]);
          end
        end
      @(posedge clk);
      for (int k = 0; k < 4; k++) if (wr_valid[k]) model[wr_idx[k]] = wr_data[k];
      if (ld_valid) model[ld_idx] = ld_data;
      tail = tail + n;
      if (tail - head >= 4 && $urandom_range(0, 2) != 0) head = head + 4;
      if (tail - head > DEPTH - 8) head = tail - 8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
