// mprf: memory-processor register file.
//
// Holds the READY source value of each instruction in the LLIB, one register per
// LLIB slot (the MPRF is exactly as large as the LLIB and shares its index). No
// register is shared between instructions, so every register has a single
// consumer and is free again as soon as it is read: allocation and release simply
// follow the LLIB's head and tail, and no free list is needed.
//
// Because insertion and extraction both touch consecutive slots, the file is split
// into NBANK banks interleaved on the low index bits: NBANK consecutive slots always
// fall in different banks, so each bank needs only one read port and one write port
// for the instruction stream. A second write port per bank takes the data of a
// returning missing load (written into its OP_LDRET marker slot); that port is this
// design's addition: the published design speaks of one read/write port per bank.
//
// Interface: wr_* (up to IN_W writes per cycle at consecutive slots), ld_* (one load
// return per cycle), rd_idx -> rd_data (combinational read of up to OUT_W
// consecutive slots). Writes take effect at the clock edge.
module mprf
  import dkip_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int NBANK = 4,
  parameter int IN_W  = 4,
  parameter int OUT_W = 4
) (
  input  logic                     clk,
  input  logic [IN_W-1:0]          wr_valid,
  input  logic [$clog2(DEPTH)-1:0] wr_idx  [IN_W],
  input  word_t                    wr_data [IN_W],
  input  logic                     ld_valid,
  input  logic [$clog2(DEPTH)-1:0] ld_idx,
  input  word_t                    ld_data,
  input  logic [$clog2(DEPTH)-1:0] rd_idx  [OUT_W],
  output word_t                    rd_data [OUT_W]
);
  localparam int AW  = $clog2(DEPTH);
  localparam int BW  = $clog2(NBANK);
  localparam int BD  = DEPTH / NBANK;
  localparam int BAW = AW - BW;

  word_t          mem        [NBANK][BD];
  logic [BAW-1:0] bank_raddr [NBANK];
  word_t          bank_rdata [NBANK];

  // route each read to its bank: one read per bank and cycle
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      bank_raddr[b] = '0;
      for (int k = 0; k < OUT_W; k++)
        if (rd_idx[k][BW-1:0] == BW'(b)) bank_raddr[b] = rd_idx[k][AW-1:BW];
      bank_rdata[b] = mem[b][bank_raddr[b]];
    end
    for (int k = 0; k < OUT_W; k++)
      rd_data[k] = bank_rdata[rd_idx[k][BW-1:0]];
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < IN_W; k++)
      if (wr_valid[k]) mem[wr_idx[k][BW-1:0]][wr_idx[k][AW-1:BW]] <= wr_data[k];
    if (ld_valid) mem[ld_idx[BW-1:0]][ld_idx[AW-1:BW]] <= ld_data;
  end

  initial assert (NBANK >= IN_W && NBANK >= OUT_W && (BD * NBANK) == DEPTH)
    else $error("mprf: need at least one bank per port");
  always_ff @(posedge clk) begin
    for (int j = 0; j < IN_W; j++)
      for (int k = j + 1; k < IN_W; k++)
        assert (!(wr_valid[j] && wr_valid[k] && wr_idx[j][BW-1:0] == wr_idx[k][BW-1:0]))
          else $error("mprf: two instruction writes to one bank");
    for (int j = 0; j < OUT_W; j++)
      for (int k = j + 1; k < OUT_W; k++)
        assert (!(rd_idx[j][BW-1:0] == rd_idx[k][BW-1:0] && rd_idx[j] != rd_idx[k]))
          else $error("mprf: two reads from one bank");
  end
endmodule
