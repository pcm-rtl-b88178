// pcm_addr_map: transposed-data address mapping onto HBM.
//
// Every bit-slice of a 1 KB line goes to its own DRAM array so that fetching several slices
// costs only one row activation per array. Slice k is placed in channel k mod NUM_CH; slices
// 0..15 use the even bank and slices 16..31 the odd bank of a bank pair, so two slices in the
// same channel never share a bank and adjacent slices never share a channel. This is the
// published mapping. Which bank pair, row and column a line uses is this design's choice:
// the low line-address bits pick the 32 B column of a 1 KB row, the next bits pick the bank
// pair and the rest the row, which makes (line, slice) -> (channel, bank, row, column) a
// one-to-one map. Purely combinational.
module pcm_addr_map
  import pcm_pkg::*;
#(
  parameter int unsigned NUM_CH    = 16,
  parameter int unsigned NUM_BANKS = 16,
  parameter int unsigned COL_BITS  = 5,    // 32 columns of 32 B in a 1 KB row
  parameter int unsigned ROW_BITS  = LINE_W - COL_BITS - ($clog2(NUM_BANKS) - 1)
) (
  input  line_t                        line_addr,
  input  kth_t                         kth,
  output logic [$clog2(NUM_CH)-1:0]    ch,
  output logic [$clog2(NUM_BANKS)-1:0] bank,
  output logic [ROW_BITS-1:0]          row,
  output logic [COL_BITS-1:0]          col
);
  localparam int unsigned CH_W   = $clog2(NUM_CH);
  localparam int unsigned PAIR_W = $clog2(NUM_BANKS) - 1;
  // slices per bank-pair half: with 32 slices over 16 channels, kth / NUM_CH is 0 or 1
  localparam int unsigned HALF_W = KTH_W - CH_W;

  initial begin
    assert (HALF_W == 1) else $error("pcm_addr_map: needs NSLICE == 2*NUM_CH");
    assert (COL_BITS + PAIR_W + ROW_BITS == LINE_W) else $error("pcm_addr_map: widths do not cover the line address");
  end

  always_comb begin
    ch   = kth[CH_W-1:0];
    bank = {line_addr[COL_BITS +: PAIR_W], kth[KTH_W-1]};
    col  = line_addr[COL_BITS-1:0];
    row  = line_addr[LINE_W-1 -: ROW_BITS];
  end
endmodule
