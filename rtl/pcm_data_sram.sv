// pcm_data_sram: bit-slice organised data array of the L1 data cache.
//
// A 1 KB line is kept as it arrives from memory: 32 bit-slices of 256 bits, slice k holding
// bit 31-k of each of the line's 256 words. The array is split into one bank per slice, each
// SETS*WAYS entries of 256 bits with one write and one read port, so a returning slice is
// written in one cycle and a read fetches the same 8-word sector from all 32 slice banks at
// once. The read returns, per slice, the 8 bits that belong to the requested words (still in
// slice order); the shuffle logic turns them into words. Read is synchronous, one cycle.
// Slice ordering follows the published design; the sector-wide read and one-cycle timing
// are this design's choices.
module pcm_data_sram
  import pcm_pkg::*;
#(
  parameter int unsigned SETS = 4,
  parameter int unsigned WAYS = 8,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = $clog2(WAYS)
) (
  input  logic                                clk,
  input  logic                                wr_en,
  input  logic [SET_W-1:0]                    wr_set,
  input  logic [WAY_W-1:0]                    wr_way,
  input  kth_t                                wr_kth,
  input  slice_t                              wr_data,
  input  logic                                rd_en,
  input  logic [SET_W-1:0]                    rd_set,
  input  logic [WAY_W-1:0]                    rd_way,
  input  logic [SECT_W-1:0]                   rd_sector,
  output logic [NSLICE-1:0][SECTOR_WORDS-1:0] rd_bits   // [slice][word in sector]
);
  localparam int unsigned DEPTH = SETS * WAYS;

  for (genvar k = 0; k < NSLICE; k++) begin : g_slice
    slice_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_kth == kth_t'(k)) mem[{wr_set, wr_way}] <= wr_data;
      if (rd_en) rd_bits[k] <= mem[{rd_set, rd_way}][rd_sector*SECTOR_WORDS +: SECTOR_WORDS];
    end
  end
endmodule
