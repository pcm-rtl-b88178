// pcm_shuffle: fill-mask insertion and slice-to-word reordering on the L1 read path.
//
// Input is NSL slices of NWORDS bits each (slice k = word bit NSL-1-k of every word). Stage 1
// forces slices the line does not hold to 0 and ORs in the fill mask, so the bits that were
// not fetched take the value software chose (for example the half-LSB for rounding). Stage 2
// is the fixed wiring that gathers bit j of every slice into word j. Both stages are
// registered, giving the published two-cycle shuffle latency; a side-band tag travels with
// the data. Masks: line_mask is slice-indexed, fill_mask is a word-bit mask as software
// writes it. Gating vacant slices to 0 before the OR is this design's choice.
module pcm_shuffle #(
  parameter int unsigned NSL    = 32,   // slices = bits per word
  parameter int unsigned NWORDS = 8,    // words per access
  parameter int unsigned TAG_W  = 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [NSL-1:0][NWORDS-1:0]   in_bits,     // [slice][word]
  input  logic [NSL-1:0]               line_mask,   // slice k present
  input  logic [NSL-1:0]               fill_mask,   // word-bit mask
  input  logic [TAG_W-1:0]             in_tag,
  output logic                         out_valid,
  output logic [NWORDS-1:0][NSL-1:0]   out_words,
  output logic [TAG_W-1:0]             out_tag
);
  logic                       v1;
  logic [NSL-1:0][NWORDS-1:0] s1;
  logic [TAG_W-1:0]           t1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; out_valid <= 1'b0;
      s1 <= '0;   out_words <= '0;
      t1 <= '0;   out_tag   <= '0;
    end else begin
      // stage 1: vacant-slice replacement by OR with the fill mask
      v1 <= in_valid;
      t1 <= in_tag;
      for (int k = 0; k < NSL; k++)
        s1[k] <= (in_bits[k] & {NWORDS{line_mask[k]}}) | {NWORDS{fill_mask[NSL-1-k]}};
      // stage 2: slices to words
      out_valid <= v1;
      out_tag   <= t1;
      for (int j = 0; j < NWORDS; j++)
        for (int k = 0; k < NSL; k++)
          out_words[j][NSL-1-k] <= s1[k][j];
    end
  end
endmodule
