// pcm_prefetcher: next-line prefetcher of the L1 data cache.
//
// A demand miss to line L makes line L+1 a prefetch candidate, held in one register until
// the cache controller takes it (pf_ready: issued, or dropped because the line is already
// cached or outstanding). A newer miss replaces a candidate not yet taken. The next-line
// policy is the published one; the single-entry register and replacement rule are this
// design's choices. When enable is low no candidates are made.
module pcm_prefetcher
  import pcm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  miss_valid,
  input  line_t miss_line,
  output logic  pf_valid,
  output line_t pf_line,
  input  logic  pf_ready
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_valid <= 1'b0;
      pf_line  <= '0;
    end else if (enable && miss_valid) begin
      pf_valid <= 1'b1;
      pf_line  <= miss_line + 1'b1;
    end else if (pf_ready) begin
      pf_valid <= 1'b0;
    end
  end
endmodule
