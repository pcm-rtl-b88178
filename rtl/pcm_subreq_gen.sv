// pcm_subreq_gen: sub-request generator of the L1 data cache.
//
// A line request (read miss or prefetch) arrives with the line address and the fetch mask,
// a word-bit mask telling which bit-slices to fetch. The generator then emits one
// sub-request per selected slice, one per cycle on a valid/ready port, most significant slice
// first. Each sub-request carries the R/W bit, a new address (line base plus the slice offset
// kth * 32 B, so that it points at the slice) and the slice index kth. Internally it keeps the
// remaining-slice mask, a running offset and the count of issued slices, as in the published
// block diagram. The offset value, the MSB-first order and the handshake are this design's
// choices. in_ready is high when the generator is idle; a request with an empty mask
// completes at once.
module pcm_subreq_gen
  import pcm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_rw,
  input  line_t             in_line,
  input  word_t             in_mask,     // word-bit mask of slices to issue
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_rw,
  output line_t             out_line,
  output logic [ADDR_W-1:0] out_addr,    // line base + kth * SLICE_BYTES
  output kth_t              out_kth,
  output logic [KTH_W:0]    count        // slices issued for the current request
);
  logic   busy;
  logic   rw_q;
  line_t  line_q;
  smask_t pend_q;     // slices still to issue
  kth_t   next_k;

  // first pending slice (MSB first)
  always_comb begin
    next_k = '0;
    for (int k = NSLICE-1; k >= 0; k--) if (pend_q[k]) next_k = kth_t'(k);
  end

  assign in_ready  = !busy;
  assign out_valid = busy;
  assign out_rw    = rw_q;
  assign out_line  = line_q;
  assign out_kth   = next_k;
  assign out_addr  = {line_q, {$clog2(LINE_BYTES){1'b0}}} + ADDR_W'(next_k) * ADDR_W'(SLICE_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      rw_q   <= 1'b0;
      line_q <= '0;
      pend_q <= '0;
      count  <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy   <= |in_mask;
        rw_q   <= in_rw;
        line_q <= in_line;
        pend_q <= slice_mask(in_mask);
        count  <= '0;
      end
    end else if (out_ready) begin
      smask_t left;
      left = pend_q & ~(smask_t'(1) << next_k);
      pend_q <= left;
      count  <= count + 1'b1;
      if (left == '0) busy <= 1'b0;
    end
  end
endmodule
