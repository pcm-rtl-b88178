// pcm_pkg: constants and types shared by the precision-controlled memory (PCM) blocks.
//
// A 32-bit word is stored transposed: the 256 words of a 1 KB line are kept as 32 bit-slices
// of 256 bits (32 B each), one slice per bit position. Slice 0 carries the most significant
// word bit (bit 31) and slice 31 the least significant one. Software-visible masks (fetch
// mask, fill mask) are word-bit masks, bit i standing for word bit i; inside the L1 they are
// turned into slice-indexed masks with slice_mask(). The line/slice geometry, the L1 geometry
// and the channel count follow the published configuration; the address width and the
// refresh-mode encoding are this design's own choices.
package pcm_pkg;

  localparam int unsigned WORD_BITS      = 32;                  // bits per word = slices per line
  localparam int unsigned NSLICE         = WORD_BITS;
  localparam int unsigned WORDS_PER_LINE = 256;                 // bits per slice
  localparam int unsigned SLICE_BITS     = WORDS_PER_LINE;
  localparam int unsigned SLICE_BYTES    = SLICE_BITS / 8;      // 32 B, the DRAM access unit
  localparam int unsigned LINE_BYTES     = SLICE_BYTES * NSLICE; // 1 KB
  localparam int unsigned SECTOR_WORDS   = 8;                   // words per core access (32 B)
  localparam int unsigned NSECTOR        = WORDS_PER_LINE / SECTOR_WORDS;
  localparam int unsigned ADDR_W         = 32;
  localparam int unsigned LINE_W         = ADDR_W - $clog2(LINE_BYTES); // 22
  localparam int unsigned KTH_W          = $clog2(NSLICE);              // 5
  localparam int unsigned SECT_W         = $clog2(NSECTOR);             // 5

  typedef logic [LINE_W-1:0]         line_t;
  typedef logic [KTH_W-1:0]          kth_t;
  typedef logic [WORD_BITS-1:0]      word_t;
  typedef logic [NSLICE-1:0]         smask_t;   // slice-indexed mask, bit k = slice k
  typedef logic [SLICE_BITS-1:0]     slice_t;   // one bit-slice of a line
  typedef word_t [SECTOR_WORDS-1:0]  sector_t;  // 8 words as the core sees them

  // Refresh treatment of one bit-slice.
  typedef enum logic [1:0] {
    REF_PROTECT = 2'd0,   // refreshed at the normal period
    REF_SKIP    = 2'd1,   // refreshed at a stretched period (soft approximation)
    REF_IGNORE  = 2'd2    // never refreshed (slice not used)
  } ref_mode_e;

  // Memory-side sub-request: one bit-slice of one line.
  typedef struct packed {
    logic   rw;      // 1 = write
    logic [ADDR_W-1:0] addr; // byte address of the slice: line base + kth * SLICE_BYTES
    line_t  line;    // 1 KB line address
    kth_t   kth;     // bit-slice index
    slice_t data;    // write data (bit j = word j of the line)
    slice_t wmask;   // write enable per word
  } subreq_t;

  // Word-bit mask (bit i = word bit i) to slice-indexed mask (bit k = slice k = word bit 31-k).
  function automatic smask_t slice_mask(input word_t m);
    smask_t s;
    for (int k = 0; k < NSLICE; k++) s[k] = m[NSLICE-1-k];
    return s;
  endfunction

endpackage
