// pcm_write_buffer: write-combining buffer in front of the bit-sliced memory.
//
// Core writes bypass the L1 data array. Because memory holds lines transposed, a small write
// would turn into 32 tiny slice writes, each far below the 32 B DRAM access unit. The buffer
// therefore collects write data into whole 1 KB lines: each word goes straight to its place
// in its line (direct mapping inside the line), and lines are looked up associatively. A line
// is evicted (a) when a write hits it and the line becomes fully written, or (b) as the least
// recently used line when a write misses and no line is free. A flush request (a read miss to
// a buffered line) also evicts the line; a probe port tells whether a line is buffered. Eviction sends the line as 32 write sub-requests,
// one per bit-slice (MSB slice first), each with 256 data bits and a 256-bit word enable for
// partly written lines; writes are not accepted while a line is being evicted. The two
// eviction rules follow the published design; the entry count, the flush path and the word
// enables are this design's choices.
module pcm_write_buffer
  import pcm_pkg::*;
#(
  parameter int unsigned ENTRIES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // core writes: one 32 B sector
  input  logic                  wr_valid,
  output logic                  wr_ready,
  input  logic [ADDR_W-1:0]     wr_addr,
  input  sector_t               wr_data,
  input  logic [SECTOR_WORDS-1:0] wr_wmask,
  // flush of one line
  input  logic                  flush_valid,
  input  line_t                 flush_line,
  output logic                  holds_line,
  // probe of one line (prefetch must not read around buffered data)
  input  line_t                 probe_line,
  output logic                  probe_hit,
  // write sub-requests to memory
  output logic                  ev_valid,
  input  logic                  ev_ready,
  output line_t                 ev_line,
  output kth_t                  ev_kth,
  output slice_t                ev_data,
  output slice_t                ev_wmask,
  // event counters
  output logic [31:0]           cnt_full_evict,
  output logic [31:0]           cnt_victim_evict,
  output logic [31:0]           cnt_flush_evict
);
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic                 valid [ENTRIES];
  line_t                lines [ENTRIES];
  logic [IDX_W-1:0]     age   [ENTRIES];     // 0 = most recently used
  word_t                data  [ENTRIES][WORDS_PER_LINE];
  slice_t               wmask [ENTRIES];

  logic                 ev_busy;
  logic [IDX_W-1:0]     ev_idx;
  kth_t                 ev_k;

  line_t                wr_line;
  logic [SECT_W-1:0]    wr_sect;
  logic                 hit, have_free, fl_hit;
  logic [IDX_W-1:0]     hit_idx, free_idx, fl_idx, victim_idx, use_idx;
  slice_t               new_bits;

  assign wr_line = wr_addr[ADDR_W-1 -: LINE_W];
  assign wr_sect = wr_addr[$clog2(LINE_BYTES)-1 -: SECT_W];

  always_comb begin
    hit = 1'b0; hit_idx = '0; have_free = 1'b0; free_idx = '0;
    fl_hit = 1'b0; fl_idx = '0; victim_idx = '0; probe_hit = 1'b0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (valid[i] && lines[i] == wr_line)    begin hit = 1'b1;       hit_idx = IDX_W'(i); end
      if (!valid[i])                          begin have_free = 1'b1; free_idx = IDX_W'(i); end
      if (valid[i] && lines[i] == flush_line) begin fl_hit = 1'b1;    fl_idx = IDX_W'(i); end
      if (valid[i] && lines[i] == probe_line) probe_hit = 1'b1;
      if (age[i] == IDX_W'(ENTRIES-1))        victim_idx = IDX_W'(i);
    end
    use_idx  = hit ? hit_idx : free_idx;
    new_bits = '0;
    new_bits[wr_sect*SECTOR_WORDS +: SECTOR_WORDS] = wr_wmask;
    holds_line = fl_hit;
    wr_ready   = !ev_busy && !(flush_valid && fl_hit) && (hit || have_free);
  end

  assign ev_valid = ev_busy;
  assign ev_line  = lines[ev_idx];
  assign ev_kth   = ev_k;
  assign ev_wmask = wmask[ev_idx];
  always_comb
    for (int j = 0; j < WORDS_PER_LINE; j++) ev_data[j] = data[ev_idx][j][kth_t'(NSLICE-1) - ev_k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid[i] <= 1'b0; lines[i] <= '0; wmask[i] <= '0; age[i] <= IDX_W'(i);
      end
      ev_busy <= 1'b0; ev_idx <= '0; ev_k <= '0;
      cnt_full_evict <= '0; cnt_victim_evict <= '0; cnt_flush_evict <= '0;
    end else if (ev_busy) begin
      if (ev_ready) begin
        ev_k <= ev_k + 1'b1;
        if (ev_k == kth_t'(NSLICE-1)) begin
          valid[ev_idx] <= 1'b0;
          wmask[ev_idx] <= '0;
          ev_busy       <= 1'b0;
        end
      end
    end else if (flush_valid && fl_hit) begin
      ev_busy <= 1'b1; ev_idx <= fl_idx; ev_k <= '0;
      cnt_flush_evict <= cnt_flush_evict + 1'b1;
    end else if (wr_valid) begin
      if (wr_ready) begin
        valid[use_idx] <= 1'b1;
        lines[use_idx] <= wr_line;
        for (int j = 0; j < SECTOR_WORDS; j++)
          if (wr_wmask[j]) data[use_idx][wr_sect*SECTOR_WORDS + j] <= wr_data[j];
        wmask[use_idx] <= (hit ? wmask[use_idx] : '0) | new_bits;
        for (int i = 0; i < ENTRIES; i++)
          if (age[i] < age[use_idx]) age[i] <= age[i] + 1'b1;
        age[use_idx] <= '0;
        if (hit && ((wmask[use_idx] | new_bits) == '1)) begin
          ev_busy <= 1'b1; ev_idx <= use_idx; ev_k <= '0;
          cnt_full_evict <= cnt_full_evict + 1'b1;
        end
      end else begin
        // miss with every line in use: evict the LRU line first
        ev_busy <= 1'b1; ev_idx <= victim_idx; ev_k <= '0;
        cnt_victim_evict <= cnt_victim_evict + 1'b1;
      end
    end
  end
endmodule
