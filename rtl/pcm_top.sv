// pcm_top: precision-controlled memory path of one GPU core (PCM).
//
// Software picks a training precision by writing the fetch mask, fill mask and per-slice
// refresh modes into the CSRs. The L1 data cache then fetches only the selected bit-slices
// of each 1 KB transposed line and rebuilds hard-approximated words for the core; its
// bit-slice sub-requests leave the top already placed on an HBM channel, bank, row and
// column by the transposed address mapping (slice k in channel k mod 16, slices 0..15 in an
// even bank, 16..31 in the odd one). One refresh controller per channel refreshes the bank of
// each slice at the normal period, at a stretched period or not at all, as the slice's mode
// says. A CTA throttle limits the threads resident on the core.
//
// Interconnect, L2, the DRAM command scheduler and the HBM devices are outside: sub-requests
// are brought out on mem_req_* (valid/ready) with their mapped coordinates, slices return on
// mem_resp_*, and refresh requests leave per channel on ref_valid/ref_bank/ref_ready.
// The composition follows the published architecture overview; the port bundling is this
// design's choice.
module pcm_top
  import pcm_pkg::*;
#(
  parameter int unsigned NUM_CH       = 16,
  parameter int unsigned NUM_BANKS    = 16,
  parameter int unsigned REF_INTERVAL = 3900,
  parameter int unsigned MAX_THREADS  = 1024,
  parameter int unsigned MAX_CTAS     = 2,
  localparam int unsigned BANK_W = $clog2(NUM_BANKS),
  localparam int unsigned THR_W  = $clog2(MAX_THREADS+1),
  localparam int unsigned ROW_W  = LINE_W - 5 - (BANK_W - 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration registers
  input  logic                      cfg_wr_en,
  input  logic [2:0]                cfg_wr_addr,
  input  word_t                     cfg_wr_data,
  input  logic [2:0]                cfg_rd_addr,
  output word_t                     cfg_rd_data,
  input  logic                      pf_enable,
  // CTA admission
  input  logic                      cta_launch_valid,
  input  logic [THR_W-1:0]          cta_launch_threads,
  output logic                      cta_launch_ready,
  input  logic                      cta_done_valid,
  input  logic [THR_W-1:0]          cta_done_threads,
  output logic [THR_W-1:0]          cta_active_threads,
  output logic [$clog2(MAX_CTAS+1)-1:0] cta_active_ctas,
  // core side
  input  logic                      core_req_valid,
  output logic                      core_req_ready,
  input  logic                      core_req_we,
  input  logic [ADDR_W-1:0]         core_req_addr,
  input  sector_t                   core_req_wdata,
  input  logic [SECTOR_WORDS-1:0]   core_req_wmask,
  output logic                      core_resp_valid,
  output sector_t                   core_resp_data,
  // memory side: bit-slice sub-requests with their HBM coordinates
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output subreq_t                   mem_req,
  output logic [$clog2(NUM_CH)-1:0] mem_req_ch,
  output logic [BANK_W-1:0]         mem_req_bank,
  output logic [ROW_W-1:0]          mem_req_row,
  output logic [4:0]                mem_req_col,
  input  logic                      mem_resp_valid,
  input  line_t                     mem_resp_line,
  input  kth_t                      mem_resp_kth,
  input  slice_t                    mem_resp_data,
  // refresh requests per channel
  output logic [NUM_CH-1:0]         ref_valid,
  output logic [BANK_W-1:0]         ref_bank [NUM_CH],
  input  logic [NUM_CH-1:0]         ref_ready,
  output logic [31:0]               ref_issued  [NUM_CH],
  output logic [31:0]               ref_omitted [NUM_CH],
  // L1 event counters: hit, miss, prefetch issued, prefetch dropped, in-flight wait,
  // flush wait, write-buffer evictions (full, victim, flush)
  output logic [31:0]               l1_events [9]
);
  word_t     fetch_mask, fill_mask;
  ref_mode_e ref_mode [NSLICE];
  logic [7:0] skip_ratio;

  pcm_csr u_csr (
    .clk, .rst_n, .wr_en(cfg_wr_en), .wr_addr(cfg_wr_addr), .wr_data(cfg_wr_data),
    .rd_addr(cfg_rd_addr), .rd_data(cfg_rd_data),
    .fetch_mask, .fill_mask, .ref_mode, .skip_ratio
  );

  pcm_cta_throttle #(.MAX_THREADS(MAX_THREADS), .MAX_CTAS(MAX_CTAS)) u_cta (
    .clk, .rst_n, .launch_valid(cta_launch_valid), .launch_threads(cta_launch_threads),
    .launch_ready(cta_launch_ready), .done_valid(cta_done_valid), .done_threads(cta_done_threads),
    .active_ctas(cta_active_ctas), .active_threads(cta_active_threads)
  );

  pcm_l1d u_l1d (
    .clk, .rst_n, .fetch_mask, .fill_mask, .pf_enable,
    .core_req_valid, .core_req_ready, .core_req_we, .core_req_addr, .core_req_wdata, .core_req_wmask,
    .core_resp_valid, .core_resp_data,
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_resp_valid, .mem_resp_line, .mem_resp_kth, .mem_resp_data,
    .cnt_hit(l1_events[0]), .cnt_miss(l1_events[1]), .cnt_pf_issue(l1_events[2]), .cnt_pf_drop(l1_events[3]),
    .cnt_inflight_wait(l1_events[4]), .cnt_flush_wait(l1_events[5]),
    .cnt_wb_full_evict(l1_events[6]), .cnt_wb_victim_evict(l1_events[7]), .cnt_wb_flush_evict(l1_events[8])
  );

  pcm_addr_map #(.NUM_CH(NUM_CH), .NUM_BANKS(NUM_BANKS), .COL_BITS(5), .ROW_BITS(ROW_W)) u_map (
    .line_addr(mem_req.line), .kth(mem_req.kth),
    .ch(mem_req_ch), .bank(mem_req_bank), .row(mem_req_row), .col(mem_req_col)
  );

  // channel c holds slice c in its even banks and slice c+NUM_CH in its odd banks
  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    pcm_refresh_ctrl #(.NUM_BANKS(NUM_BANKS), .REF_INTERVAL(REF_INTERVAL)) u_ref (
      .clk, .rst_n,
      .mode_even(ref_mode[c]), .mode_odd(ref_mode[c + NUM_CH]), .skip_ratio,
      .ref_valid(ref_valid[c]), .ref_bank(ref_bank[c]), .ref_ready(ref_ready[c]),
      .cnt_issued(ref_issued[c]), .cnt_omitted(ref_omitted[c])
    );
  end
endmodule
