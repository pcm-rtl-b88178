// pcm_l1d: precision-controlled L1 data cache of one GPU core.
//
// Memory keeps data transposed, so the L1 is the first level where bit-slices can be turned
// back into words. The cache holds 1 KB lines (4 sets x 8 ways = 32 KB) in slice order. On a
// read miss the sub-request generator emits one 32 B sub-request per bit-slice selected by the
// fetch mask; one MSHR entry gathers the returning slices and marks the line valid when all
// have arrived. A read hit reads one 32 B sector from every slice bank and the shuffle logic
// ORs the fill mask into the slices that were not fetched and reorders bits into words, so
// the core sees hard-approximated words at the chosen precision (a line fetched at a higher
// precision than now asked for is cut down to the current fetch mask on the way out). A next-line prefetcher
// fetches line L+1 after a miss to line L. Writes bypass the data array (a matching line is
// invalidated) and go to a write buffer that sends whole lines to memory as slice writes.
//
// Core port: one request at a time (valid/ready), a 32 B sector of 8 words; reads answer on
// core_resp_* 3 clock edges after the accepting edge on a hit (lookup and
// SRAM read, then 2 shuffle stages); a read
// miss holds the port until the line is filled. Memory port: subreq_t on valid/ready, write
// evictions before read sub-requests; returning slices on mem_resp_* are always accepted.
// The block structure follows the published L1; the one-request core port, the arbitration
// and the counters are this design's choices.
module pcm_l1d
  import pcm_pkg::*;
#(
  parameter int unsigned SETS         = 4,
  parameter int unsigned WAYS         = 8,
  parameter int unsigned MSHR_ENTRIES = 4,
  parameter int unsigned WB_ENTRIES   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  word_t                   fetch_mask,
  input  word_t                   fill_mask,
  input  logic                    pf_enable,
  // core
  input  logic                    core_req_valid,
  output logic                    core_req_ready,
  input  logic                    core_req_we,
  input  logic [ADDR_W-1:0]       core_req_addr,     // 32 B aligned
  input  sector_t                 core_req_wdata,
  input  logic [SECTOR_WORDS-1:0] core_req_wmask,
  output logic                    core_resp_valid,
  output sector_t                 core_resp_data,
  // memory
  output logic                    mem_req_valid,
  input  logic                    mem_req_ready,
  output subreq_t                 mem_req,
  input  logic                    mem_resp_valid,
  input  line_t                   mem_resp_line,
  input  kth_t                    mem_resp_kth,
  input  slice_t                  mem_resp_data,
  // event counters
  output logic [31:0]             cnt_hit,
  output logic [31:0]             cnt_miss,
  output logic [31:0]             cnt_pf_issue,
  output logic [31:0]             cnt_pf_drop,
  output logic [31:0]             cnt_inflight_wait,   // cycles a read waited on a line already in flight
  output logic [31:0]             cnt_flush_wait,      // cycles a read waited for a write-buffer flush
  output logic [31:0]             cnt_wb_full_evict,
  output logic [31:0]             cnt_wb_victim_evict,
  output logic [31:0]             cnt_wb_flush_evict
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);

  typedef enum logic {S_IDLE, S_ACCESS} state_e;
  state_e state;

  logic                    req_we;
  logic [ADDR_W-1:0]       req_addr;
  sector_t                 req_wdata;
  logic [SECTOR_WORDS-1:0] req_wmask;
  line_t                   req_line;
  logic [SECT_W-1:0]       req_sect;
  smask_t                  need_mask;

  assign req_line  = req_addr[ADDR_W-1 -: LINE_W];
  assign req_sect  = req_addr[$clog2(LINE_BYTES)-1 -: SECT_W];
  assign need_mask = slice_mask(fetch_mask);

  // ---- tag array ----
  logic             a_hit, a_present, a_victim_ok, b_present, b_victim_ok;
  logic [WAY_W-1:0] a_way, a_victim, b_victim;
  smask_t           a_lmask;
  logic             tg_alloc, tg_fill, tg_inval, tg_touch;
  line_t            tg_alloc_line, tg_touch_line;
  logic [WAY_W-1:0] tg_alloc_way, tg_touch_way;
  // ---- mshr ----
  logic             ms_full, ms_a_hit, ms_b_hit, ms_resp_match, ms_done;
  logic [WAY_W-1:0] ms_resp_way, ms_done_way;
  line_t            ms_done_line;
  // ---- sub-request generator ----
  logic             sg_in_valid, sg_in_ready, sg_out_valid, sg_out_ready, sg_out_rw;
  line_t            sg_out_line;
  kth_t             sg_out_kth;
  logic [ADDR_W-1:0] sg_out_addr;
  // ---- prefetcher ----
  logic             pf_valid, pf_ready, pf_miss;
  line_t            pf_line;
  // ---- write buffer ----
  logic             wb_wr_valid, wb_wr_ready, wb_flush, wb_holds, wb_probe_hit;
  logic             ev_valid, ev_ready;
  line_t            ev_line;
  kth_t             ev_kth;
  slice_t           ev_data, ev_wmask;

  // ---- demand and prefetch decisions ----
  logic dem_rd, dem_wr, dem_hit, dem_alloc, pf_alloc;
  logic [WAY_W-1:0] dem_way;

  always_comb begin
    dem_rd    = (state == S_ACCESS) && !req_we;
    dem_wr    = (state == S_ACCESS) &&  req_we;
    dem_hit   = dem_rd && a_hit;
    wb_flush  = dem_rd && !a_hit && !ms_a_hit && wb_holds;
    dem_way   = a_present ? a_way : a_victim;          // re-fill a low-precision copy in place
    dem_alloc = dem_rd && !a_hit && !ms_a_hit && !wb_holds && !ms_full && sg_in_ready &&
                (a_present || a_victim_ok);
    wb_wr_valid = dem_wr && !ms_a_hit;
    // prefetch: drop when cached, in flight or buffered; otherwise issue when resources allow
    pf_alloc  = 1'b0;
    pf_ready  = 1'b0;
    if (pf_valid) begin
      if (b_present || ms_b_hit || wb_probe_hit) pf_ready = 1'b1;
      else if (!dem_alloc && !ms_full && sg_in_ready && b_victim_ok) begin
        pf_alloc = 1'b1;
        pf_ready = 1'b1;
      end
    end
    pf_miss = dem_alloc;

    tg_alloc      = dem_alloc || pf_alloc;
    tg_alloc_line = dem_alloc ? req_line : pf_line;
    tg_alloc_way  = dem_alloc ? dem_way  : b_victim;
    tg_fill       = ms_done;
    tg_inval      = dem_wr && wb_wr_ready && !ms_a_hit && a_present;
    tg_touch      = dem_hit || tg_alloc;
    tg_touch_line = (dem_hit || dem_alloc) ? req_line : pf_line;
    tg_touch_way  = dem_hit ? a_way : tg_alloc_way;

    sg_in_valid   = tg_alloc;
  end

  pcm_tag_array #(.SETS(SETS), .WAYS(WAYS)) u_tag (
    .clk, .rst_n, .need_mask,
    .a_line(req_line), .a_hit, .a_present, .a_way, .a_lmask, .a_victim_ok, .a_victim,
    .b_line(pf_line), .b_present, .b_victim_ok, .b_victim,
    .alloc_en(tg_alloc), .alloc_line(tg_alloc_line), .alloc_way(tg_alloc_way), .alloc_lmask(need_mask),
    .fill_en(tg_fill), .fill_line(ms_done_line), .fill_way(ms_done_way),
    .inval_en(tg_inval), .inval_line(req_line), .inval_way(a_way),
    .touch_en(tg_touch), .touch_line(tg_touch_line), .touch_way(tg_touch_way)
  );

  pcm_mshr #(.ENTRIES(MSHR_ENTRIES), .WAY_W(WAY_W)) u_mshr (
    .clk, .rst_n,
    .alloc_valid(tg_alloc), .alloc_line(tg_alloc_line), .alloc_way(tg_alloc_way), .alloc_fetch_mask(fetch_mask),
    .full(ms_full),
    .lookup_a_line(req_line), .lookup_a_hit(ms_a_hit),
    .lookup_b_line(pf_line),  .lookup_b_hit(ms_b_hit),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line), .resp_kth(mem_resp_kth),
    .resp_match(ms_resp_match), .resp_way(ms_resp_way),
    .done_valid(ms_done), .done_line(ms_done_line), .done_way(ms_done_way), .used()
  );

  pcm_subreq_gen u_sg (
    .clk, .rst_n,
    .in_valid(sg_in_valid), .in_ready(sg_in_ready), .in_rw(1'b0), .in_line(tg_alloc_line), .in_mask(fetch_mask),
    .out_valid(sg_out_valid), .out_ready(sg_out_ready), .out_rw(sg_out_rw), .out_line(sg_out_line),
    .out_addr(sg_out_addr), .out_kth(sg_out_kth), .count()
  );

  pcm_prefetcher u_pf (
    .clk, .rst_n, .enable(pf_enable), .miss_valid(pf_miss), .miss_line(req_line),
    .pf_valid, .pf_line, .pf_ready
  );

  pcm_write_buffer #(.ENTRIES(WB_ENTRIES)) u_wb (
    .clk, .rst_n,
    .wr_valid(wb_wr_valid), .wr_ready(wb_wr_ready), .wr_addr(req_addr), .wr_data(req_wdata), .wr_wmask(req_wmask),
    .flush_valid(wb_flush), .flush_line(req_line), .holds_line(wb_holds),
    .probe_line(pf_line), .probe_hit(wb_probe_hit),
    .ev_valid, .ev_ready, .ev_line, .ev_kth, .ev_data, .ev_wmask,
    .cnt_full_evict(cnt_wb_full_evict), .cnt_victim_evict(cnt_wb_victim_evict), .cnt_flush_evict(cnt_wb_flush_evict)
  );

  // ---- memory request arbitration: write evictions first ----
  assign mem_req_valid = ev_valid || sg_out_valid;
  assign ev_ready      = mem_req_ready;
  assign sg_out_ready  = mem_req_ready && !ev_valid;
  always_comb begin
    if (ev_valid) mem_req = '{rw: 1'b1, addr: {ev_line, {$clog2(LINE_BYTES){1'b0}}} + ADDR_W'(ev_kth) * ADDR_W'(SLICE_BYTES),
                              line: ev_line, kth: ev_kth, data: ev_data, wmask: ev_wmask};
    else          mem_req = '{rw: sg_out_rw, addr: sg_out_addr, line: sg_out_line, kth: sg_out_kth, data: '0, wmask: '0};
  end

  // ---- data array and read path ----
  logic [NSLICE-1:0][SECTOR_WORDS-1:0] rd_bits;
  logic   rd_q;
  smask_t lmask_q;

  pcm_data_sram #(.SETS(SETS), .WAYS(WAYS)) u_data (
    .clk,
    .wr_en(mem_resp_valid && ms_resp_match), .wr_set(mem_resp_line[SET_W-1:0]), .wr_way(ms_resp_way),
    .wr_kth(mem_resp_kth), .wr_data(mem_resp_data),
    .rd_en(dem_hit), .rd_set(req_line[SET_W-1:0]), .rd_way(a_way), .rd_sector(req_sect),
    .rd_bits
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= 1'b0; lmask_q <= '0;
    end else begin
      rd_q    <= dem_hit;
      lmask_q <= a_lmask & need_mask;   // deliver only the precision asked for now
    end
  end

  logic [0:0] sh_tag_unused;
  pcm_shuffle #(.NSL(NSLICE), .NWORDS(SECTOR_WORDS), .TAG_W(1)) u_shuffle (
    .clk, .rst_n, .in_valid(rd_q), .in_bits(rd_bits), .line_mask(lmask_q), .fill_mask(fill_mask),
    .in_tag(1'b0), .out_valid(core_resp_valid), .out_words(core_resp_data), .out_tag(sh_tag_unused)
  );

  // ---- core request FSM ----
  assign core_req_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      req_we <= 1'b0; req_addr <= '0; req_wdata <= '0; req_wmask <= '0;
      cnt_hit <= '0; cnt_miss <= '0; cnt_pf_issue <= '0; cnt_pf_drop <= '0;
      cnt_inflight_wait <= '0; cnt_flush_wait <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (core_req_valid) begin
          state     <= S_ACCESS;
          req_we    <= core_req_we;
          req_addr  <= core_req_addr;
          req_wdata <= core_req_wdata;
          req_wmask <= core_req_wmask;
        end
        S_ACCESS: begin
          if (dem_hit) state <= S_IDLE;
          if (dem_wr && wb_wr_valid && wb_wr_ready) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (dem_hit)   cnt_hit  <= cnt_hit + 1'b1;
      if (dem_alloc) cnt_miss <= cnt_miss + 1'b1;
      if (pf_alloc)  cnt_pf_issue <= cnt_pf_issue + 1'b1;
      if (pf_valid && pf_ready && !pf_alloc) cnt_pf_drop <= cnt_pf_drop + 1'b1;
      if ((dem_rd || dem_wr) && ms_a_hit) cnt_inflight_wait <= cnt_inflight_wait + 1'b1;
      if (wb_flush) cnt_flush_wait <= cnt_flush_wait + 1'b1;
    end
  end
endmodule
