// tb_pcm_l1d: the L1 data cache against the HBM model. Random reads and writes over more lines
// than the cache holds, under several precision settings, compared with a reference memory
// kept here: a read must return (word & fetch_mask) | fill_mask of the latest data. Also
// checks the hit latency, the number of read sub-requests per demand miss (one per fetched
// slice), and that hits, misses, prefetches, waits on in-flight lines, write-buffer flushes
// and both write-buffer eviction kinds all happen.
module tb_pcm_l1d;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  word_t fetch_mask = '1, fill_mask = '0;
  logic pf_enable = 1;
  logic core_req_valid = 0, core_req_ready, core_req_we = 0, core_resp_valid;
  logic [31:0] core_req_addr = '0;
  sector_t core_req_wdata = '0, core_resp_data;
  logic [7:0] core_req_wmask = '0;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  subreq_t mem_req;
  line_t mem_resp_line;
  kth_t mem_resp_kth;
  slice_t mem_resp_data;
  logic [31:0] cnt_hit, cnt_miss, cnt_pf_issue, cnt_pf_drop, cnt_inflight_wait, cnt_flush_wait;
  logic [31:0] cnt_wb_full_evict, cnt_wb_victim_evict, cnt_wb_flush_evict;
  int n_reads, n_writes;

  pcm_l1d dut (.*);

  tb_hbm_model #(.LATENCY(20), .STALL(1)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line), .resp_kth(mem_resp_kth), .resp_data(mem_resp_data),
    .n_reads, .n_writes);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference memory
  word_t ref_mem [line_t][256];
  function automatic word_t ref_word(line_t l, int j);
    if (ref_mem.exists(l)) return ref_mem[l][j];
    return word_t'(32'(l) * 32'h9E37_79B1) ^ word_t'(j * 32'h0101_0101 + 32'h5A5A_0000);
  endfunction

  int hit_lat_checked = 0;

  task automatic do_read(input line_t l, input int sec);
    int lat, h0, m0, r0;
    @(negedge clk);
    while (!core_req_ready) @(negedge clk);
    core_req_valid = 1; core_req_we = 0; core_req_addr = {l, 5'(sec), 5'd0};
    h0 = int'(cnt_hit); m0 = int'(cnt_miss); r0 = n_reads;
    @(posedge clk); #1;                        // accepted at this edge
    core_req_valid = 0;
    lat = 0;
    while (!core_resp_valid) begin @(posedge clk); #1; lat++; end
    // first access missed if cnt_miss moved; a pure hit must take exactly 3 edges
    if (int'(cnt_miss) == m0 && int'(cnt_hit) == h0 + 1 && lat == 3) hit_lat_checked++;
    else if (int'(cnt_miss) == m0 && int'(cnt_inflight_wait) == 0) check(lat == 3, $sformatf("hit latency %0d", lat));
    for (int j = 0; j < 8; j++) begin
      word_t e;
      e = (ref_word(l, sec*8 + j) & fetch_mask) | fill_mask;
      check(core_resp_data[j] == e, $sformatf("read line %0h word %0d got %h exp %h (fetch %h)", l, sec*8+j, core_resp_data[j], e, fetch_mask));
    end
  endtask

  task automatic do_write(input line_t l, input int sec, input logic [7:0] m);
    @(negedge clk);
    while (!core_req_ready) @(negedge clk);
    core_req_valid = 1; core_req_we = 1; core_req_addr = {l, 5'(sec), 5'd0}; core_req_wmask = m;
    for (int j = 0; j < 8; j++) core_req_wdata[j] = $urandom;
    @(posedge clk); #1;
    core_req_valid = 0;
    if (!ref_mem.exists(l)) begin
      word_t init [256];
      for (int j = 0; j < 256; j++) init[j] = ref_word(l, j);
      for (int j = 0; j < 256; j++) ref_mem[l][j] = init[j];
    end
    for (int j = 0; j < 8; j++) if (m[j]) ref_mem[l][sec*8 + j] = core_req_wdata[j];
    while (!core_req_ready) @(posedge clk);
    #1;
  endtask

  // demand-miss sub-request count: a miss with no prefetch pending must issue popcount reads
  task automatic isolated_miss(input line_t l);
    int r0;
    repeat (200) @(negedge clk);     // let prefetches drain
    r0 = n_reads;
    @(negedge clk);
    while (!core_req_ready) @(negedge clk);
    core_req_valid = 1; core_req_we = 0; core_req_addr = {l, 10'd0};
    @(posedge clk); #1; core_req_valid = 0;
    while (!core_resp_valid) begin @(posedge clk); #1; end
    // the demand line and the next-line prefetch both fetch popcount(fetch_mask) slices
    repeat (200) @(negedge clk);
    check(n_reads - r0 == 2 * $countones(fetch_mask), $sformatf("sub-requests %0d for mask %h", n_reads - r0, fetch_mask));
  endtask

  initial begin
    line_t base;
    base = 22'h00400;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: full precision, sequential then random
    for (int l = 0; l < 8; l++) for (int s = 0; s < 32; s += 4) do_read(base + line_t'(l), s);
    for (int t = 0; t < 300; t++) begin
      line_t l;
      l = base + line_t'($urandom_range(0, 47));
      if ($urandom_range(0, 3) == 0) do_write(l, $urandom_range(0, 31), 8'($urandom));
      else do_read(l, $urandom_range(0, 31));
    end
    isolated_miss(22'h20000);
    // phase 2: 9-bit training setting
    fetch_mask = 32'hFF80_0000; fill_mask = 32'h0040_0000;
    for (int t = 0; t < 300; t++) begin
      line_t l;
      l = base + line_t'($urandom_range(0, 47));
      if ($urandom_range(0, 4) == 0) do_write(l, $urandom_range(0, 31), 8'($urandom));
      else do_read(l, $urandom_range(0, 31));
    end
    isolated_miss(22'h21000);
    // phase 3: one more bit (10-bit), lines held at 9 bits must be refetched
    fetch_mask = 32'hFFC0_0000; fill_mask = 32'h0020_0000;
    for (int t = 0; t < 200; t++) do_read(base + line_t'($urandom_range(0, 47)), $urandom_range(0, 31));
    isolated_miss(22'h22000);
    // phase 4: fill one line completely through the write buffer
    for (int s = 0; s < 32; s++) do_write(22'h30000, s, 8'hFF);
    for (int s = 0; s < 32; s += 8) do_read(22'h30000, s);
    // phase 5: 7-bit
    fetch_mask = 32'hFE00_0000; fill_mask = 32'h0100_0000;
    for (int t = 0; t < 100; t++) do_read(base + line_t'($urandom_range(0, 47)), $urandom_range(0, 31));
    $display("hits=%0d misses=%0d pf_issue=%0d pf_drop=%0d inflight_wait=%0d flush_wait=%0d wb_full=%0d wb_victim=%0d wb_flush=%0d hitlat_ok=%0d",
             cnt_hit, cnt_miss, cnt_pf_issue, cnt_pf_drop, cnt_inflight_wait, cnt_flush_wait,
             cnt_wb_full_evict, cnt_wb_victim_evict, cnt_wb_flush_evict, hit_lat_checked);
    check(cnt_hit > 0, "hits happened");
    check(cnt_miss > 0, "misses happened");
    check(cnt_pf_issue > 0, "prefetches issued");
    check(cnt_pf_drop > 0, "prefetches dropped");
    check(cnt_inflight_wait > 0, "demand waited on an in-flight line");
    check(cnt_flush_wait > 0, "read waited for a write-buffer flush");
    check(cnt_wb_full_evict > 0, "full-line write-buffer eviction");
    check(cnt_wb_victim_evict > 0, "LRU write-buffer eviction");
    check(hit_lat_checked > 0, "hit latency of 3 edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
