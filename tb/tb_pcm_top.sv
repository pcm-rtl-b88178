// tb_pcm_top: end-to-end run of the whole PCM path at its default parameters.
//
// Software setup through the CSRs: per-slice refresh modes of the 9-bit scheme (slices 0-5
// protected, 6-8 refreshed at a stretched period, 9-31 not refreshed) and a stretch factor
// of 2 so that stretched refreshes show within a short run. Then a training-like workload is
// run at four precisions (7, 9, 16 and 32 bits, each with the half-LSB fill), over an HBM
// model: a weight region is streamed (misses, next-line prefetches, waits on in-flight
// lines), re-read (hits), an output region is written whole (full-line write-buffer
// evictions) or in pieces (LRU evictions) and read back (flushes). Every read is compared
// with a reference memory; every sub-request with the transposed mapping; the number of
// slices read from memory must equal the precision times the lines fetched. CTA launches
// check the thread throttle. Finally refreshes of 4 full rounds are counted per channel and
// bank and compared with the modes. Each mechanism must occur at least once.
module tb_pcm_top;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_wr_en = 0;
  logic [2:0] cfg_wr_addr = '0, cfg_rd_addr = '0;
  word_t cfg_wr_data = '0, cfg_rd_data;
  logic pf_enable = 1;
  logic cta_launch_valid = 0, cta_launch_ready, cta_done_valid = 0;
  logic [10:0] cta_launch_threads = '0, cta_done_threads = '0, cta_active_threads;
  logic [1:0] cta_active_ctas;
  logic core_req_valid = 0, core_req_ready, core_req_we = 0, core_resp_valid;
  logic [31:0] core_req_addr = '0;
  sector_t core_req_wdata = '0, core_resp_data;
  logic [7:0] core_req_wmask = '0;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  subreq_t mem_req;
  logic [3:0] mem_req_ch, mem_req_bank;
  logic [13:0] mem_req_row;
  logic [4:0] mem_req_col;
  line_t mem_resp_line;
  kth_t mem_resp_kth;
  slice_t mem_resp_data;
  logic [15:0] ref_valid, ref_ready;
  logic [3:0] ref_bank [16];
  logic [31:0] ref_issued [16], ref_omitted [16];
  logic [31:0] l1_events [9];
  int n_reads, n_writes;

  pcm_top dut (.*);

  tb_hbm_model #(.LATENCY(24), .STALL(1)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_line(mem_resp_line), .resp_kth(mem_resp_kth), .resp_data(mem_resp_data),
    .n_reads, .n_writes);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- transposed mapping of every sub-request ----------------
  int map_checked = 0;
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    int unsigned la;
    la = 32'(mem_req.line);
    checks++; map_checked++;
    if (!(mem_req_ch == 4'(mem_req.kth % 16) && mem_req_bank == 4'(((la >> 5) % 8) * 2 + mem_req.kth / 16) &&
          mem_req_col == 5'(la % 32) && mem_req_row == 14'(la >> 8) &&
          mem_req.addr == la * 1024 + 32'(mem_req.kth) * 32)) begin
      failures++; $display("FAIL: mapping line %0h kth %0d", la, mem_req.kth);
    end
  end

  // ---------------- refresh observation ----------------
  int ref_cnt [16][16];
  always_ff @(posedge clk) ref_ready <= 16'($urandom);
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 16; c++)
      if (ref_valid[c] && ref_ready[c] && ref_issued[c] + ref_omitted[c] < 64) ref_cnt[c][ref_bank[c]]++;

  // ---------------- reference memory and core tasks ----------------
  word_t ref_mem [line_t][256];
  word_t fetch_mask, fill_mask;
  function automatic word_t ref_word(line_t l, int j);
    if (ref_mem.exists(l)) return ref_mem[l][j];
    return word_t'(32'(l) * 32'h9E37_79B1) ^ word_t'(j * 32'h0101_0101 + 32'h5A5A_0000);
  endfunction

  task automatic cfg(input int a, input word_t d);
    @(negedge clk); cfg_wr_en = 1; cfg_wr_addr = 3'(a); cfg_wr_data = d;
    @(negedge clk); cfg_wr_en = 0;
    cfg_rd_addr = 3'(a); #1; check(cfg_rd_data == d, "csr read back");
  endtask

  task automatic rd(input line_t l, input int sec);
    @(negedge clk);
    while (!core_req_ready) @(negedge clk);
    core_req_valid = 1; core_req_we = 0; core_req_addr = {l, 5'(sec), 5'd0};
    @(posedge clk); #1; core_req_valid = 0;
    while (!core_resp_valid) begin @(posedge clk); #1; end
    for (int j = 0; j < 8; j++)
      check(core_resp_data[j] == ((ref_word(l, sec*8 + j) & fetch_mask) | fill_mask),
            $sformatf("read %0h/%0d got %h", l, sec*8 + j, core_resp_data[j]));
  endtask

  task automatic wr(input line_t l, input int sec, input logic [7:0] m);
    @(negedge clk);
    while (!core_req_ready) @(negedge clk);
    core_req_valid = 1; core_req_we = 1; core_req_addr = {l, 5'(sec), 5'd0}; core_req_wmask = m;
    for (int j = 0; j < 8; j++) core_req_wdata[j] = $urandom;
    @(posedge clk); #1; core_req_valid = 0;
    if (!ref_mem.exists(l)) begin
      word_t init [256];
      for (int j = 0; j < 256; j++) init[j] = ref_word(l, j);
      for (int j = 0; j < 256; j++) ref_mem[l][j] = init[j];
    end
    for (int j = 0; j < 8; j++) if (m[j]) ref_mem[l][sec*8 + j] = core_req_wdata[j];
  endtask

  task automatic quiesce();
    repeat (300) @(negedge clk);
  endtask

  // ---------------- workload ----------------
  int bits_list [4] = '{7, 9, 16, 32};
  int refused = 0;

  initial begin
    line_t wbase, obase;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // refresh modes of the 9-bit scheme, stretch 2
    begin
      word_t lo, hi;
      lo = '0; hi = '0;
      for (int k = 0; k < 16; k++) lo[2*k +: 2] = (k <= 5) ? 2'd0 : (k <= 8) ? 2'd1 : 2'd2;
      for (int k = 0; k < 16; k++) hi[2*k +: 2] = 2'd2;
      cfg(2, lo); cfg(3, hi); cfg(4, 32'd2);
    end
    // CTA throttle: two CTAs of 512 threads fit, the third waits
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); cta_launch_valid = 1; cta_launch_threads = 11'd512; #1;
      if (i < 2) check(cta_launch_ready, "CTA admitted");
      else begin check(!cta_launch_ready, "third CTA held back"); if (!cta_launch_ready) refused++; end
      @(negedge clk); cta_launch_valid = 0;
    end
    check(cta_active_threads == 11'd1024 && cta_active_ctas == 2'd2, "2 CTAs, 1024 threads resident");
    @(negedge clk); cta_done_valid = 1; cta_done_threads = 11'd512; @(negedge clk); cta_done_valid = 0;
    @(negedge clk); cta_launch_valid = 1; #1; check(cta_launch_ready, "CTA admitted after one finished");
    @(negedge clk); cta_launch_valid = 0;

    for (int p = 0; p < 4; p++) begin
      int b, r0, lines0;
      b = bits_list[p];
      fetch_mask = ~(32'hFFFF_FFFF >> b);
      fill_mask  = (b < 32) ? (32'h8000_0000 >> b) : '0;
      cfg(0, fetch_mask); cfg(1, fill_mask);
      wbase = line_t'(22'h01000 + p * 64);
      obase = line_t'(22'h08000 + p * 64);
      quiesce();
      r0 = n_reads; lines0 = int'(l1_events[1] + l1_events[2]);
      // stream 16 weight lines, every sector
      for (int l = 0; l < 16; l++) for (int s = 0; s < 32; s++) rd(wbase + line_t'(l), s);
      // re-read a few: hits for lines still cached
      for (int t = 0; t < 40; t++) rd(wbase + line_t'($urandom_range(12, 15)), $urandom_range(0, 31));
      // outputs: two whole lines, then scattered partial writes over 6 lines
      for (int l = 0; l < 2; l++) for (int s = 0; s < 32; s++) wr(obase + line_t'(l), s, 8'hFF);
      for (int t = 0; t < 60; t++) wr(obase + line_t'(2 + $urandom_range(0, 5)), $urandom_range(0, 31), 8'($urandom));
      // read outputs back (write-buffer flushes) and re-read an older weight line
      for (int l = 0; l < 8; l++) rd(obase + line_t'(l), $urandom_range(0, 31));
      quiesce();
      check(n_reads - r0 == b * (int'(l1_events[1] + l1_events[2]) - lines0),
            $sformatf("%0d-bit: %0d slices read for %0d lines", b, n_reads - r0, int'(l1_events[1] + l1_events[2]) - lines0));
      $display("precision %0d: slice reads %0d, lines fetched %0d", b, n_reads - r0, int'(l1_events[1] + l1_events[2]) - lines0);
    end
    // raising precision on cached lines forces a refetch at the higher precision
    fetch_mask = 32'hFFC0_0000; fill_mask = 32'h0020_0000;
    cfg(0, fetch_mask); cfg(1, fill_mask);
    begin
      int m0;
      m0 = int'(l1_events[1]);
      rd(line_t'(22'h01000 + 64 + 15), 0);   // cached at 9 bits in the 9-bit phase... or evicted
      rd(line_t'(22'h01000 + 3*64 + 15), 0); // cached at 32 bits: hits, cut to 10 bits
      check(int'(l1_events[1]) >= m0 + 1, "lower-precision copy refetched");
    end

    // refresh: wait for 4 full rounds on every channel
    begin
      bit done;
      done = 0;
      while (!done) begin
        repeat (1000) @(negedge clk);
        done = 1;
        for (int c = 0; c < 16; c++) if (ref_issued[c] + ref_omitted[c] < 64) done = 0;
      end
    end
    for (int c = 0; c < 16; c++) begin
      int exp_even;
      exp_even = (c <= 5) ? 4 : (c <= 8) ? 2 : 0;
      for (int bk = 0; bk < 16; bk += 2)
        check(ref_cnt[c][bk] == exp_even, $sformatf("ch%0d bank%0d refreshed %0d exp %0d", c, bk, ref_cnt[c][bk], exp_even));
      for (int bk = 1; bk < 16; bk += 2)
        check(ref_cnt[c][bk] == 0, $sformatf("ch%0d bank%0d (LSB slice) refreshed", c, bk));
    end

    // ---------------- mechanisms ----------------
    $display("L1: hit=%0d miss=%0d pf_issue=%0d pf_drop=%0d inflight_wait=%0d flush_wait=%0d wb_full=%0d wb_victim=%0d wb_flush=%0d",
      l1_events[0], l1_events[1], l1_events[2], l1_events[3], l1_events[4], l1_events[5], l1_events[6], l1_events[7], l1_events[8]);
    $display("refresh ch0 issued=%0d omitted=%0d ch6 issued=%0d omitted=%0d ch15 issued=%0d omitted=%0d; mapped sub-requests=%0d cta refused=%0d",
      ref_issued[0], ref_omitted[0], ref_issued[6], ref_omitted[6], ref_issued[15], ref_omitted[15], map_checked, refused);
    for (int e = 0; e < 9; e++) check(l1_events[e] > 0, $sformatf("L1 mechanism %0d never happened", e));
    check(ref_cnt[0][0] > 0, "protected refresh happened");
    check(ref_cnt[6][0] > 0 && ref_omitted[6] > 0, "stretched refresh happened");
    check(ref_issued[15] == 0 && ref_omitted[15] > 0, "ignored slices never refreshed");
    check(refused > 0, "CTA throttling happened");
    check(map_checked > 0, "sub-requests mapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
