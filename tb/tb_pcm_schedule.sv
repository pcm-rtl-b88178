// tb_pcm_schedule: the precision schedule used for training, run on the whole PCM path.
//
// One "epoch" here is one pass of a layer: 24 weight lines and 16 activation lines are read
// sector by sector, and 8 output lines are written whole. The run does one FP16 reference
// epoch, then 3 epochs at 7 bits and 2 at 9 bits. Refresh follows the precision: sign and
// exponent slices 0-5 protected, used mantissa slices stretched (factor 2 here), unused
// slices not refreshed; slices 7 and 8 start being refreshed when training moves to 9 bits.
// Checks, per epoch: every read equals (data & fetch) | fill; slices read from memory equal
// the precision times the lines fetched; memory read traffic relative to the FP16 epoch is
// bits/16; the bank of slice 7 is never refreshed at 7 bits and is refreshed at 9 bits; the
// stretched slice 6 gets about half the refreshes of a protected slice. REF_INTERVAL is
// shortened so that many refresh rounds fit in an epoch.
module tb_pcm_schedule;
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

  pcm_top #(.REF_INTERVAL(20)) dut (.*);

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

  // refreshes per channel (even banks only: slices 0..15) in the current epoch
  int ref_even [16];
  assign ref_ready = '1;
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 16; c++) if (ref_valid[c] && !ref_bank[c][0]) ref_even[c]++;

  word_t ref_mem [line_t][256];
  word_t fetch_mask, fill_mask;
  function automatic word_t ref_word(line_t l, int j);
    if (ref_mem.exists(l)) return ref_mem[l][j];
    return word_t'(32'(l) * 32'h9E37_79B1) ^ word_t'(j * 32'h0101_0101 + 32'h5A5A_0000);
  endfunction

  task automatic cfg(input int a, input word_t d);
    @(negedge clk); cfg_wr_en = 1; cfg_wr_addr = 3'(a); cfg_wr_data = d;
    @(negedge clk); cfg_wr_en = 0;
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

  task automatic wr(input line_t l, input int sec);
    @(negedge clk);
    while (!core_req_ready) @(negedge clk);
    core_req_valid = 1; core_req_we = 1; core_req_addr = {l, 5'(sec), 5'd0}; core_req_wmask = 8'hFF;
    for (int j = 0; j < 8; j++) core_req_wdata[j] = $urandom;
    @(posedge clk); #1; core_req_valid = 0;
    if (!ref_mem.exists(l)) begin
      word_t init [256];
      for (int j = 0; j < 256; j++) init[j] = ref_word(l, j);
      for (int j = 0; j < 256; j++) ref_mem[l][j] = init[j];
    end
    for (int j = 0; j < 8; j++) ref_mem[l][sec*8 + j] = core_req_wdata[j];
  endtask

  // precision: fetch the top `bits` bits, fill the next one; refresh 0-5 protect,
  // 6..bits-1 stretched, the rest ignored
  task automatic set_precision(input int bits);
    word_t lo, hi;
    fetch_mask = ~(32'hFFFF_FFFF >> bits);
    fill_mask  = 32'h8000_0000 >> bits;
    lo = '0; hi = '0;
    for (int k = 0; k < 32; k++) begin
      logic [1:0] m;
      m = (k <= 5) ? 2'd0 : (k < bits) ? 2'd1 : 2'd2;
      if (k < 16) lo[2*k +: 2] = m; else hi[2*(k-16) +: 2] = m;
    end
    cfg(0, fetch_mask); cfg(1, fill_mask); cfg(2, lo); cfg(3, hi);
  endtask

  int base_reads;
  int sched [6] = '{16, 7, 7, 7, 9, 9};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg(4, 32'd2);
    for (int e = 0; e < 6; e++) begin
      int r0, f0, reads, fetched;
      set_precision(sched[e]);
      repeat (400) @(negedge clk);
      foreach (ref_even[c]) ref_even[c] = 0;
      r0 = n_reads; f0 = int'(l1_events[1] + l1_events[2]);
      for (int l = 0; l < 24; l++) for (int s = 0; s < 32; s++) rd(line_t'(22'h10000 + l), s);   // weights
      for (int l = 0; l < 16; l++) for (int s = 0; s < 32; s++) rd(line_t'(22'h20000 + l), s);   // activations
      for (int l = 0; l < 8; l++)  for (int s = 0; s < 32; s++) wr(line_t'(22'h30000 + 8*e + l), s); // outputs
      repeat (400) @(negedge clk);
      reads = n_reads - r0; fetched = int'(l1_events[1] + l1_events[2]) - f0;
      check(reads == sched[e] * fetched, $sformatf("epoch %0d: %0d slices for %0d lines at %0d bits", e, reads, fetched, sched[e]));
      if (e == 0) base_reads = reads;
      else begin
        real ratio;
        ratio = real'(reads) / real'(base_reads);
        check(ratio > (real'(sched[e]) / 16.0) * 0.85 && ratio < (real'(sched[e]) / 16.0) * 1.15,
              $sformatf("epoch %0d traffic ratio %f", e, ratio));
      end
      // refresh follows precision
      check(ref_even[0] > 0, "protected slice refreshed");
      check(ref_even[6] > 0 && ref_even[6] * 10 >= ref_even[0] * 3 && ref_even[6] * 10 <= ref_even[0] * 7,
            $sformatf("epoch %0d: stretched slice 6 refreshes %0d vs protected %0d", e, ref_even[6], ref_even[0]));
      if (sched[e] == 7) check(ref_even[7] == 0 && ref_even[8] == 0, $sformatf("epoch %0d: slices 7-8 not refreshed at 7 bits", e));
      if (sched[e] >= 9) check(ref_even[7] > 0 && ref_even[8] > 0, $sformatf("epoch %0d: slices 7-8 refreshed at %0d bits", e, sched[e]));
      check(ref_even[15] == (sched[e] == 16 ? ref_even[15] : 0), "unused slice 15 not refreshed");
      $display("epoch %0d: %0d bits, slice reads %0d (%0d B), lines fetched %0d, refreshes slice0/6/7/15 = %0d/%0d/%0d/%0d",
               e, sched[e], reads, reads * 32, fetched, ref_even[0], ref_even[6], ref_even[7], ref_even[15]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
