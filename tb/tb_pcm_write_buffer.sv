// tb_pcm_write_buffer: random sector writes over a few lines, with a reference of what memory
// must hold. Every evicted slice is applied to a transposed reference memory; at the end all
// lines are flushed and memory is compared word by word. Also checks the three eviction
// causes: a fully written line on a hit, an LRU victim on a miss with all lines busy, and a
// flush request.
module tb_pcm_write_buffer;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_valid = 0, wr_ready, flush_valid = 0, holds_line, probe_hit, ev_valid, ev_ready = 1;
  logic [31:0] wr_addr = '0;
  sector_t wr_data = '0;
  logic [7:0] wr_wmask = '0;
  line_t flush_line = '0, probe_line = '0, ev_line;
  kth_t ev_kth;
  slice_t ev_data, ev_wmask;
  logic [31:0] cnt_full_evict, cnt_victim_evict, cnt_flush_evict;

  pcm_write_buffer #(.ENTRIES(4)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NL = 6;           // lines used
  word_t  exp_mem [NL][256];       // what memory must hold after all flushes
  word_t  mem     [NL][256];       // built from evicted slices
  int     slice_seq;               // checks that slices of one eviction come MSB first

  // memory side: apply write sub-requests
  always @(posedge clk) if (rst_n && ev_valid && ev_ready) begin
    int l;
    l = int'(ev_line) - 100;
    if (l < 0 || l >= NL) begin failures++; $display("FAIL: eviction of unknown line"); end
    else begin
      checks++;
      if (int'(ev_kth) != slice_seq) begin failures++; $display("FAIL: slice order %0d exp %0d", ev_kth, slice_seq); end
      slice_seq = (slice_seq + 1) % 32;
      for (int j = 0; j < 256; j++) if (ev_wmask[j]) mem[l][j][31 - ev_kth] = ev_data[j];
    end
  end

  task automatic write_sector(input int l, input int sec, input logic [7:0] m);
    @(negedge clk);
    wr_valid = 1; wr_addr = {10'(100 + l), 5'(sec), 5'd0}; wr_wmask = m;
    for (int j = 0; j < 8; j++) wr_data[j] = $urandom;
    ev_ready = 1'($urandom_range(0, 3) != 0);
    #1;
    while (!wr_ready) begin @(negedge clk); ev_ready = 1'($urandom_range(0, 3) != 0); #1; end
    for (int j = 0; j < 8; j++) if (m[j]) exp_mem[l][sec*8 + j] = wr_data[j];
    @(negedge clk); wr_valid = 0;
  endtask

  task automatic flush(input int l);
    @(negedge clk);
    flush_line = line_t'(100 + l); #1;
    while (holds_line) begin flush_valid = 1; ev_ready = 1; @(negedge clk); #1; end
    flush_valid = 0;
  endtask

  initial begin
    slice_seq = 0;
    for (int l = 0; l < NL; l++) for (int j = 0; j < 256; j++) begin exp_mem[l][j] = '0; mem[l][j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill line 0 completely: must evict on the last sector (hit + fully collected)
    for (int sec = 0; sec < 32; sec++) write_sector(0, sec, 8'hFF);
    repeat (40) @(negedge clk);
    check(cnt_full_evict == 1, "full line evicted on hit");
    // random partial writes over 6 lines with 4 entries: forces LRU victims
    for (int t = 0; t < 400; t++) write_sector($urandom_range(0, NL-1), $urandom_range(0, 31), 8'($urandom));
    check(cnt_victim_evict > 0, "LRU victim evictions happened");
    probe_line = line_t'(100 + 0); #1;
    for (int l = 0; l < NL; l++) flush(l);
    repeat (40) @(negedge clk);
    check(cnt_flush_evict > 0, "flush evictions happened");
    for (int l = 0; l < NL; l++) for (int j = 0; j < 256; j++)
      check(mem[l][j] == exp_mem[l][j], $sformatf("line %0d word %0d got %h exp %h", l, j, mem[l][j], exp_mem[l][j]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
