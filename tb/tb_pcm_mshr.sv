// tb_pcm_mshr: allocates entries with different fetch masks, returns their slices in random
// order and checks that completion fires exactly with the last fetched slice (slices not
// fetched count as present), that it names the right line and way, that lookups see
// outstanding lines and that the structure reports full at ENTRIES entries.
module tb_pcm_mshr;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_valid = 0, full, lookup_a_hit, lookup_b_hit, resp_valid = 0, resp_match, done_valid;
  line_t alloc_line = '0, lookup_a_line = '0, lookup_b_line = '0, resp_line = '0, done_line;
  logic [2:0] alloc_way = '0, resp_way, done_way;
  word_t alloc_fetch_mask = '0;
  kth_t resp_kth = '0;
  logic [2:0] used;

  pcm_mshr #(.ENTRIES(4), .WAY_W(3)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  line_t  lines [4];
  word_t  masks [4];
  int     pend  [4][$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      int total;
      // allocate 4 entries
      for (int e = 0; e < 4; e++) begin
        @(negedge clk);
        lines[e] = line_t'($urandom) ^ line_t'(e);
        masks[e] = (e == 0) ? 32'hFF80_0000 : (word_t'($urandom) | 32'h8000_0000);
        pend[e].delete();
        for (int b = 31; b >= 0; b--) if (masks[e][b]) pend[e].push_back(31 - b);
        pend[e].shuffle();
        check(!full, "not full before 4 entries");
        alloc_valid = 1; alloc_line = lines[e]; alloc_way = 3'(e + round); alloc_fetch_mask = masks[e];
      end
      @(negedge clk);
      alloc_valid = 0; #1;
      check(full && used == 4, "full at 4 entries");
      lookup_a_line = lines[2]; lookup_b_line = lines[2] + 22'd7; #1;
      check(lookup_a_hit, "lookup of outstanding line");
      // return slices interleaved across entries
      total = 0;
      for (int e = 0; e < 4; e++) total += pend[e].size();
      while (total > 0) begin
        int e;
        e = $urandom_range(0, 3);
        if (pend[e].size() == 0) continue;
        resp_valid = 1; resp_line = lines[e]; resp_kth = kth_t'(pend[e].pop_front());
        #1;
        check(resp_match && resp_way == 3'(e + round), "response finds its way");
        check(done_valid == (pend[e].size() == 0), $sformatf("done exactly at last slice (entry %0d left %0d)", e, pend[e].size()));
        if (done_valid) check(done_line == lines[e] && done_way == 3'(e + round), "done names line and way");
        @(negedge clk);
        resp_valid = 0;
        total--;
      end
      #1;
      check(!full && used == 0, "all entries free again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
