// tb_pcm_tag_array: allocation, fill, lookup with precision coverage, invalidation and LRU
// victim choice against a reference model kept in the testbench.
module tb_pcm_tag_array;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  smask_t need_mask = '1, a_lmask;
  line_t a_line = '0, b_line = '0, alloc_line = '0, fill_line = '0, inval_line = '0, touch_line = '0;
  logic a_hit, a_present, a_victim_ok, b_present, b_victim_ok;
  logic [2:0] a_way, a_victim, b_victim, alloc_way = '0, fill_way = '0, inval_way = '0, touch_way = '0;
  logic alloc_en = 0, fill_en = 0, inval_en = 0, touch_en = 0;
  smask_t alloc_lmask = '1;

  pcm_tag_array dut (.*);

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

  // reference: per set, list of resident lines in LRU order (front = most recent)
  line_t order [4][$];

  task automatic install(input line_t l, input smask_t m);
    // miss: allocate the victim, fill it, touch it
    int s;
    s = int'(l[1:0]);
    @(negedge clk);
    a_line = l; #1;
    check(!a_present, "line not yet present");
    check(a_victim_ok, "victim available");
    if (order[s].size() == 8) begin
      // the victim must hold the least recently used line
      line_t lru;
      lru = order[s][7];
      a_line = lru; #1;
      check(a_present && a_way == a_victim, "victim is LRU");   // a_victim depends only on set
      void'(order[s].pop_back());
      a_line = l; #1;
    end
    alloc_en = 1; alloc_line = l; alloc_way = a_victim; alloc_lmask = m;
    touch_en = 1; touch_line = l; touch_way = a_victim;
    @(negedge clk);
    alloc_en = 0; touch_en = 0;
    #1; check(!a_present, "pending line is not valid yet");
    fill_en = 1; fill_line = l; fill_way = alloc_way;
    @(negedge clk); fill_en = 0;
    order[s].push_front(l);
  endtask

  task automatic hit(input line_t l);
    int s;
    s = int'(l[1:0]);
    @(negedge clk);
    a_line = l; #1;
    check(a_hit, $sformatf("hit on %0h", l));
    touch_en = 1; touch_line = l; touch_way = a_way;
    @(negedge clk); touch_en = 0;
    foreach (order[s][i]) if (order[s][i] == l) begin order[s].delete(i); break; end
    order[s].push_front(l);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      line_t l;
      int s;
      s = $urandom_range(0, 3);
      if (order[s].size() > 0 && $urandom_range(0, 1) == 1)
        hit(order[s][$urandom_range(0, order[s].size() - 1)]);
      else begin
        l = {20'($urandom), 2'(s)};
        a_line = l; #1;
        if (!a_present) install(l, '1);
      end
    end
    // precision coverage: a line filled with 9 slices does not hit a 12-slice request
    need_mask = slice_mask(32'hFF80_0000);
    install(22'h3A5F0, slice_mask(32'hFF80_0000));
    @(negedge clk); a_line = 22'h3A5F0; #1; check(a_hit, "9-slice line hits 9-slice mask");
    need_mask = slice_mask(32'hFFF0_0000); #1;
    check(!a_hit && a_present && a_lmask == slice_mask(32'hFF80_0000), "9-slice line misses 12-slice mask");
    // invalidate
    inval_en = 1; inval_line = 22'h3A5F0; inval_way = a_way;
    @(negedge clk); inval_en = 0; #1;
    check(!a_present, "invalidated");
    // port b sees pending lines
    alloc_en = 1; alloc_line = 22'h1234; alloc_way = 3'd0; @(negedge clk); alloc_en = 0;
    b_line = 22'h1234; #1; check(b_present, "port b sees pending line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
