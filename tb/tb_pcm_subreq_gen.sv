// tb_pcm_subreq_gen: drives line requests with random and fixed fetch masks and checks that
// exactly one sub-request per selected slice comes out, MSB slice first, one per cycle when
// the output is always ready, with address = line base + kth * 32 and the right R/W bit.
// Also checks back-pressure (random out_ready) and the 9-bit mask 0xFF800000.
module tb_pcm_subreq_gen;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, in_rw = 0, out_valid, out_ready = 1, out_rw;
  line_t in_line = '0, out_line;
  word_t in_mask = '0;
  logic [ADDR_W-1:0] out_addr;
  kth_t out_kth;
  logic [KTH_W:0] count;

  pcm_subreq_gen dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input word_t m, input line_t l, input bit rw, input bit random_ready);
    int exp_k [$];
    int cycles;
    for (int b = 31; b >= 0; b--) if (m[b]) exp_k.push_back(31 - b);
    @(negedge clk);
    in_valid = 1; in_mask = m; in_line = l; in_rw = rw;
    check(in_ready, "in_ready while idle");
    @(negedge clk);
    in_valid = 0;
    cycles = 0;
    while (exp_k.size() > 0 && cycles < 1000) begin
      out_ready = random_ready ? 1'($urandom) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        int k;
        k = exp_k.pop_front();
        check(out_kth == kth_t'(k), $sformatf("kth got %0d exp %0d", out_kth, k));
        check(out_addr == {l, 10'd0} + 32'(k * 32), "address = base + kth*32");
        check(out_line == l && out_rw == rw, "line / rw");
      end
      @(negedge clk);
      cycles++;
    end
    out_ready = 1; #1;
    check(!out_valid && in_ready, "idle after last sub-request");
    if (!random_ready) check(cycles == $countones(m), $sformatf("one per cycle: %0d cycles for %0d", cycles, $countones(m)));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'hFF80_0000, 22'h12345, 0, 0);   // 9-bit training
    check(count == 9, "count = 9");
    run(32'hFFFF_FFFF, 22'h00001, 1, 0);
    run(32'h8000_0001, 22'h3FFFFF, 0, 0);
    for (int t = 0; t < 40; t++) run(word_t'($urandom) | 32'h1, line_t'($urandom), 1'($urandom), t % 2 == 1);
    // empty mask completes at once
    @(negedge clk); in_valid = 1; in_mask = '0; @(negedge clk); in_valid = 0; #1;
    check(!out_valid && in_ready, "empty mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
