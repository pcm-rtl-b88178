// tb_pcm_prefetcher: a miss to line L must produce a prefetch candidate L+1 that stays until
// taken, a newer miss must replace it, and nothing must come out while disabled.
module tb_pcm_prefetcher;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic enable = 1, miss_valid = 0, pf_valid, pf_ready = 0;
  line_t miss_line = '0, pf_line;

  pcm_prefetcher dut (.*);

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); check(!pf_valid, "idle after reset");
    for (int t = 0; t < 100; t++) begin
      line_t l;
      l = (t == 0) ? '1 : line_t'($urandom);
      miss_valid = 1; miss_line = l;
      @(negedge clk); miss_valid = 0;
      check(pf_valid && pf_line == l + 1'b1, "candidate L+1");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(pf_valid, "held until taken");
      if (t % 3 == 0) begin
        miss_valid = 1; miss_line = l + 22'd100;
        @(negedge clk); miss_valid = 0;
        check(pf_valid && pf_line == l + 22'd101, "newer miss replaces");
      end
      pf_ready = 1; @(negedge clk); pf_ready = 0;
      check(!pf_valid, "cleared when taken");
    end
    enable = 0; miss_valid = 1; miss_line = 22'h55;
    @(negedge clk); miss_valid = 0;
    check(!pf_valid, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
