// tb_pcm_refresh_ctrl: with REF_INTERVAL shortened, checks per-bank refresh slots: a
// protected slice's banks are refreshed every round, a skipped slice's banks every
// skip_ratio-th round, an ignored slice's banks never; checks slot spacing and counters.
module tb_pcm_refresh_ctrl;
  import pcm_pkg::*;
  localparam int RI = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  ref_mode_e mode_even = REF_PROTECT, mode_odd = REF_SKIP;
  logic [7:0] skip_ratio = 8'd3;
  logic ref_valid, ref_ready = 0;
  logic [3:0] ref_bank;
  logic [31:0] cnt_issued, cnt_omitted;

  pcm_refresh_ctrl #(.NUM_BANKS(16), .REF_INTERVAL(RI)) dut (.*);

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

  int refs [16];
  task automatic run_rounds(input int rounds, input bit slow_ready);
    int cyc, last;
    foreach (refs[b]) refs[b] = 0;
    cyc = 0; last = -1;
    while (cnt_issued + cnt_omitted < 32'(rounds * 16)) begin
      @(negedge clk);
      ref_ready = slow_ready ? 1'($urandom) : 1'b1;
      #1;
      if (ref_valid && ref_ready) begin
        refs[ref_bank]++;
        if (!slow_ready && last >= 0) check(cyc - last >= RI, "refreshes at least REF_INTERVAL apart");
        last = cyc;
      end
      cyc++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_rounds(9, 0);
    for (int b = 0; b < 16; b += 2) check(refs[b] == 9, $sformatf("protected bank %0d refreshed %0d of 9", b, refs[b]));
    for (int b = 1; b < 16; b += 2) check(refs[b] == 3, $sformatf("skipped bank %0d refreshed %0d of 9/3", b, refs[b]));
    check(cnt_issued == 32'(8*9 + 8*3) && cnt_omitted == 32'(8*6), "counters");
    // reset, then ignore the even slice, skip with ratio 12 on odd (published default)
    rst_n = 0; @(negedge clk); rst_n = 1;
    mode_even = REF_IGNORE; mode_odd = REF_SKIP; skip_ratio = 8'd12;
    run_rounds(24, 1);
    for (int b = 0; b < 16; b += 2) check(refs[b] == 0, "ignored bank never refreshed");
    for (int b = 1; b < 16; b += 2) check(refs[b] == 2, $sformatf("stretched x12 bank %0d: %0d of 24/12", b, refs[b]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
