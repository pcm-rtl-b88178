// tb_pcm_cta_throttle: random CTA launches and completions against a reference count; a
// launch must be admitted exactly when fewer than 2 CTAs are resident and its threads fit
// under 1024.
module tb_pcm_cta_throttle;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic launch_valid = 0, launch_ready, done_valid = 0;
  logic [10:0] launch_threads = '0, done_threads = '0, active_threads;
  logic [1:0] active_ctas;

  pcm_cta_throttle dut (.*);

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

  int resident [$];
  int refused = 0, admitted = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int thr, sum;
      bit exp_ok;
      @(negedge clk);
      sum = 0; foreach (resident[i]) sum += resident[i];
      check(active_ctas == 2'(resident.size()) && active_threads == 11'(sum), "occupancy");
      thr = 32 * $urandom_range(1, 24);
      launch_valid = 1'($urandom); launch_threads = 11'(thr);
      done_valid = (resident.size() > 0) && ($urandom_range(0, 2) == 0);
      done_threads = done_valid ? 11'(resident[0]) : '0;
      #1;
      exp_ok = (resident.size() < 2) && (sum + thr <= 1024);
      check(launch_ready == exp_ok, $sformatf("admission ctas=%0d thr=%0d+%0d", resident.size(), sum, thr));
      if (done_valid) void'(resident.pop_front());
      if (launch_valid && launch_ready) resident.push_back(thr);   // follow the block to stay in step
      if (launch_valid && exp_ok) admitted++;
      if (launch_valid && !exp_ok) refused++;
    end
    check(admitted > 0 && refused > 0, "both admitted and refused launches seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
