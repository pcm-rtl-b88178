// pcm_cta_throttle: thread throttling at CTA (thread block) admission.
//
// Fewer concurrent threads mean less contention for the few large L1 lines. A CTA waiting to
// launch is admitted (launch_ready) only while fewer than MAX_CTAS CTAs are resident and its
// threads fit under MAX_THREADS; a finishing CTA returns its share. Launch and completion can
// happen in the same cycle. The limits (1024 threads, 2 CTAs) are the published PCM
// configuration; the admission interface is this design's choice.
module pcm_cta_throttle #(
  parameter int unsigned MAX_THREADS = 1024,
  parameter int unsigned MAX_CTAS    = 2,
  localparam int unsigned THR_W = $clog2(MAX_THREADS+1),
  localparam int unsigned CTA_W = $clog2(MAX_CTAS+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             launch_valid,
  input  logic [THR_W-1:0] launch_threads,
  output logic             launch_ready,
  input  logic             done_valid,
  input  logic [THR_W-1:0] done_threads,
  output logic [CTA_W-1:0] active_ctas,
  output logic [THR_W-1:0] active_threads
);
  assign launch_ready = (active_ctas < CTA_W'(MAX_CTAS)) &&
                        ((THR_W+1)'(active_threads) + (THR_W+1)'(launch_threads) <= (THR_W+1)'(MAX_THREADS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_ctas    <= '0;
      active_threads <= '0;
    end else begin
      active_ctas    <= active_ctas + CTA_W'(launch_valid && launch_ready) - CTA_W'(done_valid);
      active_threads <= active_threads + (launch_valid && launch_ready ? launch_threads : '0)
                                       - (done_valid ? done_threads : '0);
    end
  end
  a_done_known: assert property (@(posedge clk) disable iff (!rst_n) done_valid |-> active_ctas != 0);
endmodule
