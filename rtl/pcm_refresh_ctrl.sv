// pcm_refresh_ctrl: precision-aware refresh controller of one HBM channel.
//
// With the transposed mapping each bank of a channel holds one bit-slice position: even
// banks hold slice c and odd banks slice c+16 for channel c. Refresh can thus be set per
// slice. Every REF_INTERVAL cycles the controller visits the next bank (round robin) and
// treats it by the mode of its slice: PROTECT (sign and exponent bits) refreshes it every
// round, SKIP (used mantissa bits, soft approximation) only every skip_ratio-th round, which
// stretches its period by that factor, and IGNORE (bits not fetched) never refreshes it.
// A refresh is a ref_valid/ref_bank request held until ref_ready. Counters report refreshes
// issued and omitted. The three treatments follow the published scheme; per-bank refresh,
// the interval, the round counting and the default stretch of 12 (768 ms over an assumed
// 64 ms normal period) are this design's choices.
module pcm_refresh_ctrl
  import pcm_pkg::*;
#(
  parameter int unsigned NUM_BANKS    = 16,
  parameter int unsigned REF_INTERVAL = 3900,  // cycles between per-bank refresh slots
  localparam int unsigned BANK_W = $clog2(NUM_BANKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ref_mode_e         mode_even,     // mode of the slice held in even banks
  input  ref_mode_e         mode_odd,      // mode of the slice held in odd banks
  input  logic [7:0]        skip_ratio,    // stretch factor for REF_SKIP (0 treated as 1)
  output logic              ref_valid,
  output logic [BANK_W-1:0] ref_bank,
  input  logic              ref_ready,
  output logic [31:0]       cnt_issued,
  output logic [31:0]       cnt_omitted
);
  logic [$clog2(REF_INTERVAL+1)-1:0] timer;
  logic [BANK_W-1:0] bank;
  logic [7:0]        round;       // round number modulo skip_ratio
  logic              slot;        // a bank slot is being handled
  ref_mode_e         mode;
  logic              do_ref;

  assign mode     = bank[0] ? mode_odd : mode_even;
  assign do_ref   = (mode == REF_PROTECT) || (mode == REF_SKIP && round == '0);
  assign ref_valid = slot && do_ref;
  assign ref_bank  = bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0; bank <= '0; round <= '0; slot <= 1'b0;
      cnt_issued <= '0; cnt_omitted <= '0;
    end else begin
      if (!slot) begin
        if (timer == ($bits(timer))'(REF_INTERVAL - 1)) begin
          timer <= '0;
          slot  <= 1'b1;
        end else begin
          timer <= timer + 1'b1;
        end
      end else if (!do_ref || ref_ready) begin
        slot <= 1'b0;
        if (do_ref) cnt_issued  <= cnt_issued + 1'b1;
        else        cnt_omitted <= cnt_omitted + 1'b1;
        bank <= bank + 1'b1;
        if (bank == BANK_W'(NUM_BANKS - 1))
          round <= (round + 1'b1 >= skip_ratio) ? '0 : round + 1'b1;
        // the timer keeps counting while a refresh waits
        timer <= timer + 1'b1;
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end
endmodule
