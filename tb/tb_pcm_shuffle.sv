// tb_pcm_shuffle: checks the fill-mask OR and slice-to-word reordering, including the
// published 2-word, 4-slice example (slices 01,xx,00,00 with fill 0100 give words 0100 and
// 1100), random full-size cases against a bit-by-bit reference, and the 2-cycle latency.
module tb_pcm_shuffle;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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

  // small instance: the figure's example
  logic s_in_valid = 0, s_out_valid;
  logic [3:0][1:0] s_in_bits;
  logic [3:0] s_lmask, s_fill;
  logic [1:0][3:0] s_words;
  logic [0:0] s_tag_o;
  pcm_shuffle #(.NSL(4), .NWORDS(2), .TAG_W(1)) u_small (
    .clk, .rst_n, .in_valid(s_in_valid), .in_bits(s_in_bits), .line_mask(s_lmask), .fill_mask(s_fill),
    .in_tag(1'b0), .out_valid(s_out_valid), .out_words(s_words), .out_tag(s_tag_o));

  // full instance
  logic f_in_valid = 0, f_out_valid;
  logic [31:0][7:0] f_in_bits;
  logic [31:0] f_lmask, f_fill;
  logic [7:0][31:0] f_words;
  logic [3:0] f_tag_i, f_tag_o;
  pcm_shuffle #(.NSL(32), .NWORDS(8), .TAG_W(4)) u_full (
    .clk, .rst_n, .in_valid(f_in_valid), .in_bits(f_in_bits), .line_mask(f_lmask), .fill_mask(f_fill),
    .in_tag(f_tag_i), .out_valid(f_out_valid), .out_words(f_words), .out_tag(f_tag_o));

  initial begin
    f_in_bits = '0; f_lmask = '0; f_fill = '0; f_tag_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // figure example: slice0 = (w0=0, w1=1), slice1 vacant (garbage 1,0), slices 2,3 = 0
    @(negedge clk);
    s_in_bits[0] = 2'b10;   // bit j = word j
    s_in_bits[1] = 2'b01;   // vacant: content must not matter
    s_in_bits[2] = 2'b00;
    s_in_bits[3] = 2'b00;
    s_lmask = 4'b1101;      // slice 1 not fetched
    s_fill  = 4'b0100;      // word bit 2 = slice 1
    s_in_valid = 1;
    @(negedge clk); s_in_valid = 0;
    check(!s_out_valid, "no output after 1 cycle");
    @(negedge clk);
    check(s_out_valid, "output after 2 cycles");
    check(s_words[0] == 4'b0100 && s_words[1] == 4'b1100, $sformatf("figure example got %b_%b", s_words[0], s_words[1]));
    // random full-size
    for (int t = 0; t < 300; t++) begin
      logic [7:0][31:0] exp;
      @(negedge clk);
      for (int k = 0; k < 32; k++) f_in_bits[k] = 8'($urandom);
      f_lmask = $urandom; f_fill = $urandom; f_tag_i = 4'(t); f_in_valid = 1;
      for (int j = 0; j < 8; j++)
        for (int b = 0; b < 32; b++)
          exp[j][b] = (f_in_bits[31-b][j] & f_lmask[31-b]) | f_fill[b];
      @(negedge clk); f_in_valid = 0;
      @(negedge clk);
      check(f_out_valid && f_words == exp && f_tag_o == 4'(t), $sformatf("random case %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
