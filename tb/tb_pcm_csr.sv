// tb_pcm_csr: reset values, write/read-back of every register, the 9-bit training setting
// (fetch 0xFF800000, fill 0x00400000) and the decoding of per-slice refresh modes.
module tb_pcm_csr;
  import pcm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0;
  logic [2:0] wr_addr = '0, rd_addr = '0;
  word_t wr_data = '0, rd_data, fetch_mask, fill_mask;
  ref_mode_e ref_mode [NSLICE];
  logic [7:0] skip_ratio;

  pcm_csr dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input word_t d);
    @(negedge clk); wr_en = 1; wr_addr = 3'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
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
    @(negedge clk);
    check(fetch_mask == '1 && fill_mask == '0 && skip_ratio == 12, "reset values");
    foreach (ref_mode[k]) check(ref_mode[k] == REF_PROTECT, "reset mode protect");
    wr(0, 32'hFF80_0000); wr(1, 32'h0040_0000);
    check(fetch_mask == 32'hFF80_0000 && fill_mask == 32'h0040_0000, "9-bit setting");
    // slices 0-5 protect, 6-8 skip, 9-31 ignore
    begin
      word_t lo, hi;
      lo = '0; hi = '0;
      for (int k = 0; k < 32; k++) begin
        logic [1:0] m;
        m = (k <= 5) ? 2'd0 : (k <= 8) ? 2'd1 : 2'd2;
        if (k < 16) lo[2*k +: 2] = m; else hi[2*(k-16) +: 2] = m;
      end
      wr(2, lo); wr(3, hi);
      for (int k = 0; k < 32; k++)
        check(ref_mode[k] == ((k <= 5) ? REF_PROTECT : (k <= 8) ? REF_SKIP : REF_IGNORE), $sformatf("mode slice %0d", k));
      rd_addr = 2; #1; check(rd_data == lo, "read back modes lo");
      rd_addr = 3; #1; check(rd_data == hi, "read back modes hi");
    end
    wr(4, 32'd16); check(skip_ratio == 16, "skip ratio");
    for (int t = 0; t < 50; t++) begin
      word_t d; int a;
      d = $urandom; a = $urandom_range(0, 1);
      wr(a, d); rd_addr = 3'(a); #1;
      check(rd_data == d, "random read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
