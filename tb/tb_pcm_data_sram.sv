// tb_pcm_data_sram: writes random slices into random (set, way) lines and reads sectors back,
// checking every returned bit against a reference copy of the array and the one-cycle read.
module tb_pcm_data_sram;
  import pcm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, rd_en = 0;
  logic [1:0] wr_set = '0, rd_set = '0;
  logic [2:0] wr_way = '0, rd_way = '0;
  kth_t wr_kth = '0;
  slice_t wr_data = '0;
  logic [4:0] rd_sector = '0;
  logic [31:0][7:0] rd_bits;

  pcm_data_sram dut (.*);

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

  slice_t ref_mem [4][8][32];
  initial begin
    // fill everything once
    for (int s = 0; s < 4; s++) for (int w = 0; w < 8; w++) for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      wr_en = 1; wr_set = 2'(s); wr_way = 3'(w); wr_kth = kth_t'(k);
      for (int i = 0; i < 8; i++) wr_data[32*i +: 32] = $urandom;
      ref_mem[s][w][k] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      int s, w, sec;
      @(negedge clk);
      // random overwrite of one slice alongside the read
      wr_en = 1'($urandom); wr_set = 2'($urandom); wr_way = 3'($urandom); wr_kth = kth_t'($urandom);
      for (int i = 0; i < 8; i++) wr_data[32*i +: 32] = $urandom;
      s = $urandom_range(0, 3); w = $urandom_range(0, 7); sec = $urandom_range(0, 31);
      rd_en = 1; rd_set = 2'(s); rd_way = 3'(w); rd_sector = 5'(sec);
      @(negedge clk);
      rd_en = 0;
      for (int k = 0; k < 32; k++)
        check(rd_bits[k] == ref_mem[s][w][k][sec*8 +: 8], $sformatf("set %0d way %0d slice %0d sector %0d", s, w, k, sec));
      if (wr_en) ref_mem[wr_set][wr_way][wr_kth] = wr_data;
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
