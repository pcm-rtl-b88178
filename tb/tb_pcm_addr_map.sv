// tb_pcm_addr_map: checks the transposed address mapping against a reference computed here:
// channel = slice mod 16, bank = {line[7:5], slice div 16}, column = line[4:0],
// row = line[21:8]; and that the 32 slices of a line land in 32 distinct (channel, bank)
// arrays with adjacent slices in different channels.
module tb_pcm_addr_map;
  import pcm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  line_t      line_addr;
  kth_t       kth;
  logic [3:0] ch, bank;
  logic [13:0] row;
  logic [4:0] col;

  pcm_addr_map dut (.line_addr, .kth, .ch, .bank, .row, .col);

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
    bit used [16][16];
    for (int t = 0; t < 200; t++) begin
      line_addr = line_t'($urandom);
      if (t == 0) line_addr = '0;
      foreach (used[i, j]) used[i][j] = 0;
      for (int k = 0; k < 32; k++) begin
        int unsigned la;
        kth = kth_t'(k);
        #1;
        la = 32'(line_addr);
        check(ch == 4'(k % 16), $sformatf("ch line=%0h k=%0d got %0d", la, k, ch));
        check(bank == 4'((((la >> 5) % 8) * 2) + k / 16), $sformatf("bank line=%0h k=%0d got %0d", la, k, bank));
        check(col == 5'(la % 32), "col");
        check(row == 14'(la >> 8), "row");
        check(!used[ch][bank], "two slices of one line share a bank");
        used[ch][bank] = 1;
      end
      @(posedge clk);
    end
    // paper example: line 0, slices 0..15 in bank 0, 16..31 in bank 1
    line_addr = '0; kth = 5'd3;  #1; check(ch == 3 && bank == 0, "slice 3 -> ch3 bk0");
    kth = 5'd29; #1; check(ch == 13 && bank == 1, "slice 29 -> ch13 bk1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
