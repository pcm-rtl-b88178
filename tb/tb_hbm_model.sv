// tb_hbm_model: behavioural model of the transposed HBM as seen by the L1 (testbench only).
//
// Holds words per 1 KB line; a line never written reads as init_word(line, word), a hash the
// testbenches can compute on their own. Accepts one bit-slice sub-request per cycle when
// ready (ready drops at random if STALL is set). A write updates bit 31-kth of every enabled
// word at once; a read answers LATENCY cycles later with the slice's 256 bits, in order.
module tb_hbm_model
  import pcm_pkg::*;
#(
  parameter int unsigned LATENCY = 20,
  parameter bit          STALL   = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  subreq_t req,
  output logic    resp_valid,
  output line_t   resp_line,
  output kth_t    resp_kth,
  output slice_t  resp_data,
  output int      n_reads,
  output int      n_writes
);
  function automatic word_t init_word(line_t l, int j);
    return word_t'(32'(l) * 32'h9E37_79B1) ^ word_t'(j * 32'h0101_0101 + 32'h5A5A_0000);
  endfunction

  word_t mem [line_t][256];

  function automatic word_t get_word(line_t l, int j);
    if (mem.exists(l)) return mem[l][j];
    return init_word(l, j);
  endfunction

  typedef struct { int due; line_t line; kth_t kth; slice_t data; } pend_t;
  pend_t q [$];
  int cyc;

  always_ff @(posedge clk) req_ready <= !STALL || ($urandom_range(0, 4) != 0);

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0; q.delete(); resp_valid <= 1'b0; n_reads = 0; n_writes = 0;
    end else begin
      cyc++;
      if (req_valid && req_ready) begin
        if (req.rw) begin
          if (!mem.exists(req.line))
            for (int j = 0; j < 256; j++) mem[req.line][j] = init_word(req.line, j);
          for (int j = 0; j < 256; j++)
            if (req.wmask[j]) mem[req.line][j][31 - req.kth] = req.data[j];
          n_writes++;
        end else begin
          pend_t p;
          p.due = cyc + int'(LATENCY); p.line = req.line; p.kth = req.kth;
          for (int j = 0; j < 256; j++) p.data[j] = get_word(req.line, j)[31 - req.kth];
          q.push_back(p);
          n_reads++;
        end
      end
      if (q.size() > 0 && q[0].due <= cyc) begin
        pend_t p;
        p = q.pop_front();
        resp_valid <= 1'b1; resp_line <= p.line; resp_kth <= p.kth; resp_data <= p.data;
      end else begin
        resp_valid <= 1'b0;
      end
    end
  end
endmodule
