// pcm_csr: software-configurable registers of the precision-controlled memory.
//
// Software selects a precision by writing a fetch mask (which word bits are fetched from
// memory), a fill mask (value ORed into the bits that are not fetched) and a refresh mode per
// bit-slice, for example fetch 0xFF800000 and fill 0x00400000 for 9-bit training. Register
// map (word addresses): 0 fetch mask, 1 fill mask, 2 refresh modes of slices 0..15 (2 bits
// each, slice 0 in bits 1:0), 3 refresh modes of slices 16..31, 4 refresh stretch factor
// (bits 7:0). Writes take effect on the next cycle; reads are combinational. The masks are
// the published registers; the map and the reset values (full precision, no fill, every
// slice protected, stretch 12) are this design's choices.
module pcm_csr
  import pcm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [2:0]       wr_addr,
  input  word_t            wr_data,
  input  logic [2:0]       rd_addr,
  output word_t            rd_data,
  output word_t            fetch_mask,
  output word_t            fill_mask,
  output ref_mode_e        ref_mode [NSLICE],
  output logic [7:0]       skip_ratio
);
  word_t mode_lo, mode_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_mask <= '1;
      fill_mask  <= '0;
      mode_lo    <= '0;
      mode_hi    <= '0;
      skip_ratio <= 8'd12;
    end else if (wr_en) begin
      unique case (wr_addr)
        3'd0: fetch_mask <= wr_data;
        3'd1: fill_mask  <= wr_data;
        3'd2: mode_lo    <= wr_data;
        3'd3: mode_hi    <= wr_data;
        3'd4: skip_ratio <= wr_data[7:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int k = 0; k < NSLICE/2; k++) begin
      ref_mode[k]          = ref_mode_e'(mode_lo[2*k +: 2]);
      ref_mode[k+NSLICE/2] = ref_mode_e'(mode_hi[2*k +: 2]);
    end
    unique case (rd_addr)
      3'd0:    rd_data = fetch_mask;
      3'd1:    rd_data = fill_mask;
      3'd2:    rd_data = mode_lo;
      3'd3:    rd_data = mode_hi;
      3'd4:    rd_data = {24'd0, skip_ratio};
      default: rd_data = '0;
    endcase
  end
endmodule
