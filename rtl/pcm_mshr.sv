// pcm_mshr: miss status holding registers for bit-sliced line fills.
//
// All sub-requests of one line miss share a single entry. The entry holds the line address,
// the cache way reserved for it and a slice-indexed "arrived" mask. On allocation the mask is
// loaded with the inverse of the fetch mask, so slices that are not fetched count as present;
// every returning slice sets its bit, and when all bits are 1 the entry reports the line
// complete (done_*, same cycle as the last slice) so the tag can be marked valid, and frees
// itself. This follows the published description. The entry count, the two lookup ports
// (demand and prefetch) and the single-cycle allocate are this design's choices.
module pcm_mshr
  import pcm_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned WAY_W   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // allocate
  input  logic             alloc_valid,
  input  line_t            alloc_line,
  input  logic [WAY_W-1:0] alloc_way,
  input  word_t            alloc_fetch_mask,  // word-bit mask
  output logic             full,
  // lookups
  input  line_t            lookup_a_line,
  output logic             lookup_a_hit,
  input  line_t            lookup_b_line,
  output logic             lookup_b_hit,
  // returning slices
  input  logic             resp_valid,
  input  line_t            resp_line,
  input  kth_t             resp_kth,
  output logic             resp_match,
  output logic [WAY_W-1:0] resp_way,
  // completion
  output logic             done_valid,
  output line_t            done_line,
  output logic [WAY_W-1:0] done_way,
  output logic [$clog2(ENTRIES+1)-1:0] used
);
  typedef struct packed {
    logic             valid;
    line_t            line;
    logic [WAY_W-1:0] way;
    smask_t           arrived;
  } entry_t;

  entry_t ent [ENTRIES];
  logic [$clog2(ENTRIES)-1:0] free_idx, resp_idx;
  logic                       have_free;

  always_comb begin
    have_free = 1'b0; free_idx = '0;
    for (int i = ENTRIES-1; i >= 0; i--)
      if (!ent[i].valid) begin have_free = 1'b1; free_idx = i[$clog2(ENTRIES)-1:0]; end
    lookup_a_hit = 1'b0; lookup_b_hit = 1'b0; resp_match = 1'b0; resp_idx = '0;
    used = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].valid) used = used + 1'b1;
      if (ent[i].valid && ent[i].line == lookup_a_line) lookup_a_hit = 1'b1;
      if (ent[i].valid && ent[i].line == lookup_b_line) lookup_b_hit = 1'b1;
      if (ent[i].valid && ent[i].line == resp_line) begin resp_match = 1'b1; resp_idx = i[$clog2(ENTRIES)-1:0]; end
    end
    full       = !have_free;
    resp_way   = ent[resp_idx].way;
    done_valid = resp_valid && resp_match &&
                 ((ent[resp_idx].arrived | (smask_t'(1) << resp_kth)) == '1);
    done_line  = ent[resp_idx].line;
    done_way   = ent[resp_idx].way;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else begin
      if (resp_valid && resp_match) begin
        ent[resp_idx].arrived[resp_kth] <= 1'b1;
        if (done_valid) ent[resp_idx].valid <= 1'b0;
      end
      if (alloc_valid && have_free) begin
        ent[free_idx].valid   <= 1'b1;
        ent[free_idx].line    <= alloc_line;
        ent[free_idx].way     <= alloc_way;
        ent[free_idx].arrived <= ~slice_mask(alloc_fetch_mask);
      end
    end
  end

  // a slice must belong to an outstanding line
  a_resp_known: assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> resp_match);
endmodule
