// pcm_tag_array: tag store of the precision-controlled L1 data cache.
//
// SETS x WAYS entries of 1 KB lines (4 x 8 = 32 KB in the published configuration). Each
// entry holds the tag, a valid bit, a pending bit (allocated, fill in flight) and the
// slice-indexed mask of the slices the line was filled with. A lookup hits when a valid tag
// matches and the line holds every slice the current fetch mask asks for; a line filled at a
// lower precision than now requested counts as a miss. Two combinational lookup ports serve
// demand and prefetch. Victim choice prefers an invalid, non-pending way, otherwise the least
// recently used non-pending way (age ranks per set). LRU, the pending bit and the
// precision-coverage rule are this design's choices. Updates (alloc, fill, invalidate,
// touch) take effect at the next clock edge.
module pcm_tag_array
  import pcm_pkg::*;
#(
  parameter int unsigned SETS = 4,
  parameter int unsigned WAYS = 8,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = $clog2(WAYS),
  localparam int unsigned TAG_W = LINE_W - SET_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  smask_t           need_mask,      // slices the current fetch mask asks for
  // lookup port A (demand)
  input  line_t            a_line,
  output logic             a_hit,
  output logic             a_present,      // valid tag match, whatever the slices
  output logic [WAY_W-1:0] a_way,
  output smask_t           a_lmask,
  output logic             a_victim_ok,
  output logic [WAY_W-1:0] a_victim,
  // lookup port B (prefetch)
  input  line_t            b_line,
  output logic             b_present,
  output logic             b_victim_ok,
  output logic [WAY_W-1:0] b_victim,
  // updates
  input  logic             alloc_en,       // reserve a way for a line being filled
  input  line_t            alloc_line,
  input  logic [WAY_W-1:0] alloc_way,
  input  smask_t           alloc_lmask,
  input  logic             fill_en,        // fill complete: line becomes valid
  input  line_t            fill_line,
  input  logic [WAY_W-1:0] fill_way,
  input  logic             inval_en,
  input  line_t            inval_line,
  input  logic [WAY_W-1:0] inval_way,
  input  logic             touch_en,       // access: make way most recently used
  input  line_t            touch_line,
  input  logic [WAY_W-1:0] touch_way
);
  typedef struct packed {
    logic             valid;
    logic             pending;
    logic [TAG_W-1:0] tag;
    smask_t           lmask;
    logic [WAY_W-1:0] age;   // 0 = most recently used
  } tag_t;

  tag_t t [SETS][WAYS];

  function automatic logic [SET_W-1:0] set_of(line_t l); return l[SET_W-1:0]; endfunction
  function automatic logic [TAG_W-1:0] tag_of(line_t l); return l[LINE_W-1:SET_W]; endfunction

  // victim: first invalid non-pending way, else oldest non-pending way
  function automatic logic [WAY_W:0] pick_victim(logic [SET_W-1:0] s);
    logic             found, inv_found;
    logic [WAY_W-1:0] w, inv_w, best_age;
    found = 1'b0; inv_found = 1'b0; w = '0; inv_w = '0; best_age = '0;
    for (int i = 0; i < WAYS; i++) begin
      if (!t[s][i].pending) begin
        if (!t[s][i].valid && !inv_found) begin inv_found = 1'b1; inv_w = WAY_W'(i); end
        if (!found || t[s][i].age >= best_age) begin found = 1'b1; w = WAY_W'(i); best_age = t[s][i].age; end
      end
    end
    if (inv_found) return {1'b1, inv_w};
    return {found, w};
  endfunction

  always_comb begin
    logic [SET_W-1:0] sa;
    sa = set_of(a_line);
    a_hit = 1'b0; a_present = 1'b0; a_way = '0; a_lmask = '0;
    for (int i = 0; i < WAYS; i++)
      if (t[sa][i].valid && t[sa][i].tag == tag_of(a_line)) begin
        a_present = 1'b1; a_way = WAY_W'(i); a_lmask = t[sa][i].lmask;
        a_hit = ((need_mask & ~t[sa][i].lmask) == '0);
      end
    {a_victim_ok, a_victim} = pick_victim(sa);
    b_present = 1'b0;
    for (int i = 0; i < WAYS; i++)
      if ((t[set_of(b_line)][i].valid || t[set_of(b_line)][i].pending) &&
          t[set_of(b_line)][i].tag == tag_of(b_line))
        b_present = 1'b1;
    {b_victim_ok, b_victim} = pick_victim(set_of(b_line));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int i = 0; i < WAYS; i++) begin
          t[s][i]     <= '0;
          t[s][i].age <= WAY_W'(i);
        end
    end else begin
      if (inval_en) t[set_of(inval_line)][inval_way].valid <= 1'b0;
      if (fill_en) begin
        t[set_of(fill_line)][fill_way].valid   <= 1'b1;
        t[set_of(fill_line)][fill_way].pending <= 1'b0;
      end
      if (alloc_en) begin
        t[set_of(alloc_line)][alloc_way].valid   <= 1'b0;
        t[set_of(alloc_line)][alloc_way].pending <= 1'b1;
        t[set_of(alloc_line)][alloc_way].tag     <= tag_of(alloc_line);
        t[set_of(alloc_line)][alloc_way].lmask   <= alloc_lmask;
      end
      if (touch_en) begin
        for (int i = 0; i < WAYS; i++)
          if (t[set_of(touch_line)][i].age < t[set_of(touch_line)][touch_way].age)
            t[set_of(touch_line)][i].age <= t[set_of(touch_line)][i].age + 1'b1;
        t[set_of(touch_line)][touch_way].age <= '0;
      end
    end
  end
endmodule
