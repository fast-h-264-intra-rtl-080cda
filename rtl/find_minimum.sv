// find_minimum: the MINIMUM stage. A pipelined comparison tree that selects,
// out of nine candidate modes, the one with the lowest SAD, and forwards that
// mode together with its predicted pixels and its residuals.
//
// How it works: every comparator keeps the lower of two SADs. When both SADs
// are equal it keeps the candidate whose mode equals mostprobmode; if neither
// is the most probable mode it keeps the first (lower-numbered) one. Level 1
// runs 4 comparators (0-1, 2-3, 4-5, 6-7; candidate 8 waits), level 2 runs 2,
// level 3 runs 1 and level 4 runs 1 more against candidate 8. The tree thus
// returns the lowest SAD, the most probable mode among equal lowest SADs, and
// otherwise the lowest mode number among them.
//
// Timing: four register stages, one per tree level; a new block every cycle.
// From the document: the 4-2-1-1 comparator tree and the tie rule favouring
// mostprobmode. The left-first rule for other ties is this design's choice.
module find_minimum
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  blk_meta_t   meta_i,
  input  blk_t        pred_i [9],
  input  res_blk_t    res_i  [9],
  input  logic [15:0] sad_i  [9],
  input  logic [3:0]  mpm_i,
  output blk_meta_t   meta_o,     // meta_o.mode holds the selected mode
  output blk_t        pred_o,
  output res_blk_t    res_o,
  output logic [15:0] sad_o
);

  typedef struct packed {
    logic [3:0]  mode;
    logic [15:0] sad;
    res_blk_t    res;
    blk_t        pred;
  } cand_t;

  function automatic cand_t pick(input cand_t a, input cand_t b, input logic [3:0] mpm);
    if (a.sad < b.sad) return a;
    if (b.sad < a.sad) return b;
    if (b.mode == mpm) return b;
    return a;
  endfunction

  cand_t     c0 [9];
  cand_t     l1 [5];
  cand_t     l2 [3];
  cand_t     l3 [2];
  cand_t     l4;
  blk_meta_t m1, m2, m3, m4;
  logic [3:0] p1, p2, p3;

  always_comb begin
    for (int m = 0; m < 9; m++) begin
      c0[m].mode = 4'(m);
      c0[m].sad  = sad_i[m];
      c0[m].res  = res_i[m];
      c0[m].pred = pred_i[m];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) l1[i] <= '0;
      for (int i = 0; i < 3; i++) l2[i] <= '0;
      for (int i = 0; i < 2; i++) l3[i] <= '0;
      l4 <= '0;
      m1 <= '0; m2 <= '0; m3 <= '0; m4 <= '0;
      p1 <= '0; p2 <= '0; p3 <= '0;
    end else begin
      // level 1: four comparisons
      for (int i = 0; i < 4; i++) l1[i] <= pick(c0[2*i], c0[2*i+1], mpm_i);
      l1[4] <= c0[8];
      m1 <= meta_i; p1 <= mpm_i;
      // level 2: two comparisons
      l2[0] <= pick(l1[0], l1[1], p1);
      l2[1] <= pick(l1[2], l1[3], p1);
      l2[2] <= l1[4];
      m2 <= m1; p2 <= p1;
      // level 3: one comparison
      l3[0] <= pick(l2[0], l2[1], p2);
      l3[1] <= l2[2];
      m3 <= m2; p3 <= p2;
      // level 4: the last comparison
      l4 <= pick(l3[0], l3[1], p3);
      m4 <= m3;
    end
  end

  always_comb begin
    meta_o      = m4;
    meta_o.mode = l4.mode;
    pred_o      = l4.pred;
    res_o       = l4.res;
    sad_o       = l4.sad;
  end

endmodule
