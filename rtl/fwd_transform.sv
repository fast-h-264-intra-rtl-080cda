// fwd_transform: the T stage. H.264 4x4 forward integer core transform
// W = Cf * X * Cf^T with Cf = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1],
// done as the usual butterfly (adds, subtracts and shifts, no multipliers).
//
// Timing: two register stages, the horizontal pass (along each row) in the first
// and the vertical pass (along each column) in the second. Input lane k = 4*y+x
// is residual (x,y); output lane 4*i+j is coefficient row i (vertical frequency),
// column j (horizontal frequency). meta follows with the same latency.
// From the document: a transform stage T; its arithmetic is the standard's,
// and the two-cycle split is this design's choice.
module fwd_transform
  import h264_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  blk_meta_t meta_i,
  input  res_blk_t  res_i,
  output blk_meta_t meta_o,
  output lvl_blk_t  coef_o
);

  lvl_blk_t h_c, h_r, v_c;
  blk_meta_t m1;

  always_comb begin
    for (int y = 0; y < 4; y++) begin
      int a, b, c, d;
      a = int'(res_i[4*y+0]) + int'(res_i[4*y+3]);
      b = int'(res_i[4*y+1]) + int'(res_i[4*y+2]);
      c = int'(res_i[4*y+1]) - int'(res_i[4*y+2]);
      d = int'(res_i[4*y+0]) - int'(res_i[4*y+3]);
      h_c[4*y+0] = lvl_t'(a + b);
      h_c[4*y+1] = lvl_t'(2*d + c);
      h_c[4*y+2] = lvl_t'(a - b);
      h_c[4*y+3] = lvl_t'(d - 2*c);
    end
    for (int x = 0; x < 4; x++) begin
      int a, b, c, d;
      a = int'(h_r[x])   + int'(h_r[12+x]);
      b = int'(h_r[4+x]) + int'(h_r[8+x]);
      c = int'(h_r[4+x]) - int'(h_r[8+x]);
      d = int'(h_r[x])   - int'(h_r[12+x]);
      v_c[x]    = lvl_t'(a + b);
      v_c[4+x]  = lvl_t'(2*d + c);
      v_c[8+x]  = lvl_t'(a - b);
      v_c[12+x] = lvl_t'(d - 2*c);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_r <= '0; m1 <= '0; coef_o <= '0; meta_o <= '0;
    end else begin
      h_r <= h_c; m1 <= meta_i;
      coef_o <= v_c; meta_o <= m1;
    end
  end

endmodule
