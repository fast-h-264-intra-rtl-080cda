// inv_transform: the T^-1 stage. H.264 4x4 inverse integer transform of a
// rescaled coefficient block, giving the reconstructed residuals:
// rows then columns with the butterfly e=d0+d2, f=d0-d2, g=(d1>>1)-d3,
// h=d1+(d3>>1) -> (e+h, f+g, f-g, e-h), and a final (x+32)>>6.
//
// For a chroma block the (0,0) coefficient is taken from dc_val_i when
// dc_sel_i is set: this is where the chroma DC path rejoins the main path
// (point "c", right after Q^-1).
//
// Timing: three register stages: (1) input with DC substitution,
// (2) horizontal pass, (3) vertical pass and rounding. meta follows.
// Input lane 4*i+j is coefficient row i, column j; output lane 4*y+x is
// residual (x,y). From the document: a T^-1 stage and the DC merge after Q^-1;
// the arithmetic is the standard's, the stage split is this design's choice.
module inv_transform
  import h264_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  blk_meta_t meta_i,
  input  dq_blk_t   coef_i,
  input  logic      dc_sel_i,
  input  dq_t       dc_val_i,
  output blk_meta_t meta_o,
  output lvl_blk_t  res_o
);

  dq_blk_t   d1, h_c, h2;
  lvl_blk_t  v_c;
  blk_meta_t m1, m2;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      int e, f, g, h;
      e = int'(d1[4*i+0]) + int'(d1[4*i+2]);
      f = int'(d1[4*i+0]) - int'(d1[4*i+2]);
      g = (int'(d1[4*i+1]) >>> 1) - int'(d1[4*i+3]);
      h = int'(d1[4*i+1]) + (int'(d1[4*i+3]) >>> 1);
      h_c[4*i+0] = dq_t'(e + h);
      h_c[4*i+1] = dq_t'(f + g);
      h_c[4*i+2] = dq_t'(f - g);
      h_c[4*i+3] = dq_t'(e - h);
    end
    for (int x = 0; x < 4; x++) begin
      int e, f, g, h;
      e = int'(h2[x]) + int'(h2[8+x]);
      f = int'(h2[x]) - int'(h2[8+x]);
      g = (int'(h2[4+x]) >>> 1) - int'(h2[12+x]);
      h = int'(h2[4+x]) + (int'(h2[12+x]) >>> 1);
      v_c[x]    = lvl_t'((e + h + 32) >>> 6);
      v_c[4+x]  = lvl_t'((f + g + 32) >>> 6);
      v_c[8+x]  = lvl_t'((f - g + 32) >>> 6);
      v_c[12+x] = lvl_t'((e - h + 32) >>> 6);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= '0; h2 <= '0; m1 <= '0; m2 <= '0; meta_o <= '0; res_o <= '0;
    end else begin
      d1 <= coef_i;
      if (dc_sel_i) d1[0] <= dc_val_i;
      m1 <= meta_i;
      h2 <= h_c; m2 <= m1;
      res_o <= v_c; meta_o <= m2;
    end
  end

endmodule
