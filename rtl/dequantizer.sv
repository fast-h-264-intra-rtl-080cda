// dequantizer: the Q^-1 stage. H.264 rescaling of a 4x4 level block:
// W' = Z * V(QP%6, position) << (QP/6). With flat scaling matrices this equals
// the standard's LevelScale form for every QP.
//
// Timing: two register stages: (1) multiplier look-up and product, (2) shift.
// meta follows with the same latency. For a chroma block the (0,0) output is
// replaced further on by the value the chroma DC path reconstructs.
// From the document: a Q^-1 stage; arithmetic as in the standard; the stage
// split is this design's choice.
module dequantizer
  import h264_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  blk_meta_t meta_i,
  input  lvl_blk_t  level_i,
  output blk_meta_t meta_o,
  output dq_blk_t   coef_o
);

  logic signed [23:0] prod1 [16];
  logic [3:0]         qb1;
  blk_meta_t          m1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= '0; qb1 <= '0; meta_o <= '0; coef_o <= '0;
      for (int k = 0; k < 16; k++) prod1[k] <= '0;
    end else begin
      m1  <= meta_i;
      qb1 <= 4'(int'(meta_i.qp) / 6);
      for (int k = 0; k < 16; k++)
        prod1[k] <= 24'(int'(level_i[k]) * dequant_v(int'(meta_i.qp) % 6, pos_class(k / 4, k % 4)));
      meta_o <= m1;
      for (int k = 0; k < 16; k++) coef_o[k] <= prod1[k] <<< qb1;
    end
  end

endmodule
