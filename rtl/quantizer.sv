// quantizer: the Q stage. H.264 forward quantisation of a 4x4 coefficient block:
// |Z| = (|W| * MF(QP%6, position) + f) >> (15 + QP/6), sign of W restored,
// with the intra rounding offset f = 2^(15+QP/6) / 3. QP arrives with the
// block in meta (the luma or chroma QP the controller took from the header).
//
// Timing: three register stages: (1) magnitude, sign and multiplier look-up,
// (2) multiplication, (3) rounding and shift. meta follows with the same
// latency. For a chroma block the (0,0) level is also formed here but is not
// used: the chroma DC takes the separate Hadamard path.
// From the document: a Q stage driven by the QP of the block's stream. The
// arithmetic is the standard's; the three-cycle split is this design's choice.
module quantizer
  import h264_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  blk_meta_t meta_i,
  input  lvl_blk_t  coef_i,
  output blk_meta_t meta_o,
  output lvl_blk_t  level_o
);

  // stage 1
  logic [15:0] mag1 [16];
  logic        neg1 [16];
  logic [13:0] mf1  [16];
  logic [3:0]  qb1;            // QP/6
  blk_meta_t   m1;
  // stage 2
  logic [31:0] prod2 [16];
  logic        neg2  [16];
  logic [3:0]  qb2;
  blk_meta_t   m2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= '0; m2 <= '0; meta_o <= '0; level_o <= '0; qb1 <= '0; qb2 <= '0;
      for (int k = 0; k < 16; k++) begin
        mag1[k] <= '0; neg1[k] <= 1'b0; mf1[k] <= '0; prod2[k] <= '0; neg2[k] <= 1'b0;
      end
    end else begin
      m1  <= meta_i;
      qb1 <= 4'(int'(meta_i.qp) / 6);
      for (int k = 0; k < 16; k++) begin
        neg1[k] <= coef_i[k] < 0;
        mag1[k] <= (coef_i[k] < 0) ? 16'(-int'(coef_i[k])) : 16'(coef_i[k]);
        mf1[k]  <= 14'(quant_mf(int'(meta_i.qp) % 6, pos_class(k / 4, k % 4)));
      end
      m2  <= m1;
      qb2 <= qb1;
      for (int k = 0; k < 16; k++) begin
        prod2[k] <= 32'(mag1[k]) * 32'(mf1[k]);
        neg2[k]  <= neg1[k];
      end
      meta_o <= m2;
      for (int k = 0; k < 16; k++) begin
        logic [31:0] q;
        q = (prod2[k] + ((32'd1 << (15 + qb2)) / 3)) >> (15 + qb2);
        level_o[k] <= neg2[k] ? -lvl_t'(q) : lvl_t'(q);
      end
    end
  end

endmodule
