// recon_adder: the "post" stage and the adder of the architecture. Adds the
// reconstructed residuals to the predicted pixels of the selected mode and
// clips the sums to 0..255, giving the reconstructed block that is written to
// the reconstructed-pixel memory for later predictions.
//
// Timing: two register stages: (1) the sixteen sums, (2) the clipped pixels.
// meta follows with the same latency. From the document: the adder of
// prediction and reconstructed residuals; the clipping is the standard's and
// the two-cycle split is this design's choice.
module recon_adder
  import h264_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  blk_meta_t meta_i,
  input  blk_t      pred_i,
  input  lvl_blk_t  res_i,
  output blk_meta_t meta_o,
  output blk_t      recon_o
);

  logic signed [16:0] sum1 [16];
  blk_meta_t          m1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= '0; meta_o <= '0; recon_o <= '0;
      for (int k = 0; k < 16; k++) sum1[k] <= '0;
    end else begin
      m1 <= meta_i;
      for (int k = 0; k < 16; k++)
        sum1[k] <= 17'(int'(pred_i[8*k +: 8]) + int'(res_i[k]));
      meta_o <= m1;
      for (int k = 0; k < 16; k++) recon_o[8*k +: 8] <= clip255(int'(sum1[k]));
    end
  end

endmodule
