// sad_unit: the SAD stage. For each of the nine candidate predictions it forms
// the 16 residuals (original minus prediction) and their sum of absolute
// differences, all nine in parallel. A disabled mode gets the largest SAD
// value so the minimum search can never pick it.
//
// Alongside, it forms the sum of the sixteen DC-mode residuals. For a chroma
// block this sum is exactly the DC coefficient of the forward core transform,
// so the chroma DC path can start here ("b") instead of after the transform.
//
// Timing: one register stage; meta, predictions and mostprobmode are delayed
// with it. From the document: residual and SAD of every mode in parallel, and
// the chroma DC obtained together with the SAD. The 16-bit SAD width and the
// all-ones value for disabled modes are this design's choice.
module sad_unit
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  blk_meta_t  meta_i,
  input  blk_t       orig_i,
  input  blk_t       pred_i [9],
  input  logic [8:0] mode_en_i,
  input  logic [3:0] mpm_i,
  output blk_meta_t  meta_o,
  output blk_t       pred_o [9],
  output res_blk_t   res_o [9],
  output logic [15:0] sad_o [9],
  output logic [3:0] mpm_o,
  output lvl_t       dc_sum_o     // sum of the mode-2 residuals
);

  res_blk_t    res_c [9];
  logic [15:0] sad_c [9];
  int          acc, dcs;

  always_comb begin
    dcs = 0;
    for (int m = 0; m < 9; m++) begin
      acc = 0;
      for (int k = 0; k < 16; k++) begin
        res_c[m][k] = res_t'(int'(orig_i[8*k +: 8]) - int'(pred_i[m][8*k +: 8]));
        acc += (res_c[m][k] < 0) ? -int'(res_c[m][k]) : int'(res_c[m][k]);
        if (m == 2) dcs += int'(res_c[m][k]);
      end
      sad_c[m] = mode_en_i[m] ? 16'(acc) : 16'hFFFF;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_o <= '0; mpm_o <= '0; dc_sum_o <= '0;
      for (int m = 0; m < 9; m++) begin
        pred_o[m] <= '0; res_o[m] <= '0; sad_o[m] <= '0;
      end
    end else begin
      meta_o <= meta_i; mpm_o <= mpm_i; dc_sum_o <= lvl_t'(dcs);
      for (int m = 0; m < 9; m++) begin
        pred_o[m] <= pred_i[m]; res_o[m] <= res_c[m]; sad_o[m] <= sad_c[m];
      end
    end
  end

endmodule
