// tb_recon_adder: random predictions and reconstructed residuals (including
// values that overflow 0..255) into the adder, one per cycle; outputs two
// cycles later must equal clip(pred + residual) pixel by pixel.
module tb_recon_adder;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int L = 2, N = 500;
  logic clk = 0, rst_n = 0;
  blk_meta_t mi, mo;
  blk_t      pi, ro;
  lvl_blk_t  ri;
  recon_adder dut (.clk, .rst_n, .meta_i(mi), .pred_i(pi), .res_i(ri), .meta_o(mo), .recon_o(ro));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int exp_p [N + L][16];
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mi = '0; pi = '0; ri = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        checks++;
        for (int k = 0; k < 16; k++)
          if (int'(ro[8*k +: 8]) != exp_p[i-L][k]) begin
            failures++;
            $display("FAIL blk %0d px %0d got %0d exp %0d", i-L, k, ro[8*k +: 8], exp_p[i-L][k]);
            break;
          end
      end
      for (int k = 0; k < 16; k++) begin
        int pv, rv;
        pv = $urandom_range(0, 255);
        rv = $urandom_range(0, 600) - 300;
        pi[8*k +: 8] = 8'(pv); ri[k] = lvl_t'(rv);
        exp_p[i][k] = clip(pv + rv);
      end
      mi = '0; mi.valid = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
