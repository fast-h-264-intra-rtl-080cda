// tb_sad_unit: random original blocks and nine random predictions, some modes
// disabled, one set per cycle. One cycle later it checks each mode's SAD
// (all-ones when disabled), each residual, and the sum of the DC-mode residuals.
module tb_sad_unit;
  import h264_pkg::*;
  localparam int L = 1, N = 500;
  logic clk = 0, rst_n = 0;
  blk_meta_t   mi, mo;
  blk_t        oi;
  blk_t        pi [9], po [9];
  logic [8:0]  en;
  logic [3:0]  mpi, mpo;
  res_blk_t    ro [9];
  logic [15:0] so [9];
  lvl_t        dco;
  sad_unit dut (.clk, .rst_n, .meta_i(mi), .orig_i(oi), .pred_i(pi), .mode_en_i(en), .mpm_i(mpi),
                .meta_o(mo), .pred_o(po), .res_o(ro), .sad_o(so), .mpm_o(mpo), .dc_sum_o(dco));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int exp_s [N + L][9];
  int exp_r [N + L][9][16];
  int exp_dc [N + L];
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mi = '0; oi = '0; en = '0; mpi = '0;
    for (int m = 0; m < 9; m++) pi[m] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        checks++;
        if (int'(dco) != exp_dc[i-L]) begin failures++; $display("FAIL dc %0d exp %0d", dco, exp_dc[i-L]); end
        for (int m = 0; m < 9; m++) begin
          checks++;
          if (int'(so[m]) != exp_s[i-L][m]) begin
            failures++; $display("FAIL blk %0d mode %0d sad %0d exp %0d", i-L, m, so[m], exp_s[i-L][m]);
          end
          for (int k = 0; k < 16; k++)
            if (int'(ro[m][k]) != exp_r[i-L][m][k]) begin
              failures++; $display("FAIL blk %0d mode %0d residual %0d", i-L, m, k); break;
            end
        end
      end
      en = 9'($urandom_range(0, 511)) | 9'b000000100;
      mi = '0; mi.valid = 1;
      for (int k = 0; k < 16; k++) oi[8*k +: 8] = 8'($urandom_range(0, 255));
      exp_dc[i] = 0;
      for (int m = 0; m < 9; m++) begin
        int s;
        s = 0;
        for (int k = 0; k < 16; k++) begin
          int d;
          pi[m][8*k +: 8] = 8'($urandom_range(0, 255));
          d = int'(oi[8*k +: 8]) - int'(pi[m][8*k +: 8]);
          exp_r[i][m][k] = d;
          s += (d < 0) ? -d : d;
          if (m == 2) exp_dc[i] += d;
        end
        exp_s[i][m] = en[m] ? s : 65535;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
