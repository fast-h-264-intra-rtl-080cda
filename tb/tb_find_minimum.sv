// tb_find_minimum: nine SADs per cycle, drawn from a small range so that ties
// are frequent, with a random mostprobmode. Four cycles later the chosen mode
// must be: the lowest SAD; among equal lowest SADs the most probable mode if it
// is one of them, else the lowest mode number. Its prediction and residuals
// must be the ones of that mode. Ties decided for the most probable mode are
// counted and must occur.
module tb_find_minimum;
  import h264_pkg::*;
  localparam int L = 4, N = 800;
  logic clk = 0, rst_n = 0;
  blk_meta_t   mi, mo;
  blk_t        pi [9], po;
  res_blk_t    ri [9], ro;
  logic [15:0] si [9], so;
  logic [3:0]  mpi;
  find_minimum dut (.clk, .rst_n, .meta_i(mi), .pred_i(pi), .res_i(ri), .sad_i(si), .mpm_i(mpi),
                    .meta_o(mo), .pred_o(po), .res_o(ro), .sad_o(so));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, mpm_ties = 0;
  int exp_m [N + L];
  blk_t exp_p [N + L];
  res_blk_t exp_r [N + L];
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mi = '0; mpi = '0;
    for (int m = 0; m < 9; m++) begin pi[m] = '0; ri[m] = '0; si[m] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        checks++;
        if (int'(mo.mode) != exp_m[i-L] || po != exp_p[i-L] || ro != exp_r[i-L]) begin
          failures++; $display("FAIL blk %0d mode %0d exp %0d", i-L, mo.mode, exp_m[i-L]);
        end
      end
      begin
        int mn, best, mpm;
        mpm = $urandom_range(0, 8);
        mpi = 4'(mpm);
        mn = 1 << 20;
        for (int m = 0; m < 9; m++) begin
          si[m] = (i % 9 == m) ? 16'hFFFF : 16'($urandom_range(0, 4));
          for (int k = 0; k < 16; k++) pi[m][8*k +: 8] = 8'($urandom_range(0, 255));
          for (int k = 0; k < 16; k++) ri[m][k] = res_t'($urandom_range(0, 510) - 255);
          if (int'(si[m]) < mn) mn = int'(si[m]);
        end
        best = -1;
        for (int m = 0; m < 9; m++) if (best < 0 && int'(si[m]) == mn) best = m;
        if (int'(si[mpm]) == mn && best != mpm) begin best = mpm; mpm_ties++; end
        exp_m[i] = best; exp_p[i] = pi[best]; exp_r[i] = ri[best];
        mi = '0; mi.valid = 1;
      end
    end
    checks++;
    if (mpm_ties == 0) begin failures++; $display("FAIL: no mostprobmode tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
