// tb_fwd_transform: drives random 4x4 residual blocks (one per cycle) into the
// forward transform and compares every output block, two cycles later, with
// the matrix product Cf * X * Cf^T computed by the reference package.
module tb_fwd_transform;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int L = 2, N = 400;
  logic clk = 0, rst_n = 0;
  blk_meta_t mi, mo;
  res_blk_t  ri;
  lvl_blk_t  co;
  fwd_transform dut (.clk, .rst_n, .meta_i(mi), .res_i(ri), .meta_o(mo), .coef_o(co));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk4_t exp_w [N + L];
  logic [5:0] exp_q [N + L];
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mi = '0; ri = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        checks++;
        for (int k = 0; k < 16; k++)
          if (int'(co[k]) != exp_w[i-L][k/4][k%4]) begin
            failures++;
            $display("FAIL blk %0d coef %0d got %0d exp %0d", i-L, k, co[k], exp_w[i-L][k/4][k%4]);
            break;
          end
        checks++;
        if (mo.qp != exp_q[i-L]) failures++;
      end
      begin
        blk4_t x;
        for (int k = 0; k < 16; k++) begin
          int v;
          v = (i % 7 == 0) ? ((k % 2) ? 255 : -255) : $urandom_range(0, 510) - 255;
          ri[k] = res_t'(v);
          x[k/4][k%4] = v;
        end
        mi = '0; mi.valid = 1; mi.qp = 6'($urandom_range(0, 51));
        exp_w[i] = fwd(x); exp_q[i] = mi.qp;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
