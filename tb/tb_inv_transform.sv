// tb_inv_transform: random rescaled coefficient blocks into the inverse
// transform, one per cycle, half of them with the (0,0) coefficient replaced
// through the DC-merge input; outputs three cycles later are compared with the
// standard's inverse transform computed by the reference package.
module tb_inv_transform;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int L = 3, N = 600;
  logic clk = 0, rst_n = 0;
  blk_meta_t mi, mo;
  dq_blk_t   ci;
  logic      dsel;
  dq_t       dval;
  lvl_blk_t  ro;
  inv_transform dut (.clk, .rst_n, .meta_i(mi), .coef_i(ci), .dc_sel_i(dsel), .dc_val_i(dval),
                     .meta_o(mo), .res_o(ro));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk4_t exp_r [N + L];
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mi = '0; ci = '0; dsel = 0; dval = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        checks++;
        for (int k = 0; k < 16; k++)
          if (int'(ro[k]) != exp_r[i-L][k/4][k%4]) begin
            failures++;
            $display("FAIL blk %0d lane %0d got %0d exp %0d", i-L, k, ro[k], exp_r[i-L][k/4][k%4]);
            break;
          end
      end
      begin
        blk4_t d;
        for (int k = 0; k < 16; k++) begin
          int v;
          v = $urandom_range(0, 8000) - 4000;
          ci[k] = dq_t'(v); d[k/4][k%4] = v;
        end
        dsel = i % 2;
        dval = dq_t'($urandom_range(0, 8000) - 4000);
        if (dsel) d[0][0] = int'(dval);
        mi = '0; mi.valid = 1;
        exp_r[i] = inv(d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
