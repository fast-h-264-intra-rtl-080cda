// tb_dequantizer: random level blocks and QPs into the rescaler, one per
// cycle; outputs two cycles later are compared with Z * V(QP%6,pos) * 2^(QP/6).
module tb_dequantizer;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int L = 2, N = 600;
  logic clk = 0, rst_n = 0;
  blk_meta_t mi, mo;
  lvl_blk_t  li;
  dq_blk_t   co;
  dequantizer dut (.clk, .rst_n, .meta_i(mi), .level_i(li), .meta_o(mo), .coef_o(co));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk4_t exp_d [N + L];
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mi = '0; li = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        checks++;
        for (int k = 0; k < 16; k++)
          if (int'(co[k]) != exp_d[i-L][k/4][k%4]) begin
            failures++;
            $display("FAIL blk %0d lane %0d got %0d exp %0d", i-L, k, co[k], exp_d[i-L][k/4][k%4]);
            break;
          end
      end
      begin
        blk4_t z;
        int qp;
        qp = $urandom_range(0, 51);
        for (int k = 0; k < 16; k++) begin
          int v;
          v = (qp < 12) ? $urandom_range(0, 4000) - 2000 : $urandom_range(0, 60) - 30;
          li[k] = lvl_t'(v); z[k/4][k%4] = v;
        end
        mi = '0; mi.valid = 1; mi.qp = 6'(qp);
        exp_d[i] = dequant(z, qp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
