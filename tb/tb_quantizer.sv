// tb_quantizer: random coefficient blocks with random QP (0..51) go into the
// quantiser one per cycle; each level block, three cycles later, must equal the
// reference quantisation (MF table, intra offset 2^qbits/3).
module tb_quantizer;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int L = 3, N = 600;
  logic clk = 0, rst_n = 0;
  blk_meta_t mi, mo;
  lvl_blk_t  ci, lo;
  quantizer dut (.clk, .rst_n, .meta_i(mi), .coef_i(ci), .meta_o(mo), .level_o(lo));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk4_t exp_z [N + L];
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mi = '0; ci = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        checks++;
        for (int k = 0; k < 16; k++)
          if (int'(lo[k]) != exp_z[i-L][k/4][k%4]) begin
            failures++;
            $display("FAIL blk %0d lane %0d got %0d exp %0d", i-L, k, lo[k], exp_z[i-L][k/4][k%4]);
            break;
          end
      end
      begin
        blk4_t w;
        int qp;
        qp = $urandom_range(0, 51);
        for (int k = 0; k < 16; k++) begin
          int v;
          v = (i % 3 == 0) ? $urandom_range(0, 18360) - 9180 : $urandom_range(0, 400) - 200;
          ci[k] = lvl_t'(v); w[k/4][k%4] = v;
        end
        mi = '0; mi.valid = 1; mi.qp = 6'(qp);
        exp_z[i] = quant(w, qp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
