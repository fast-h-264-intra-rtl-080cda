// tb_intra_pred: random neighbours and availability, luma and chroma blocks,
// one per cycle. Two cycles later every one of the nine predictions is
// compared with the standard's per-mode equations (reference package; an
// unavailable top-right row replaced by T3), and the mode-enable mask with the
// availability rules (chroma: DC only, with the chroma DC position rules).
module tb_intra_pred;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int L = 2, N = 800;
  logic clk = 0, rst_n = 0;
  blk_meta_t   mi, mo;
  blk_t        oi, oo;
  logic [31:0] ti, trv, li;
  pix_t        ci;
  avail_t      ai;
  logic [3:0]  mpi, mpo;
  blk_t        po [9];
  logic [8:0]  eno;
  intra_pred dut (.clk, .rst_n, .meta_i(mi), .orig_i(oi), .top_i(ti), .topright_i(trv),
                  .left_i(li), .corner_i(ci), .avail_i(ai), .mpm_i(mpi), .meta_o(mo),
                  .orig_o(oo), .pred_o(po), .mode_en_o(eno), .mpm_o(mpo));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int exp_p [N + L][9][16];
  logic [8:0] exp_en [N + L];
  bit exp_chroma [N + L];
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    mi = '0; oi = '0; ti = '0; trv = '0; li = '0; ci = '0; ai = '0; mpi = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N + L; i++) begin
      @(negedge clk);
      if (i >= L) begin
        checks++;
        if (eno != exp_en[i-L]) begin
          failures++; $display("FAIL blk %0d enable %b exp %b", i-L, eno, exp_en[i-L]);
        end
        for (int m = 0; m < 9; m++) begin
          if (exp_chroma[i-L] && m != 2) continue;
          checks++;
          for (int k = 0; k < 16; k++)
            if (int'(po[m][8*k +: 8]) != exp_p[i-L][m][k]) begin
              failures++;
              $display("FAIL blk %0d mode %0d px %0d got %0d exp %0d", i-L, m, k,
                       po[m][8*k +: 8], exp_p[i-L][m][k]);
              break;
            end
        end
      end
      begin
        nbr_t n;
        bit chroma, ut, ul;
        int dc, q;
        chroma = (i % 4 == 3);
        for (int k = 0; k < 4; k++) begin
          n.top[k]  = (i % 5 == 0) ? 100 + k : $urandom_range(0, 255);
          n.top[4+k] = $urandom_range(0, 255);
          n.left[k] = $urandom_range(0, 255);
        end
        n.corner = $urandom_range(0, 255);
        ai = avail_t'($urandom_range(0, 15));
        for (int k = 0; k < 4; k++) begin
          ti[8*k +: 8] = 8'(n.top[k]); trv[8*k +: 8] = 8'(n.top[4+k]); li[8*k +: 8] = 8'(n.left[k]);
        end
        ci = 8'(n.corner);
        if (!ai.topright) for (int k = 4; k < 8; k++) n.top[k] = n.top[3];
        mi = '0; mi.valid = 1;
        mi.kind = chroma ? SLOT_CHROMA : SLOT_LUMA;
        mi.idx = 4'($urandom_range(0, chroma ? 7 : 15));
        q = int'(mi.idx[1:0]);
        ut = ai.top; ul = ai.left;
        if (chroma && q == 1 && ai.top) ul = 0;
        if (chroma && q == 2 && ai.left) ut = 0;
        dc = dc_value(n, ut, ul);
        for (int m = 0; m < 9; m++)
          for (int k = 0; k < 16; k++) exp_p[i][m][k] = pred_px(n, m, k % 4, k / 4, dc);
        exp_chroma[i] = chroma;
        if (chroma) exp_en[i] = 9'b000000100;
        else exp_en[i] = {ai.left, ai.top, {3{ai.top & ai.left & ai.corner}}, ai.top, 1'b1,
                          ai.left, ai.top};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
