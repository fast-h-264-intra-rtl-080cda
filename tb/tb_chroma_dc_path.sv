// tb_chroma_dc_path: feeds the chroma slot sequence of the pipeline
// (placeholder, C0..C7 per stream, one per cycle) with random DC terms and
// random chroma QPs, and replays the same blocks 11 cycles later at the merge
// point, as the main path does. It checks the quantised DC levels of every
// plane against the reference Hadamard/quantisation and, for every chroma
// block at the merge point, the reconstructed DC it is handed (and that nothing
// is handed to non-chroma slots). It also checks the 3-cycle level latency.
module tb_chroma_dc_path;
  import h264_pkg::*;
  import h264_ref_pkg::*;
  localparam int NSTR = 40, NSLOT = NSTR * 9, DLY = 11;
  logic clk = 0, rst_n = 0;
  blk_meta_t mi, mc;
  lvl_t      dci;
  logic      lv, lp, dsel;
  logic [STREAM_W-1:0] ls;
  lvl_t      lo [4];
  dq_t       dval;
  chroma_dc_path dut (.clk, .rst_n, .meta_i(mi), .dc_i(dci), .lvl_valid_o(lv), .lvl_stream_o(ls),
                      .lvl_plane_o(lp), .lvl_o(lo), .meta_c_i(mc), .dc_sel_o(dsel), .dc_val_o(dval));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nlv = 0;
  blk_meta_t slots [NSLOT + DLY + 4];
  int exp_dcc [NSLOT + DLY + 4];
  typedef struct { int s; int p; int lvl [4]; int t; } lexp_t;
  lexp_t lq [$];
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int w [4], lvl [4], dcc [4];
    int qp;
    mi = '0; mc = '0; dci = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NSLOT + DLY + 4; i++) begin
      @(negedge clk);
      // levels
      if (lv) begin
        lexp_t e;
        checks++;
        e = lq.pop_front();
        nlv++;
        if (int'(ls) != e.s || int'(lp) != e.p || i - e.t != 3 ||
            int'(lo[0]) != e.lvl[0] || int'(lo[1]) != e.lvl[1] ||
            int'(lo[2]) != e.lvl[2] || int'(lo[3]) != e.lvl[3]) begin
          failures++;
          $display("FAIL levels stream %0d plane %0d got %0d %0d %0d %0d exp %0d %0d %0d %0d", ls, lp,
                   lo[0], lo[1], lo[2], lo[3], e.lvl[0], e.lvl[1], e.lvl[2], e.lvl[3]);
        end
      end
      // new slot
      slots[i] = '0;
      dci = '0;
      if (i < NSLOT) begin
        int s, k;
        s = i / 9; k = i % 9;
        if (k == 0) qp = $urandom_range(0, 51);
        slots[i].valid = 1; slots[i].stream = STREAM_W'(s); slots[i].qp = 6'(qp);
        if (k == 0) slots[i].kind = SLOT_PLACE;
        else begin
          slots[i].kind = SLOT_CHROMA; slots[i].idx = 4'(k - 1);
          w[(k - 1) % 4] = (s % 5 == 0) ? 4080 - 8160 * ((k - 1) % 2) : $urandom_range(0, 8160) - 4080;
          dci = lvl_t'(w[(k - 1) % 4]);
          if ((k - 1) % 4 == 3) begin
            lexp_t e;
            chroma_dc(w, qp, lvl, dcc);
            e.s = s; e.p = (k - 1) / 4; e.lvl = lvl; e.t = i;
            lq.push_back(e);
            for (int j = 0; j < 4; j++) exp_dcc[i - 3 + j] = dcc[j];
          end
        end
      end
      mi = slots[i];
      mc = (i >= DLY) ? slots[i - DLY] : '0;
      #1;
      if (mc.valid) begin
        checks++;
        if (mc.kind == SLOT_CHROMA) begin
          if (!dsel || int'(dval) != exp_dcc[i - DLY]) begin
            failures++;
            $display("FAIL merge slot %0d got %0d exp %0d", i - DLY, dval, exp_dcc[i - DLY]);
          end
        end else if (dsel) begin
          failures++; $display("FAIL merge on non-chroma slot %0d", i - DLY);
        end
      end
    end
    checks++;
    if (nlv != 2 * NSTR) begin failures++; $display("FAIL: %0d level sets, expected %0d", nlv, 2 * NSTR); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
