// tb_h264_hd_workload: the design at its default size coding streams of full
// HD line width, to show the rate the architecture is built for.
//
// 32 streams run side by side. Three in four are 1920 pixels (120 macroblocks)
// wide, so every line buffer entry up to the last column is used; the others
// are 720 pixels wide. Each frame is two macroblock rows high, so new_frame,
// new_line and end_line all occur. Pictures and QPs vary as in the end-to-end
// test, and the same behavioural reference encoder predicts every output word,
// its kind, its mode and its 19-cycle latency.
//
// The rate check: one placeholder word leaves per coded macroblock, so the
// test counts them over the steady part of the run. It requires at least 36
// macroblocks per 1000 cycles (the architecture gives 32 every 26*32 = 832
// cycles, 38.5) and works out from the measured rate the frame rate of 32
// streams of 1920x1080 (8160 macroblocks per frame) at a 220 MHz clock, which
// must reach 30 frames/s. It also fails if a mechanism never happened: every
// luma mode chosen, a mostprobmode tie, top-right missing at end_line,
// new_frame / new_line, non-zero chroma DC levels, an idle output cycle.
module tb_h264_hd_workload;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int NS      = 32;
  localparam int PERIOD  = 26 * NS;
  localparam int NPER    = 250;        // macroblock periods simulated
  localparam int MAXW    = 120;        // frame width in MBs: 1920 pixels
  localparam int MAXH    = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  blk_t           in_word [NS];
  logic [NS-1:0]  pop, out_valid;
  slot_kind_t     out_kind;
  logic [3:0]     out_mode;
  logic [255:0]   out_data;

  h264_intra_top dut (
    .clk, .rst_n, .in_word_i(in_word), .pop_o(pop), .out_valid_o(out_valid),
    .out_kind_o(out_kind), .out_mode_o(out_mode), .out_data_o(out_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // ---------------- stream state ----------------
  int wmb [NS], hmb [NS];
  int mbx [NS], mby [NS], frame [NS], mbcount [NS], pos [NS];
  int qpl [NS], qpc [NS];
  int org  [NS][MAXH*16][MAXW*16];
  int orgc [NS][2][MAXH*8][MAXW*8];
  int rec  [NS][MAXH*16][MAXW*16];
  int recc [NS][2][MAXH*8][MAXW*8];
  int mmap [NS][MAXH*4][MAXW*4];

  typedef struct {
    slot_kind_t   kind;
    logic [3:0]   mode;
    logic [255:0] data;
    longint       t_in;
  } exp_t;
  exp_t expq [NS][$];
  exp_t mbw  [26];          // words of the macroblock being coded
  exp_t mbw_q [NS][26];     // words of each stream's current macroblock

  // mechanism counters
  int mode_cnt [9];
  int n_mpm_tie = 0, n_tr_missing = 0, n_new_frame = 0, n_new_line = 0, n_dc_nonzero = 0;
  int n_out = 0, n_gap = 0;
  int n_mb = 0;              // placeholder words seen in the measured window
  localparam longint T0 = longint'(2 * PERIOD), T1 = longint'((NPER - 1) * PERIOD);

  function automatic int zx(input int b); return ((b >> 1) & 2) | (b & 1); endfunction
  function automatic int zy(input int b); return ((b >> 2) & 2) | ((b >> 1) & 1); endfunction

  // ---------------- picture generation ----------------
  task automatic make_frame(input int s);
    int pat;
    pat = (s + 3 * frame[s]) % 6;
    for (int y = 0; y < hmb[s]*16; y++)
      for (int x = 0; x < wmb[s]*16; x++) begin
        int v;
        case (pat)
          0: v = $urandom_range(0, 255);
          1: v = ((y / 2) % 2) ? 200 : 40;                        // horizontal stripes
          2: v = ((x / 2) % 2) ? 220 : 30;                        // vertical stripes
          3: v = (x * 3 + y * 5) % 256;                           // gradient
          4: v = 90;                                              // flat
          default: v = ((x + y) % 8 < 4) ? 180 + $urandom_range(0, 6) : 60;  // diagonal
        endcase
        org[s][y][x] = v;
      end
    for (int c = 0; c < 2; c++)
      for (int y = 0; y < hmb[s]*8; y++)
        for (int x = 0; x < wmb[s]*8; x++)
          orgc[s][c][y][x] = (pat == 4) ? 128 : (pat == 0) ? $urandom_range(0, 255)
                                                           : (x * 9 + y * 4 * (c + 1) + 17 * pat) % 256;
  endtask

  // pixel (X,Y) of the current frame is already coded when seen from luma block b of MB (mx,my)
  function automatic bit coded(input int s, input int X, input int Y, input int mx, input int my,
                               input int b);
    int ox, oy, bb;
    if (X < 0 || Y < 0 || X >= wmb[s]*16 || Y >= hmb[s]*16) return 0;
    ox = X / 16; oy = Y / 16;
    if (oy * wmb[s] + ox < my * wmb[s] + mx) return 1;
    if (oy != my || ox != mx) return 0;
    bb = (((Y % 16) / 8) << 3) | (((X % 16) / 8) << 2) | ((((Y % 8) / 4)) << 1) | ((X % 8) / 4);
    return bb < b;
  endfunction

  function automatic logic [255:0] pack_lvl(input blk4_t z, input bit zero_dc);
    logic [255:0] d;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      d[16*(4*i+j) +: 16] = 16'(z[i][j]);
    if (zero_dc) d[15:0] = '0;
    return d;
  endfunction

  // ---------------- reference encoder of one macroblock ----------------
  task automatic code_mb(input int s, input logic [18:0] hdr);
    int mx, my;
    logic [63:0] modes;
    logic [127:0] dcl;
    mx = mbx[s]; my = mby[s];
    mbw[0].kind = SLOT_HDR; mbw[0].mode = 0; mbw[0].data = '0; mbw[0].data[18:0] = hdr;
    // luma
    for (int b = 0; b < 16; b++) begin
      int gx, gy, sad [9], best, mpm, mina, dc;
      bit at, al, atr, ac, en [9];
      nbr_t n;
      blk4_t pr [9], r, w, z, d, rr;
      gx = mx*16 + zx(b)*4; gy = my*16 + zy(b)*4;
      at  = coded(s, gx, gy-1, mx, my, b);
      al  = coded(s, gx-1, gy, mx, my, b);
      atr = coded(s, gx+4, gy-1, mx, my, b);
      ac  = coded(s, gx-1, gy-1, mx, my, b);
      if (at && !atr && zx(b) == 3 && zy(b) == 0) n_tr_missing++;
      for (int i = 0; i < 4; i++) begin
        n.top[i]  = at ? rec[s][gy-1][gx+i] : 0;
        n.left[i] = al ? rec[s][gy+i][gx-1] : 0;
      end
      for (int i = 0; i < 4; i++) n.top[4+i] = atr ? rec[s][gy-1][gx+4+i] : n.top[3];
      n.corner = ac ? rec[s][gy-1][gx-1] : 0;
      en[0] = at; en[1] = al; en[2] = 1; en[3] = at; en[7] = at; en[8] = al;
      en[4] = at && al && ac; en[5] = en[4]; en[6] = en[4];
      mpm = (at && al) ? ((mmap[s][gy/4][gx/4-1] < mmap[s][gy/4-1][gx/4]) ?
                          mmap[s][gy/4][gx/4-1] : mmap[s][gy/4-1][gx/4]) : 2;
      dc = dc_value(n, at, al);
      mina = 1 << 30;
      for (int m = 0; m < 9; m++) begin
        sad[m] = 0;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          pr[m][y][x] = pred_px(n, m, x, y, dc);
          if (en[m]) sad[m] += (org[s][gy+y][gx+x] > pr[m][y][x]) ?
                               org[s][gy+y][gx+x] - pr[m][y][x] : pr[m][y][x] - org[s][gy+y][gx+x];
        end
        if (en[m] && sad[m] < mina) mina = sad[m];
      end
      best = -1;
      for (int m = 8; m >= 0; m--) if (en[m] && sad[m] == mina) best = m;
      if (en[mpm] && sad[mpm] == mina) begin
        if (best != mpm) n_mpm_tie++;
        best = mpm;
      end
      mode_cnt[best]++;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        r[y][x] = org[s][gy+y][gx+x] - pr[best][y][x];
      w = fwd(r); z = quant(w, qpl[s]); d = dequant(z, qpl[s]); rr = inv(d);
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        rec[s][gy+y][gx+x] = clip(pr[best][y][x] + rr[y][x]);
      mmap[s][gy/4][gx/4] = best;
      modes[4*b +: 4] = 4'(best);
      mbw[1+b].kind = SLOT_LUMA; mbw[1+b].mode = 4'(best); mbw[1+b].data = pack_lvl(z, 0);
    end
    // chroma
    for (int c = 0; c < 2; c++) begin
      int wdc [4], lv [4], dcc [4];
      blk4_t pr [4], zz [4];
      bit at, al;
      at = my > 0; al = mx > 0;
      for (int k = 0; k < 4; k++) begin
        int gx, gy, dc, cx, cy;
        nbr_t n;
        blk4_t r, w;
        cx = k % 2; cy = k / 2;
        gx = mx*8 + cx*4; gy = my*8 + cy*4;
        for (int i = 0; i < 4; i++) begin
          n.top[i]  = at ? recc[s][c][my*8-1][gx+i] : 0;
          n.left[i] = al ? recc[s][c][gy+i][mx*8-1] : 0;
        end
        if (k == 1)      dc = at ? dc_value(n, 1, 0) : dc_value(n, 0, al);
        else if (k == 2) dc = al ? dc_value(n, 0, 1) : dc_value(n, at, 0);
        else             dc = dc_value(n, at, al);
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          pr[k][y][x] = dc;
          r[y][x] = orgc[s][c][gy+y][gx+x] - dc;
        end
        w = fwd(r);
        wdc[k] = w[0][0];
        zz[k] = quant(w, qpc[s]);
      end
      chroma_dc(wdc, qpc[s], lv, dcc);
      for (int i = 0; i < 4; i++) begin
        dcl[64*c + 16*i +: 16] = 16'(lv[i]);
        if (lv[i] != 0) n_dc_nonzero++;
      end
      for (int k = 0; k < 4; k++) begin
        blk4_t d, rr;
        int gx, gy;
        gx = mx*8 + (k % 2)*4; gy = my*8 + (k / 2)*4;
        d = dequant(zz[k], qpc[s]);
        d[0][0] = dcc[k];
        rr = inv(d);
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
          recc[s][c][gy+y][gx+x] = clip(pr[k][y][x] + rr[y][x]);
        mbw[18 + 4*c + k].kind = SLOT_CHROMA; mbw[18 + 4*c + k].mode = 4'd2;
        mbw[18 + 4*c + k].data = pack_lvl(zz[k], 1);
      end
    end
    mbw[17].kind = SLOT_PLACE; mbw[17].mode = 0; mbw[17].data = '0;
    mbw[17].data[191:0] = {modes, dcl};
  endtask

  // word `p` (0..25) of the current macroblock of stream s
  function automatic blk_t make_word(input int s, input int p);
    blk_t wd;
    int gx, gy;
    wd = '0;
    if (p == 0) begin
      wd[5:0]   = 6'(qpl[s]);
      wd[13:8]  = 6'(qpc[s]);
      wd[16]    = (mbx[s] == 0 && mby[s] == 0);
      wd[17]    = (mbx[s] == 0);
      wd[18]    = (mbx[s] == wmb[s] - 1);
    end else if (p <= 16) begin
      gx = mbx[s]*16 + zx(p-1)*4; gy = mby[s]*16 + zy(p-1)*4;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        wd[8*(4*y+x) +: 8] = 8'(org[s][gy+y][gx+x]);
    end else if (p >= 18) begin
      int c, k;
      c = (p - 18) / 4; k = (p - 18) % 4;
      gx = mbx[s]*8 + (k % 2)*4; gy = mby[s]*8 + (k / 2)*4;
      for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++)
        wd[8*(4*y+x) +: 8] = 8'(orgc[s][c][gy+y][gx+x]);
    end
    return wd;
  endfunction

  // start macroblock: choose QP, make the picture if a frame starts, code it
  task automatic start_mb(input int s, output blk_t h);
    qpl[s] = (s * 7 + mbcount[s] * 11) % 52;
    qpc[s] = (qpl[s] + 5) % 52;
    if (mbx[s] == 0 && mby[s] == 0) make_frame(s);
    h = make_word(s, 0);
    code_mb(s, h[18:0]);
    for (int p = 0; p < 26; p++) mbw_q[s][p] = mbw[p];
  endtask

  // ---------------- sources ----------------
  initial begin
    blk_t h0;
    for (int m = 0; m < 9; m++) mode_cnt[m] = 0;
    for (int s = 0; s < NS; s++) begin
      wmb[s] = (s % 4 == 3) ? 45 : MAXW; hmb[s] = MAXH;
      mbx[s] = 0; mby[s] = 0; frame[s] = 0; mbcount[s] = 0; pos[s] = 0;
      start_mb(s, h0);
      in_word[s] = h0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) cycle <= cycle + 1;
    for (int s = 0; s < NS; s++)
      if (rst_n && pop[s]) begin
        exp_t e;
        blk_t hn;
        e = mbw_q[s][pos[s]];
        e.t_in = cycle;
        expq[s].push_back(e);
        if (pos[s] == 0) begin
          if (in_word[s][16]) n_new_frame++;
          else if (in_word[s][17]) n_new_line++;
        end
        pos[s]++;
        if (pos[s] == 26) begin
          pos[s] = 0;
          mbcount[s]++;
          mbx[s]++;
          if (mbx[s] == wmb[s]) begin
            mbx[s] = 0; mby[s]++;
            if (mby[s] == hmb[s]) begin mby[s] = 0; frame[s]++; end
          end
          start_mb(s, hn);
          in_word[s] <= hn;
        end else
          in_word[s] <= make_word(s, pos[s]);
      end
  end

  // ---------------- output checking ----------------
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid != '0) n_out++;
      else if (cycle > 20 && cycle < NPER * PERIOD) n_gap++;
      if (out_valid != '0 && out_kind == SLOT_PLACE && cycle >= T0 && cycle < T1) n_mb++;
      if (out_valid != '0) begin
        int s;
        exp_t e;
        s = -1;
        for (int i = 0; i < NS; i++) if (out_valid[i]) s = i;
        checks++;
        if (!$onehot(out_valid) || expq[s].size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: unexpected output valid=%h", cycle, out_valid);
        end else begin
          e = expq[s].pop_front();
          if (e.kind != out_kind || e.mode != out_mode || e.data != out_data ||
              cycle - e.t_in != 19) begin
            failures++;
            if (failures < 10)
              $display("FAIL cycle %0d stream %0d kind %0d/%0d mode %0d/%0d lat %0d\n  got %h\n  exp %h",
                       cycle, s, out_kind, e.kind, out_mode, e.mode, cycle - e.t_in, out_data, e.data);
          end
        end
      end
    end
  end

  initial begin
    wait (rst_n);
    repeat (NPER * PERIOD + 25) @(posedge clk);
    for (int m = 0; m < 9; m++) begin
      checks++;
      if (mode_cnt[m] == 0) begin failures++; $display("FAIL: mode %0d never chosen", m); end
    end
    checks++; if (n_mpm_tie == 0)    begin failures++; $display("FAIL: no mostprobmode tie"); end
    checks++; if (n_tr_missing == 0) begin failures++; $display("FAIL: no end-of-line top-right case"); end
    checks++; if (n_new_frame == 0 || n_new_line == 0) begin failures++; $display("FAIL: no new frame/line"); end
    checks++; if (n_dc_nonzero == 0) begin failures++; $display("FAIL: chroma DC levels all zero"); end
    begin
      real mb_per_kcycle, fps;
      mb_per_kcycle = 1000.0 * n_mb / real'(T1 - T0);
      fps = 220.0e6 / (8160.0 * 1000.0 * NS / mb_per_kcycle);
      $display("rate: %0d macroblocks in %0d cycles = %.2f per 1000 cycles; 32 x 1920x1080 at 220 MHz: %.1f frames/s",
               n_mb, T1 - T0, mb_per_kcycle, fps);
      checks++; if (mb_per_kcycle < 36.0) begin failures++; $display("FAIL: rate below 36 MB per 1000 cycles"); end
      checks++; if (fps < 30.0) begin failures++; $display("FAIL: HD rate below 30 frames/s"); end
    end
    checks++; if (n_gap != 0) begin failures++; $display("FAIL: %0d idle output cycles", n_gap); end
    $display("modes chosen: %0d %0d %0d %0d %0d %0d %0d %0d %0d", mode_cnt[0], mode_cnt[1],
             mode_cnt[2], mode_cnt[3], mode_cnt[4], mode_cnt[5], mode_cnt[6], mode_cnt[7], mode_cnt[8]);
    $display("mpm ties %0d, top-right missing at line end %0d, new frames %0d, new lines %0d, nonzero chroma DC %0d, outputs %0d",
             n_mpm_tie, n_tr_missing, n_new_frame, n_new_line, n_dc_nonzero, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat ((NPER + 4) * PERIOD + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
