// tb_control_logic: runs the controller for four macroblock periods of 32
// streams with random headers (new_frame, new_line, end_line, QPs) and random
// neighbour modes. Every cycle it checks the slot against the schedule
// (header x32, luma 0..15 x32 with the stream varying fastest, then per stream
// placeholder and C0..C7), the mux pointer, the QP, the line-buffer column, the
// neighbour availability worked out from pixel positions, and mostprobmode.
module tb_control_logic;
  import h264_pkg::*;
  localparam int NS = 32;
  logic clk = 0, rst_n = 0;
  blk_t word;
  logic [STREAM_W-1:0] sel, hs;
  blk_meta_t meta;
  avail_t av;
  logic [3:0] mt, ml, mpm;
  hdr_t hrd;
  control_logic #(.NS(NS)) dut (.clk, .rst_n, .word_i(word), .sel_o(sel), .meta_o(meta),
    .avail_o(av), .mode_top_i(mt), .mode_left_i(ml), .mpm_o(mpm), .hdr_rd_stream_i(hs),
    .hdr_rd_o(hrd));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // model state
  hdr_t h [NS];
  int   mbx [NS];
  bit   first [NS];

  function automatic bit coded_tr(input int s, input int b);
    int bx, by, X, Y, bb;
    bit lmb, tmb, trmb;
    bx = ((b >> 1) & 2) | (b & 1); by = ((b >> 2) & 2) | ((b >> 1) & 1);
    tmb = !first[s]; trmb = tmb && !h[s].end_line;
    X = 4 * bx + 4; Y = 4 * by - 1;
    if (Y < 0) return (X < 16) ? tmb : trmb;
    if (X >= 16) return 0;
    bb = ((Y / 8) << 3) | ((X / 8) << 2) | (((Y % 8) / 4) << 1) | ((X % 8) / 4);
    return bb < b;
  endfunction

  task automatic chk(input bit c, input string what, input int t);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL cycle %0d: %s", t, what); end
  endtask

  initial begin
    #10000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    word = '0; mt = '0; ml = '0; hs = '0;
    for (int s = 0; s < NS; s++) begin first[s] = 1; mbx[s] = 0; h[s] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    t = 0;
    for (int per = 0; per < 4; per++) begin
      // headers
      for (int s = 0; s < NS; s++) begin
        hdr_t hh;
        int r;
        hh = '0;
        r = $urandom_range(0, 3);
        hh.new_frame = (per == 0) || (r == 0);
        hh.new_line  = hh.new_frame || (r == 1);
        hh.end_line  = (r == 2) || (r == 3 && per % 2 == 1);
        hh.qp_luma = 6'($urandom_range(0, 51)); hh.qp_chroma = 6'($urandom_range(0, 51));
        word = '0; word[$bits(hdr_t)-1:0] = hh;
        #1;
        chk(meta.valid && meta.kind == SLOT_HDR && int'(meta.stream) == s && int'(sel) == s, "header slot", t);
        @(negedge clk); t++;
        h[s] = hh;
        if (hh.new_frame) begin mbx[s] = 0; first[s] = 1; end
        else if (hh.new_line) begin mbx[s] = 0; first[s] = 0; end
        else mbx[s]++;
        hs = STREAM_W'(s); #1;
        chk(hrd == hh, "header read-back", t);
      end
      // luma
      for (int b = 0; b < 16; b++)
        for (int s = 0; s < NS; s++) begin
          int bx, by, expm;
          bit el, et;
          bx = ((b >> 1) & 2) | (b & 1); by = ((b >> 2) & 2) | ((b >> 1) & 1);
          word = {$urandom, $urandom, $urandom, $urandom};
          mt = 4'($urandom_range(0, 8)); ml = 4'($urandom_range(0, 8));
          #1;
          el = (bx > 0) || !(h[s].new_frame || h[s].new_line);
          et = (by > 0) || !first[s];
          expm = (el && et) ? ((ml < mt) ? int'(ml) : int'(mt)) : 2;
          chk(meta.valid && meta.kind == SLOT_LUMA && int'(meta.stream) == s && int'(meta.idx) == b &&
              int'(sel) == s, "luma slot", t);
          chk(meta.qp == h[s].qp_luma && int'(meta.lx) == mbx[s] * 4 + bx, "luma qp/column", t);
          chk(av.left == el && av.top == et && av.corner == (el && et) &&
              av.topright == coded_tr(s, b), "luma availability", t);
          chk(int'(mpm) == expm, "mostprobmode", t);
          @(negedge clk); t++;
        end
      // chroma
      for (int s = 0; s < NS; s++)
        for (int k = 0; k < 9; k++) begin
          #1;
          if (k == 0) chk(meta.kind == SLOT_PLACE && int'(meta.stream) == s, "placeholder slot", t);
          else begin
            chk(meta.kind == SLOT_CHROMA && int'(meta.stream) == s && int'(meta.idx) == k - 1 &&
                meta.qp == h[s].qp_chroma && int'(meta.lx) == mbx[s] * 2 + (k - 1) % 2, "chroma slot", t);
            chk(av.left == !(h[s].new_frame || h[s].new_line) && av.top == !first[s], "chroma availability", t);
          end
          @(negedge clk); t++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
