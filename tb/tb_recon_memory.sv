// tb_recon_memory: writes pairs of horizontally adjacent luma blocks (A at
// column X-1, then B at column X, same block row) of random streams and reads
// back what a later block below / to the right would see: top = B's bottom row,
// corner = A's bottom-right pixel, left = B's right column, neighbour modes =
// B's mode, and top-right seen from column X-1 = B's bottom row. Chroma blocks
// are written and read back the same way (bottom row, right column per plane).
module tb_recon_memory;
  import h264_pkg::*;
  localparam int NS = 32, MAXW = 1920;
  logic clk = 0;
  logic [STREAM_W-1:0] rs;
  slot_kind_t rk;
  logic [3:0] ri;
  logic [LX_W-1:0] rlx;
  logic [31:0] top, tr, left;
  pix_t cnr;
  logic [3:0] mt, ml;
  blk_meta_t wm;
  blk_t wr;
  recon_memory #(.NS(NS), .MAX_WIDTH(MAXW)) dut (
    .clk, .rd_stream_i(rs), .rd_kind_i(rk), .rd_idx_i(ri), .rd_lx_i(rlx), .top_o(top),
    .topright_o(tr), .left_o(left), .corner_o(cnr), .mode_top_o(mt), .mode_left_o(ml),
    .wr_meta_i(wm), .wr_recon_i(wr));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [31:0] rcol(input blk_t b);
    return {b[127:120], b[95:88], b[63:56], b[31:24]};
  endfunction
  function automatic logic [3:0] idx_of(input int bx, input int by);
    return 4'({by[1], bx[1], by[0], bx[0]});
  endfunction

  task automatic wr_blk(input slot_kind_t k, input int s, input logic [3:0] idx, input int lx,
                        input logic [3:0] mode, input blk_t px);
    @(negedge clk);
    wm = '0; wm.valid = 1; wm.kind = k; wm.stream = STREAM_W'(s); wm.idx = idx;
    wm.lx = LX_W'(lx); wm.mode = mode; wr = px;
    @(negedge clk);
    wm = '0;
  endtask

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wm = '0; wr = '0; rs = '0; rk = SLOT_LUMA; ri = '0; rlx = '0;
    for (int t = 0; t < 200; t++) begin
      int s, by, x;
      blk_t a, b;
      logic [3:0] ma, mb;
      s = $urandom_range(0, NS - 1); by = $urandom_range(0, 3); x = $urandom_range(1, MAXW / 4 - 2);
      a = {$urandom, $urandom, $urandom, $urandom}; b = {$urandom, $urandom, $urandom, $urandom};
      ma = 4'($urandom_range(0, 8)); mb = 4'($urandom_range(0, 8));
      wr_blk(SLOT_LUMA, s, idx_of(x % 4 == 0 ? 3 : (x - 1) % 4, by), x - 1, ma, a);
      wr_blk(SLOT_LUMA, s, idx_of(x % 4, by), x, mb, b);
      rs = STREAM_W'(s); rk = SLOT_LUMA; ri = idx_of(x % 4, by); rlx = LX_W'(x);
      #1;
      chk(top == b[127:96], "luma top");
      chk(cnr == a[127:120], "luma corner");
      chk(left == rcol(b), "luma left");
      chk(mt == mb && ml == mb, "neighbour modes");
      rlx = LX_W'(x - 1);
      #1;
      chk(tr == b[127:96], "luma top-right");
      chk(top == a[127:96], "luma top of A");
      // chroma
      begin
        int p, xc;
        blk_t c;
        p = $urandom_range(0, 1); xc = $urandom_range(0, MAXW / 8 - 1);
        c = {$urandom, $urandom, $urandom, $urandom};
        wr_blk(SLOT_CHROMA, s, 4'(4 * p + 3), xc, 4'd2, c);
        rk = SLOT_CHROMA; ri = 4'(4 * p + 2); rlx = LX_W'(xc);
        #1;
        chk(top == c[127:96], "chroma top");
        chk(left == rcol(c), "chroma left");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
