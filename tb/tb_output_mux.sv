// tb_output_mux: presents, as the last pipeline stage would, a header, 16 luma
// blocks, a placeholder and 8 chroma blocks for random streams, with chroma DC
// levels delivered on the side input before the placeholder. Checks the one-hot
// stream valid, the kind, the mode and each word's format: header fields,
// luma levels, placeholder = DC levels + the 16 recorded luma modes, chroma
// levels with lane 0 cleared.
module tb_output_mux;
  import h264_pkg::*;
  localparam int NS = 32;
  logic clk = 0;
  blk_meta_t mi;
  lvl_blk_t li;
  logic [255:0] lbits;
  assign lbits = li;
  logic [STREAM_W-1:0] hs, dcs;
  hdr_t hi;
  logic dcv, dcp;
  lvl_t dcl [4];
  logic [NS-1:0] ov;
  slot_kind_t ok;
  logic [3:0] om;
  logic [255:0] od;
  output_mux #(.NS(NS)) dut (.clk, .meta_i(mi), .level_i(li), .hdr_stream_o(hs), .hdr_i(hi),
    .dc_valid_i(dcv), .dc_stream_i(dcs), .dc_plane_i(dcp), .dc_lvl_i(dcl), .out_valid_o(ov),
    .out_kind_o(ok), .out_mode_o(om), .out_data_o(od));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
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
    mi = '0; li = '0; hi = '0; dcv = 0; dcs = '0; dcp = 0;
    for (int i = 0; i < 4; i++) dcl[i] = '0;
    for (int t = 0; t < 20; t++) begin
      int s;
      logic [63:0] modes;
      logic [127:0] dcexp;
      s = $urandom_range(0, NS - 1);
      @(negedge clk);
      mi = '0; mi.valid = 1; mi.kind = SLOT_HDR; mi.stream = STREAM_W'(s);
      hi = hdr_t'($urandom);
      #1;
      chk(int'(hs) == s && ov == (NS'(1) << s) && ok == SLOT_HDR && od[18:0] == hi && od[255:19] == '0, "header");
      for (int b = 0; b < 16; b++) begin
        @(negedge clk);
        mi.kind = SLOT_LUMA; mi.idx = 4'(b); mi.mode = 4'($urandom_range(0, 8));
        modes[4*b +: 4] = mi.mode;
        li = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        #1;
        chk(ov == (NS'(1) << s) && ok == SLOT_LUMA && om == mi.mode && od == li, "luma");
      end
      for (int p = 0; p < 2; p++) begin
        @(negedge clk);
        mi.valid = 0;
        dcv = 1; dcs = STREAM_W'(s); dcp = p[0];
        for (int i = 0; i < 4; i++) begin
          dcl[i] = lvl_t'($urandom_range(0, 2000) - 1000);
          dcexp[64*p + 16*i +: 16] = dcl[i];
        end
        #1;
        chk(ov == '0, "idle");
      end
      @(negedge clk);
      dcv = 0;
      mi.valid = 1; mi.kind = SLOT_PLACE; mi.mode = '0;
      #1;
      chk(ov == (NS'(1) << s) && ok == SLOT_PLACE && od[127:0] == dcexp && od[191:128] == modes &&
          od[255:192] == '0, "placeholder");
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        mi.kind = SLOT_CHROMA; mi.idx = 4'(c); mi.mode = 4'd2;
        li = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        #1;
        chk(ok == SLOT_CHROMA && om == 4'd2 && od[255:16] == lbits[255:16] && od[15:0] == '0, "chroma");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
