// chroma_dc_path: the side path of the chroma DC coefficients. The DC term of
// each chroma 4x4 block (the sum of its residuals, formed in the SAD stage) is
// collected until all four blocks of one 8x8 chroma plane (U: C00-C03,
// V: C04-C07) are in ("chromaDC"). Then, one register stage each:
//   H        2x2 Hadamard   f = [1 1;1 -1] * w * [1 1;1 -1]
//   Q_DC     |z| = (|f| * MF(QP%6,0,0) + 2^(16+QP/6)/3) >> (16 + QP/6)  (2 stages)
//   Q_DC^-1  s = (z * 16 * V(QP%6,0,0)) << (QP/6)
//   H^-1     dcC = (Hadamard(s)) >> 5
// The quantised levels z are presented on lvl_* for the placeholder word of the
// stream; the reconstructed dcC values are held per plane (U and V) and handed
// to the inverse transform when the plane's blocks reach point "c" (the input of
// T^-1), looked up by the meta of the block there.
//
// Timing: the levels are valid 3 cycles, the held dcC 5 cycles after the
// fourth block of a plane leaves the SAD stage; with the main path 11 cycles long from the SAD
// output to T^-1 the first block of the plane finds its dcC in place. A hold
// register per plane keeps the U values while V is being computed; they are
// replaced by the next stream's values 9 cycles later, after the last block
// has read them.
// From the document: the collection, H, Q_DC, Q_DC^-1, H^-1 in that order,
// their start together with the SAD and the merge after Q^-1. The stage counts,
// the rounding offset and the per-plane hold registers are this design's choice.
module chroma_dc_path
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  blk_meta_t  meta_i,       // block leaving the SAD stage
  input  lvl_t       dc_i,         // its DC term
  // quantised chroma DC levels, one plane at a time
  output logic       lvl_valid_o,
  output logic [STREAM_W-1:0] lvl_stream_o,
  output logic       lvl_plane_o,  // 0: U, 1: V
  output lvl_t       lvl_o [4],    // f00, f01, f10, f11
  // merge into the main path at point "c"
  input  blk_meta_t  meta_c_i,
  output logic       dc_sel_o,
  output dq_t        dc_val_o
);

  function automatic void had(input int a0, input int a1, input int a2, input int a3,
                              output int b0, output int b1, output int b2, output int b3);
    b0 = a0 + a1 + a2 + a3;
    b1 = a0 - a1 + a2 - a3;
    b2 = a0 + a1 - a2 - a3;
    b3 = a0 - a1 - a2 + a3;
  endfunction

  lvl_t w [3];                          // DC of blocks 0..2 of the current plane
  logic fire;
  assign fire = meta_i.valid && meta_i.kind == SLOT_CHROMA && meta_i.idx[1:0] == 2'd3;

  // pipeline registers
  logic                s1_v, s2_v, s3_v, s4_v;
  logic [STREAM_W-1:0] s1_s, s2_s, s3_s;
  logic                s1_p, s2_p, s3_p, s4_p;
  logic [5:0]          s1_q, s2_q, s3_q;
  int                  s1_f [4];
  logic [31:0]         s2_mag [4];
  logic                s2_neg [4];
  lvl_t                s3_z [4];
  int                  s4_s [4];
  dq_t                 hold [2][4];

  int h0, h1, h2, h3;
  int g0, g1, g2, g3;

  always_comb begin
    had(int'(w[0]), int'(w[1]), int'(w[2]), int'(dc_i), h0, h1, h2, h3);
    had(s4_s[0], s4_s[1], s4_s[2], s4_s[3], g0, g1, g2, g3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) w[i] <= '0;
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0; s4_v <= 1'b0;
      s1_s <= '0; s2_s <= '0; s3_s <= '0;
      s1_p <= 1'b0; s2_p <= 1'b0; s3_p <= 1'b0; s4_p <= 1'b0;
      s1_q <= '0; s2_q <= '0; s3_q <= '0;
      for (int i = 0; i < 4; i++) begin
        s1_f[i] <= 0; s2_mag[i] <= '0; s2_neg[i] <= 1'b0; s3_z[i] <= '0; s4_s[i] <= 0;
        hold[0][i] <= '0; hold[1][i] <= '0;
      end
    end else begin
      // chromaDC: collect
      if (meta_i.valid && meta_i.kind == SLOT_CHROMA && meta_i.idx[1:0] != 2'd3)
        w[meta_i.idx[1:0]] <= dc_i;
      // H
      s1_v <= fire; s1_s <= meta_i.stream; s1_p <= meta_i.idx[2]; s1_q <= meta_i.qp;
      s1_f[0] <= h0; s1_f[1] <= h1; s1_f[2] <= h2; s1_f[3] <= h3;
      // Q_DC, part 1: magnitude times MF
      s2_v <= s1_v; s2_s <= s1_s; s2_p <= s1_p; s2_q <= s1_q;
      for (int i = 0; i < 4; i++) begin
        s2_neg[i] <= s1_f[i] < 0;
        s2_mag[i] <= 32'(((s1_f[i] < 0) ? -s1_f[i] : s1_f[i]) * quant_mf(int'(s1_q) % 6, 0));
      end
      // Q_DC, part 2: rounding and shift
      s3_v <= s2_v; s3_s <= s2_s; s3_p <= s2_p; s3_q <= s2_q;
      for (int i = 0; i < 4; i++) begin
        logic [31:0] q;
        q = (s2_mag[i] + ((32'd1 << (16 + int'(s2_q) / 6)) / 3)) >> (16 + int'(s2_q) / 6);
        s3_z[i] <= s2_neg[i] ? -lvl_t'(q) : lvl_t'(q);
      end
      // Q_DC^-1
      s4_v <= s3_v; s4_p <= s3_p;
      for (int i = 0; i < 4; i++)
        s4_s[i] <= (int'(s3_z[i]) * 16 * dequant_v(int'(s3_q) % 6, 0)) <<< (int'(s3_q) / 6);
      // H^-1 into the hold register of the plane
      if (s4_v) begin
        hold[s4_p][0] <= dq_t'(g0 >>> 5);
        hold[s4_p][1] <= dq_t'(g1 >>> 5);
        hold[s4_p][2] <= dq_t'(g2 >>> 5);
        hold[s4_p][3] <= dq_t'(g3 >>> 5);
      end
    end
  end

  always_comb begin
    lvl_valid_o  = s3_v;
    lvl_stream_o = s3_s;
    lvl_plane_o  = s3_p;
    for (int i = 0; i < 4; i++) lvl_o[i] = s3_z[i];
    dc_sel_o = meta_c_i.valid && meta_c_i.kind == SLOT_CHROMA;
    dc_val_o = hold[meta_c_i.idx[2]][meta_c_i.idx[1:0]];
  end

endmodule
