// h264_intra_top: multi-stream H.264 intra 4x4 encoder core. NS independent
// video streams share one deeply pipelined datapath that takes one 4x4 block
// per clock. The data dependency between neighbouring blocks of a picture is
// hidden by interleaving the streams: the next block of a stream enters NS
// cycles after the previous one, and by then that one has left the 19-stage
// pipeline and its reconstructed pixels sit in the reconstructed-pixel memory.
//
// Pipeline (register stages after the block enters, cumulative):
//   entry   control_logic slot, input_mux word, recon_memory neighbours
//   PRED    intra_pred       2  (9 luma modes or chroma DC)
//   SAD     sad_unit         3  (residuals, SADs, chroma DC term: point "b")
//   MINIMUM find_minimum     7  (4-2-1-1 comparator tree)
//   T       fwd_transform    9  (point "a")
//   Q       quantizer       12
//   Q^-1    dequantizer     14  (chroma DC merged here: point "c")
//   T^-1    inv_transform   17
//   post    recon_adder     19  -> recon_memory write, output_mux
// The chroma DC side path (chroma_dc_path: collect, H, Q_DC, Q_DC^-1, H^-1)
// runs from "b" to "c". Predictions of the chosen mode (from MINIMUM to post)
// and the quantised levels (from Q to the output) travel in pipe_delay lines.
//
// Interface: in_word_i[s] is the current word of input stream s; pop_o[s]
// asks for the next one in the same cycle it is taken. Each stream delivers,
// per macroblock, a header, 16 luma blocks, a placeholder and 8 chroma blocks,
// in the slot order of control_logic; the design never stalls, so a source
// must always have its next word ready. Outputs: one word per cycle, with a
// one-hot out_valid_o naming its stream (see output_mux for the format). A
// block that enters in cycle t leaves in cycle t+19.
// NS must exceed the pipeline depth (checked by an assertion).
// From the document: the block structure, the 19 + 13 = 32 cycle turn-around,
// one block per cycle and 32 streams. Stage split and formats are this design's.
module h264_intra_top
  import h264_pkg::*;
#(
  parameter int NS        = 32,
  parameter int MAX_WIDTH = 1920
)(
  input  logic           clk,
  input  logic           rst_n,
  input  blk_t           in_word_i [NS],
  output logic [NS-1:0]  pop_o,
  output logic [NS-1:0]  out_valid_o,
  output slot_kind_t     out_kind_o,
  output logic [3:0]     out_mode_o,
  output logic [255:0]   out_data_o
);

  localparam int PIPE_DEPTH = 19;

  // ---------------- entry ----------------
  logic [STREAM_W-1:0] sel;
  blk_meta_t           m0;
  avail_t              av0;
  logic [3:0]          mpm0, mode_top, mode_left;
  blk_t                word0;
  logic [31:0]         nb_top, nb_tr, nb_left;
  pix_t                nb_cnr;
  logic [STREAM_W-1:0] hdr_stream;
  hdr_t                hdr_rd;

  control_logic #(.NS(NS), .MAX_WIDTH(MAX_WIDTH)) u_ctrl (
    .clk, .rst_n, .word_i(word0), .sel_o(sel), .meta_o(m0), .avail_o(av0),
    .mode_top_i(mode_top), .mode_left_i(mode_left), .mpm_o(mpm0),
    .hdr_rd_stream_i(hdr_stream), .hdr_rd_o(hdr_rd));

  input_mux #(.NS(NS)) u_imux (
    .in_word_i, .sel_i(sel), .take_i(m0.valid), .word_o(word0), .pop_o);

  blk_meta_t m19;
  blk_t      recon19;

  recon_memory #(.NS(NS), .MAX_WIDTH(MAX_WIDTH)) u_mem (
    .clk, .rd_stream_i(m0.stream), .rd_kind_i(m0.kind), .rd_idx_i(m0.idx), .rd_lx_i(m0.lx),
    .top_o(nb_top), .topright_o(nb_tr), .left_o(nb_left), .corner_o(nb_cnr),
    .mode_top_o(mode_top), .mode_left_o(mode_left),
    .wr_meta_i(m19), .wr_recon_i(recon19));

  // ---------------- PRED ----------------
  blk_meta_t  m2;
  blk_t       orig2;
  blk_t       pred2 [9];
  logic [8:0] en2;
  logic [3:0] mpm2;

  intra_pred u_pred (
    .clk, .rst_n, .meta_i(m0), .orig_i(word0), .top_i(nb_top), .topright_i(nb_tr),
    .left_i(nb_left), .corner_i(nb_cnr), .avail_i(av0), .mpm_i(mpm0),
    .meta_o(m2), .orig_o(orig2), .pred_o(pred2), .mode_en_o(en2), .mpm_o(mpm2));

  // ---------------- SAD ----------------
  blk_meta_t   m3;
  blk_t        pred3 [9];
  res_blk_t    res3 [9];
  logic [15:0] sad3 [9];
  logic [3:0]  mpm3;
  lvl_t        dc3;

  sad_unit u_sad (
    .clk, .rst_n, .meta_i(m2), .orig_i(orig2), .pred_i(pred2), .mode_en_i(en2), .mpm_i(mpm2),
    .meta_o(m3), .pred_o(pred3), .res_o(res3), .sad_o(sad3), .mpm_o(mpm3), .dc_sum_o(dc3));

  // ---------------- MINIMUM ----------------
  blk_meta_t   m7;
  blk_t        pred7;
  res_blk_t    res7;

  find_minimum u_min (
    .clk, .rst_n, .meta_i(m3), .pred_i(pred3), .res_i(res3), .sad_i(sad3), .mpm_i(mpm3),
    .meta_o(m7), .pred_o(pred7), .res_o(res7), .sad_o());

  // ---------------- T, Q, Q^-1, T^-1 ----------------
  blk_meta_t m9, m12, m14, m17;
  lvl_blk_t  coef9, lvl12, res17, lvl19;
  dq_blk_t   dq14;
  logic      dc_sel;
  dq_t       dc_val;

  fwd_transform u_t (.clk, .rst_n, .meta_i(m7), .res_i(res7), .meta_o(m9), .coef_o(coef9));
  quantizer     u_q (.clk, .rst_n, .meta_i(m9), .coef_i(coef9), .meta_o(m12), .level_o(lvl12));
  dequantizer   u_iq (.clk, .rst_n, .meta_i(m12), .level_i(lvl12), .meta_o(m14), .coef_o(dq14));
  inv_transform u_it (.clk, .rst_n, .meta_i(m14), .coef_i(dq14), .dc_sel_i(dc_sel),
                      .dc_val_i(dc_val), .meta_o(m17), .res_o(res17));

  // ---------------- chroma DC side path ----------------
  logic                dcl_v, dcl_p;
  logic [STREAM_W-1:0] dcl_s;
  lvl_t                dcl [4];

  chroma_dc_path u_cdc (
    .clk, .rst_n, .meta_i(m3), .dc_i(dc3),
    .lvl_valid_o(dcl_v), .lvl_stream_o(dcl_s), .lvl_plane_o(dcl_p), .lvl_o(dcl),
    .meta_c_i(m14), .dc_sel_o(dc_sel), .dc_val_o(dc_val));

  // ---------------- post ----------------
  blk_t pred17;

  pipe_delay #(.WIDTH($bits(blk_t)), .DEPTH(10)) u_pred_dly (
    .clk, .rst_n, .d_i(pred7), .q_o(pred17));

  recon_adder u_post (.clk, .rst_n, .meta_i(m17), .pred_i(pred17), .res_i(res17),
                      .meta_o(m19), .recon_o(recon19));

  pipe_delay #(.WIDTH($bits(lvl_blk_t)), .DEPTH(7)) u_lvl_dly (
    .clk, .rst_n, .d_i(lvl12), .q_o(lvl19));

  // ---------------- output ----------------
  output_mux #(.NS(NS)) u_omux (
    .clk, .meta_i(m19), .level_i(lvl19), .hdr_stream_o(hdr_stream), .hdr_i(hdr_rd),
    .dc_valid_i(dcl_v), .dc_stream_i(dcl_s), .dc_plane_i(dcl_p), .dc_lvl_i(dcl),
    .out_valid_o, .out_kind_o, .out_mode_o, .out_data_o);

  initial begin
    assert (NS > PIPE_DEPTH)
      else $error("NS (%0d) must exceed the pipeline depth (%0d)", NS, PIPE_DEPTH);
    assert (NS <= 2**STREAM_W) else $error("NS too large for STREAM_W");
  end

endmodule
