// output_mux: the output multiplexer. Routes every block leaving the pipeline
// to its stream's output (one-hot valid, shared data) and forms the output
// word according to the slot kind:
//   header       data[18:0] the stream's header as received (QPs and flags)
//   luma         data = 16 quantised levels, level k at [16*k +: 16]
//                (coefficient row k/4, column k%4); mode = selected mode
//   placeholder  data[127:0]   the 8 quantised chroma DC levels, U f00 f01 f10
//                f11 then V, 16 bits each; data[191:128] the 16 selected luma
//                modes of the macroblock, mode of block b at [128+4*b +: 4]
//   chroma       data = 16 quantised levels with lane 0 zero (its DC is in
//                the placeholder); mode = 2 (DC)
// To fill the placeholder it records per stream the luma modes as they pass
// and the chroma DC levels as the chroma DC path delivers them; both are in
// place before the stream's placeholder leaves the pipeline.
//
// Timing: the word is combinational from the last pipeline register; the
// records are written on the clock edge.
// From the document: a multiplexer onto 32 output streams, the chroma DC levels
// stored on the placeholder and the selected modes handed to the entropy
// coder. Carrying the modes in the placeholder (the first output word after
// the last luma block) rather than in the header is this design's choice.
module output_mux
  import h264_pkg::*;
#(
  parameter int NS = 32
)(
  input  logic                clk,
  input  blk_meta_t           meta_i,
  input  lvl_blk_t            level_i,
  output logic [STREAM_W-1:0] hdr_stream_o,
  input  hdr_t                hdr_i,
  input  logic                dc_valid_i,
  input  logic [STREAM_W-1:0] dc_stream_i,
  input  logic                dc_plane_i,
  input  lvl_t                dc_lvl_i [4],
  output logic [NS-1:0]       out_valid_o,
  output slot_kind_t          out_kind_o,
  output logic [3:0]          out_mode_o,
  output logic [255:0]        out_data_o
);

  logic [63:0]  mode_rec [NS];
  logic [127:0] dc_rec   [NS];

  always_ff @(posedge clk) begin
    if (meta_i.valid && meta_i.kind == SLOT_LUMA)
      mode_rec[meta_i.stream][4*meta_i.idx +: 4] <= meta_i.mode;
    if (dc_valid_i)
      for (int i = 0; i < 4; i++)
        dc_rec[dc_stream_i][64*dc_plane_i + 16*i +: 16] <= dc_lvl_i[i];
  end

  assign hdr_stream_o = meta_i.stream;

  always_comb begin
    out_valid_o = '0;
    for (int s = 0; s < NS; s++)
      if (int'(meta_i.stream) == s) out_valid_o[s] = meta_i.valid;
    out_kind_o = meta_i.kind;
    out_mode_o = (meta_i.kind == SLOT_LUMA || meta_i.kind == SLOT_CHROMA) ? meta_i.mode : 4'd0;
    out_data_o = '0;
    case (meta_i.kind)
      SLOT_HDR:   out_data_o[$bits(hdr_t)-1:0] = hdr_i;
      SLOT_LUMA:  out_data_o = level_i;
      SLOT_PLACE: out_data_o[191:0] = {mode_rec[meta_i.stream], dc_rec[meta_i.stream]};
      default: begin
        out_data_o = level_i;
        out_data_o[15:0] = '0;
      end
    endcase
  end

endmodule
