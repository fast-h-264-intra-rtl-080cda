// input_mux: the input multiplexer. Each cycle the controller points at one of
// the NS input streams; this unit passes that stream's current 128-bit word (a
// header, a 4x4 block or a placeholder) into the pipeline and pulses that
// stream's pop line so its source advances to the next word.
//
// Combinational; the word is taken in the same cycle as the pointer.
// From the document: a multiplexer of the 32 input streams steered by a
// pointer from the control logic. The one-hot pop lines are this design's
// choice of source interface.
module input_mux
  import h264_pkg::*;
#(
  parameter int NS = 32
)(
  input  blk_t                in_word_i [NS],
  input  logic [STREAM_W-1:0] sel_i,
  input  logic                take_i,
  output blk_t                word_o,
  output logic [NS-1:0]       pop_o
);
  always_comb begin
    word_o = '0;
    pop_o  = '0;
    for (int s = 0; s < NS; s++)
      if (int'(sel_i) == s) begin
        word_o   = in_word_i[s];
        pop_o[s] = take_i;
      end
  end
endmodule
