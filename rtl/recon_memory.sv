// recon_memory: the reconstructed-pixel memory. Keeps, for every stream, the
// reconstructed pixels (and the selected luma modes) that later blocks of the
// same stream need as prediction neighbours.
//
// Organisation, per stream:
//   lrow  luma line buffer, one entry per 4-pixel column of the frame: the
//         bottom row of the latest block written in that column, its mode, and
//         the corner pixel to its lower-left (taken from lcol when the block is
//         written). Read at column lx (top, corner, mode of the block above)
//         and lx+1 (top-right).
//   lcol  4 entries, one per block row of the macroblock: the right column and
//         mode of the latest block written in that row (the left neighbour).
//   crow  chroma line buffer per plane, one entry per 4-pixel column: bottom
//         row of the macroblock above.
//   ccol  per plane, 2 entries: right column of the macroblock to the left.
// Because each stream's blocks are written in coding order, the latest entry of
// a column or row is always the neighbour the standard asks for; whether it is
// valid is the controller's decision (availability).
//
// Timing: reads are combinational (asynchronous), addressed in the cycle a
// block enters the pipeline; writes take one clock edge, from the last stage.
// A block is written 19 cycles after it entered and read back by the next block
// of its stream 32 cycles after it entered.
// From the document: one memory holding the reconstructed pixels of all
// streams, written after the pipeline and read by the next block of the stream.
// The line-buffer organisation and sizes are this design's choice.
module recon_memory
  import h264_pkg::*;
#(
  parameter int NS        = 32,    // streams
  parameter int MAX_WIDTH = 1920   // widest frame, in luma pixels
)(
  input  logic                clk,
  // read port (block entering the pipeline)
  input  logic [STREAM_W-1:0] rd_stream_i,
  input  slot_kind_t          rd_kind_i,
  input  logic [3:0]          rd_idx_i,
  input  logic [LX_W-1:0]     rd_lx_i,
  output logic [31:0]         top_o,
  output logic [31:0]         topright_o,
  output logic [31:0]         left_o,
  output pix_t                corner_o,
  output logic [3:0]          mode_top_o,
  output logic [3:0]          mode_left_o,
  // write port (block leaving the pipeline)
  input  blk_meta_t           wr_meta_i,
  input  blk_t                wr_recon_i
);

  localparam int LW = MAX_WIDTH / 4;   // luma 4-pixel columns
  localparam int CW = MAX_WIDTH / 8;   // chroma 4-pixel columns per plane

  typedef struct packed {
    logic [3:0]  mode;
    pix_t        cnr;
    logic [31:0] px;
  } lrow_t;
  typedef struct packed {
    logic [3:0]  mode;
    logic [31:0] px;
  } lcol_t;

  lrow_t       lrow [NS][LW];
  lcol_t       lcol [NS][4];
  logic [31:0] crow [NS][2][CW];
  logic [31:0] ccol [NS][2][2];

  function automatic logic [31:0] right_col(input blk_t b);
    logic [31:0] r;
    for (int y = 0; y < 4; y++) r[8*y +: 8] = b[8*(4*y+3) +: 8];
    return r;
  endfunction

  // ---------------- read ----------------
  logic [1:0] rd_by;
  lrow_t      r_top, r_tr;
  lcol_t      r_left;

  always_comb begin
    rd_by  = {rd_idx_i[3], rd_idx_i[1]};
    r_top  = lrow[rd_stream_i][rd_lx_i];
    r_tr   = (int'(rd_lx_i) + 1 < LW) ? lrow[rd_stream_i][rd_lx_i + 1'b1] : '0;
    r_left = lcol[rd_stream_i][rd_by];
    if (rd_kind_i == SLOT_CHROMA) begin
      top_o       = crow[rd_stream_i][rd_idx_i[2]][rd_lx_i];
      topright_o  = '0;
      left_o      = ccol[rd_stream_i][rd_idx_i[2]][rd_idx_i[1]];
      corner_o    = '0;
      mode_top_o  = MODE_DC;
      mode_left_o = MODE_DC;
    end else begin
      top_o       = r_top.px;
      topright_o  = r_tr.px;
      left_o      = r_left.px;
      corner_o    = r_top.cnr;
      mode_top_o  = r_top.mode;
      mode_left_o = r_left.mode;
    end
  end

  // ---------------- write ----------------
  logic [1:0] wr_by;
  assign wr_by = {wr_meta_i.idx[3], wr_meta_i.idx[1]};

  always_ff @(posedge clk) begin
    if (wr_meta_i.valid && wr_meta_i.kind == SLOT_LUMA) begin
      lrow[wr_meta_i.stream][wr_meta_i.lx] <=
        '{mode: wr_meta_i.mode, cnr: lcol[wr_meta_i.stream][wr_by].px[31:24],
          px: wr_recon_i[127:96]};
      lcol[wr_meta_i.stream][wr_by] <= '{mode: wr_meta_i.mode, px: right_col(wr_recon_i)};
    end
    if (wr_meta_i.valid && wr_meta_i.kind == SLOT_CHROMA) begin
      if (wr_meta_i.idx[1])   // bottom blocks of the plane
        crow[wr_meta_i.stream][wr_meta_i.idx[2]][wr_meta_i.lx] <= wr_recon_i[127:96];
      if (wr_meta_i.idx[0])   // right blocks of the plane
        ccol[wr_meta_i.stream][wr_meta_i.idx[2]][wr_meta_i.idx[1]] <= right_col(wr_recon_i);
    end
  end

endmodule
