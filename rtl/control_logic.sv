// control_logic: the controller. Runs the fixed slot schedule that keeps the
// pipeline full with blocks of different streams, decodes the macroblock
// headers and tells the datapath, per block, what it needs.
//
// Schedule of one macroblock period (26*NS cycles, 832 for 32 streams):
//   NS slots      header of stream 0..NS-1
//   16*NS slots   luma block b = 0..15 of stream 0..NS-1 (stream varies fastest),
//                 so a stream's next luma block enters NS cycles after its
//                 previous one, by which time that one has been reconstructed
//   9*NS slots    per stream: placeholder, then chroma C0..C7 back to back
// after which the next headers are expected. Luma blocks are numbered in the
// standard's zig-zag order of 4x4 blocks (b = {y1,x1,y0,x0}); chroma C0..C3 are
// the U blocks, C4..C7 the V blocks, each in raster order.
//
// Per stream it keeps the header (QP luma, QP chroma, new_frame, new_line,
// end_line), the macroblock column and whether the frame's first macroblock
// row is being coded. From these it derives, per block, the neighbour
// availability (left, top, top-right, corner), the line-buffer column (the
// memory pointer) and the QP. mostprobmode is min(mode left, mode above) when
// both neighbours are available, else DC (2).
//
// Timing: the slot outputs are a function of the registered counters and are
// valid in the cycle the block enters; the header in a header slot is decoded
// and stored at the end of that cycle.
// From the document: the slot order of Fig. 1.b, the header contents, and the
// signals to the datapath (availability, mostprobmode, QP, pointers). The header
// bit layout, the counters and the availability equations are this design's.
module control_logic
  import h264_pkg::*;
#(
  parameter int NS        = 32,
  parameter int MAX_WIDTH = 1920
)(
  input  logic                clk,
  input  logic                rst_n,
  input  blk_t                word_i,      // word taken from the input mux
  output logic [STREAM_W-1:0] sel_o,       // pointer to the input mux
  output blk_meta_t           meta_o,      // slot entering the pipeline
  output avail_t              avail_o,
  input  logic [3:0]          mode_top_i,  // neighbour modes from the memory
  input  logic [3:0]          mode_left_i,
  output logic [3:0]          mpm_o,
  // header of a stream, for the output multiplexer
  input  logic [STREAM_W-1:0] hdr_rd_stream_i,
  output hdr_t                hdr_rd_o
);

  typedef enum logic [1:0] {PH_HDR, PH_LUMA, PH_CHROMA} phase_t;

  phase_t              phase;
  logic [STREAM_W-1:0] s_cnt;
  logic [3:0]          b_cnt;

  hdr_t             hdr    [NS];
  logic [LX_W-1:0]  mb_x   [NS];
  logic             first_row [NS];

  // ---------------- slot counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_HDR; s_cnt <= '0; b_cnt <= '0;
    end else begin
      case (phase)
        PH_HDR: begin
          if (int'(s_cnt) == NS - 1) begin
            phase <= PH_LUMA; s_cnt <= '0; b_cnt <= '0;
          end else s_cnt <= s_cnt + 1'b1;
        end
        PH_LUMA: begin
          if (int'(s_cnt) == NS - 1) begin
            s_cnt <= '0;
            if (b_cnt == 4'd15) begin
              phase <= PH_CHROMA; b_cnt <= '0;
            end else b_cnt <= b_cnt + 1'b1;
          end else s_cnt <= s_cnt + 1'b1;
        end
        default: begin
          if (b_cnt == 4'd8) begin
            b_cnt <= '0;
            if (int'(s_cnt) == NS - 1) begin
              phase <= PH_HDR; s_cnt <= '0;
            end else s_cnt <= s_cnt + 1'b1;
          end else b_cnt <= b_cnt + 1'b1;
        end
      endcase
    end
  end

  // ---------------- header decoding ----------------
  hdr_t hin;
  assign hin = hdr_t'(word_i[$bits(hdr_t)-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        hdr[s] <= '0; mb_x[s] <= '0; first_row[s] <= 1'b1;
      end
    end else if (phase == PH_HDR) begin
      hdr[s_cnt] <= hin;
      if (hin.new_frame) begin
        mb_x[s_cnt] <= '0; first_row[s_cnt] <= 1'b1;
      end else if (hin.new_line) begin
        mb_x[s_cnt] <= '0; first_row[s_cnt] <= 1'b0;
      end else begin
        mb_x[s_cnt] <= mb_x[s_cnt] + 1'b1;
      end
    end
  end

  // ---------------- per-block outputs ----------------
  function automatic logic [3:0] zscan(input int x, input int y);
    return {y[1], x[1], y[0], x[0]};
  endfunction

  hdr_t       h;
  logic       left_mb, top_mb, tr_mb;
  int         bx, by;
  logic [3:0] ml, mt;

  always_comb begin
    h       = hdr[s_cnt];
    left_mb = !(h.new_frame || h.new_line);
    top_mb  = !first_row[s_cnt];
    tr_mb   = top_mb && !h.end_line;
    bx = int'({b_cnt[2], b_cnt[0]});
    by = int'({b_cnt[3], b_cnt[1]});

    sel_o         = s_cnt;
    meta_o        = '0;
    meta_o.valid  = 1'b1;
    meta_o.stream = s_cnt;
    avail_o       = '0;

    case (phase)
      PH_HDR: meta_o.kind = SLOT_HDR;
      PH_LUMA: begin
        meta_o.kind = SLOT_LUMA;
        meta_o.idx  = b_cnt;
        meta_o.qp   = h.qp_luma;
        meta_o.lx   = LX_W'(int'(mb_x[s_cnt]) * 4 + bx);
        avail_o.left   = (bx > 0) || left_mb;
        avail_o.top    = (by > 0) || top_mb;
        avail_o.corner = avail_o.left && avail_o.top;
        if (by == 0)      avail_o.topright = (bx < 3) ? top_mb : tr_mb;
        else if (bx == 3) avail_o.topright = 1'b0;
        else              avail_o.topright = zscan(bx + 1, by - 1) < b_cnt;
      end
      default: begin
        if (b_cnt == 4'd0) meta_o.kind = SLOT_PLACE;
        else begin
          meta_o.kind = SLOT_CHROMA;
          meta_o.idx  = b_cnt - 4'd1;
          meta_o.qp   = h.qp_chroma;
          meta_o.lx   = LX_W'(int'(mb_x[s_cnt]) * 2 + int'(meta_o.idx[0]));
          avail_o.left = left_mb;
          avail_o.top  = top_mb;
        end
      end
    endcase

  end

  // mostprobmode, from the neighbour modes the memory returns for this slot
  always_comb begin
    ml = mode_left_i;
    mt = mode_top_i;
    if (phase == PH_LUMA && avail_o.left && avail_o.top)
      mpm_o = (ml < mt) ? ml : mt;
    else
      mpm_o = MODE_DC;
  end

  // A stream's frame must fit the line buffers: MAX_WIDTH/16 macroblocks per row.
  always_ff @(posedge clk) begin
    if (rst_n && phase != PH_HDR)
      assert (int'(mb_x[s_cnt]) < MAX_WIDTH / 16)
        else $error("stream %0d is wider than MAX_WIDTH", s_cnt);
  end

  assign hdr_rd_o = hdr[hdr_rd_stream_i];

endmodule
