// h264_pkg: types, constants and arithmetic helpers shared by the multi-stream
// H.264 intra 4x4 encoder pipeline.
//
// A 4x4 block of 8-bit pixels travels as a packed 128-bit word, pixel (x,y) at
// bits [8*(4*y+x) +: 8]. Coefficient blocks use 16 lanes of signed values.
// Every block in the pipeline is accompanied by a blk_meta_t sideband record
// that tells which stream it belongs to, what kind of slot it is (header,
// luma, placeholder, chroma), its index in the macroblock, its QP and its
// column in the reconstructed-pixel line buffer.
//
// The quantisation tables (MF, V) are the ones of the H.264 standard; they are
// written as functions so that no table file is needed.
package h264_pkg;

  localparam int STREAM_W = 8;   // stream index width (up to 256 streams)
  localparam int LX_W     = 10;  // line-buffer column index width

  typedef logic [7:0]           pix_t;
  typedef logic [127:0]         blk_t;        // 16 pixels
  typedef logic signed [8:0]    res_t;        // residual pixel
  typedef logic signed [15:0]   lvl_t;        // transform coefficient / level
  typedef logic signed [23:0]   dq_t;         // dequantised coefficient
  typedef res_t [15:0]          res_blk_t;
  typedef lvl_t [15:0]          lvl_blk_t;
  typedef dq_t  [15:0]          dq_blk_t;

  typedef enum logic [1:0] {
    SLOT_HDR   = 2'd0,
    SLOT_LUMA  = 2'd1,
    SLOT_PLACE = 2'd2,
    SLOT_CHROMA= 2'd3
  } slot_kind_t;

  // Header word of a macroblock (low bits of the 128-bit input word).
  typedef struct packed {
    logic       end_line;   // [18]
    logic       new_line;   // [17]
    logic       new_frame;  // [16]
    logic [1:0] pad1;       // [15:14]
    logic [5:0] qp_chroma;  // [13:8]
    logic [1:0] pad0;       // [7:6]
    logic [5:0] qp_luma;    // [5:0]
  } hdr_t;

  // Sideband travelling with each block.
  typedef struct packed {
    logic                valid;
    slot_kind_t          kind;
    logic [STREAM_W-1:0] stream;
    logic [3:0]          idx;     // luma 0..15 or chroma 0..7
    logic [LX_W-1:0]     lx;      // line-buffer column of this block
    logic [5:0]          qp;
    logic [3:0]          mode;    // selected prediction mode (after MINIMUM)
  } blk_meta_t;

  // Neighbour availability of one 4x4 block.
  typedef struct packed {
    logic left;
    logic top;
    logic topright;
    logic corner;
  } avail_t;

  localparam logic [3:0] MODE_DC = 4'd2;

  function automatic pix_t px(input blk_t b, input int x, input int y);
    return b[8*(4*y+x) +: 8];
  endfunction

  function automatic pix_t clip255(input int v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return pix_t'(v);
  endfunction

  // Position class of coefficient (i = row, j = column): 0 both even, 1 both odd, 2 mixed.
  function automatic int pos_class(input int i, input int j);
    if ((i % 2 == 0) && (j % 2 == 0)) return 0;
    if ((i % 2 == 1) && (j % 2 == 1)) return 1;
    return 2;
  endfunction

  // Forward quantisation multiplier MF(QP%6, class).
  function automatic int quant_mf(input int qm, input int cls);
    case (qm)
      0: return (cls == 0) ? 13107 : (cls == 1) ? 5243 : 8066;
      1: return (cls == 0) ? 11916 : (cls == 1) ? 4660 : 7490;
      2: return (cls == 0) ? 10082 : (cls == 1) ? 4194 : 6554;
      3: return (cls == 0) ?  9362 : (cls == 1) ? 3647 : 5825;
      4: return (cls == 0) ?  8192 : (cls == 1) ? 3355 : 5243;
      default: return (cls == 0) ? 7282 : (cls == 1) ? 2893 : 4559;
    endcase
  endfunction

  // Dequantisation scale V(QP%6, class).
  function automatic int dequant_v(input int qm, input int cls);
    case (qm)
      0: return (cls == 0) ? 10 : (cls == 1) ? 16 : 13;
      1: return (cls == 0) ? 11 : (cls == 1) ? 18 : 14;
      2: return (cls == 0) ? 13 : (cls == 1) ? 20 : 16;
      3: return (cls == 0) ? 14 : (cls == 1) ? 23 : 18;
      4: return (cls == 0) ? 16 : (cls == 1) ? 25 : 20;
      default: return (cls == 0) ? 18 : (cls == 1) ? 29 : 23;
    endcase
  endfunction

endpackage
