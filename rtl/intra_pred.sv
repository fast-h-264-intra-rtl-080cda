// intra_pred: the PRED stage. Computes all nine H.264 intra 4x4 luma
// predictions (modes 0..8) of one block in parallel, or the chroma DC
// prediction of a chroma 4x4 block, from the reconstructed neighbours.
//
// How it works: the neighbours are gathered into one edge array
// E[0..12] = {L3,L2,L1,L0, M, T0..T7} (left column bottom-up, corner, top row
// and top-right row). Each mode is a fixed function of E per pixel position, as
// the standard defines it. An unavailable top-right row is replaced by T3
// repeated. A mode whose neighbours are missing is flagged off in mode_en so the
// minimum search ignores it; DC (mode 2) is always enabled. For a chroma block
// only mode 2 is enabled and it carries the chroma DC rule of the standard
// (blocks (0,0),(1,1): top and left; (1,0): top first; (0,1): left first).
//
// Timing: two register stages. Cycle 1 registers the inputs, cycle 2 registers
// the predictions; meta, the original block and mostprobmode follow with the
// same latency. One new block can enter every cycle.
//
// From the document: nine luma modes computed in parallel, irrelevant modes
// disabled by availability and block type, chroma DC only. The split into two
// cycles is this design's choice.
module intra_pred
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  blk_meta_t  meta_i,
  input  blk_t       orig_i,      // pixels of the block to encode
  input  logic [31:0] top_i,      // T0..T3, T0 in [7:0]
  input  logic [31:0] topright_i, // T4..T7
  input  logic [31:0] left_i,     // L0..L3, L0 in [7:0]
  input  pix_t       corner_i,    // M
  input  avail_t     avail_i,
  input  logic [3:0] mpm_i,       // mostprobmode from the controller
  output blk_meta_t  meta_o,
  output blk_t       orig_o,
  output blk_t       pred_o [9],
  output logic [8:0] mode_en_o,
  output logic [3:0] mpm_o
);

  // ---------------- stage 1: input register ----------------
  blk_meta_t   m1;
  blk_t        orig1;
  logic [31:0] top1, tr1, left1;
  pix_t        cnr1;
  avail_t      av1;
  logic [3:0]  mpm1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= '0; orig1 <= '0; top1 <= '0; tr1 <= '0; left1 <= '0;
      cnr1 <= '0; av1 <= '0; mpm1 <= '0;
    end else begin
      m1 <= meta_i; orig1 <= orig_i; top1 <= top_i; tr1 <= topright_i;
      left1 <= left_i; cnr1 <= corner_i; av1 <= avail_i; mpm1 <= mpm_i;
    end
  end

  // ---------------- prediction functions ----------------
  typedef pix_t edge_t [13];

  function automatic int ep(input edge_t e, input int i); // top row p[i,-1], i>=-1
    return int'(e[5+i]);
  endfunction
  function automatic int el(input edge_t e, input int j); // left column p[-1,j], j>=-1
    return int'(e[3-j]);
  endfunction

  function automatic pix_t pred_pixel(input edge_t e, input int mode, input int x, input int y,
                                      input int dcval);
    int z;
    case (mode)
      0: return pix_t'(ep(e, x));
      1: return pix_t'(el(e, y));
      2: return pix_t'(dcval);
      3: begin
        if (x == 3 && y == 3) return pix_t'((ep(e,6) + 3*ep(e,7) + 2) >> 2);
        return pix_t'((ep(e,x+y) + 2*ep(e,x+y+1) + ep(e,x+y+2) + 2) >> 2);
      end
      4: begin
        // E index 4+x-y is the centre tap along the down-right diagonal
        z = 4 + x - y;
        return pix_t'((int'(e[z-1]) + 2*int'(e[z]) + int'(e[z+1]) + 2) >> 2);
      end
      5: begin
        z = 2*x - y;
        if (z >= 0 && (z % 2) == 0)
          return pix_t'((ep(e, x-(y>>1)-1) + ep(e, x-(y>>1)) + 1) >> 1);
        if (z >= 0)
          return pix_t'((ep(e, x-(y>>1)-2) + 2*ep(e, x-(y>>1)-1) + ep(e, x-(y>>1)) + 2) >> 2);
        if (z == -1)
          return pix_t'((el(e,0) + 2*el(e,-1) + ep(e,0) + 2) >> 2);
        return pix_t'((el(e,y-1) + 2*el(e,y-2) + el(e,y-3) + 2) >> 2);
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && (z % 2) == 0)
          return pix_t'((el(e, y-(x>>1)-1) + el(e, y-(x>>1)) + 1) >> 1);
        if (z >= 0)
          return pix_t'((el(e, y-(x>>1)-2) + 2*el(e, y-(x>>1)-1) + el(e, y-(x>>1)) + 2) >> 2);
        if (z == -1)
          return pix_t'((el(e,0) + 2*el(e,-1) + ep(e,0) + 2) >> 2);
        return pix_t'((ep(e,x-1) + 2*ep(e,x-2) + ep(e,x-3) + 2) >> 2);
      end
      7: begin
        if ((y % 2) == 0)
          return pix_t'((ep(e, x+(y>>1)) + ep(e, x+(y>>1)+1) + 1) >> 1);
        return pix_t'((ep(e, x+(y>>1)) + 2*ep(e, x+(y>>1)+1) + ep(e, x+(y>>1)+2) + 2) >> 2);
      end
      default: begin
        z = x + 2*y;
        if (z > 5) return pix_t'(el(e,3));
        if (z == 5) return pix_t'((el(e,2) + 3*el(e,3) + 2) >> 2);
        if ((z % 2) == 0)
          return pix_t'((el(e, y+(x>>1)) + el(e, y+(x>>1)+1) + 1) >> 1);
        return pix_t'((el(e, y+(x>>1)) + 2*el(e, y+(x>>1)+1) + el(e, y+(x>>1)+2) + 2) >> 2);
      end
    endcase
  endfunction

  // ---------------- stage 2: predictions ----------------
  edge_t       e;
  int          sum_t, sum_l, dc;
  logic        use_t, use_l;
  blk_t        pred_c [9];
  logic [8:0]  en_c;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      e[3-i] = left1[8*i +: 8];
      e[5+i] = top1[8*i +: 8];
      e[9+i] = av1.topright ? tr1[8*i +: 8] : top1[31:24];
    end
    e[4] = cnr1;
    sum_t = 0; sum_l = 0;
    for (int i = 0; i < 4; i++) begin
      sum_t += int'(top1[8*i +: 8]);
      sum_l += int'(left1[8*i +: 8]);
    end
    use_t = av1.top;
    use_l = av1.left;
    if (m1.kind == SLOT_CHROMA) begin
      // chroma DC rules per 4x4 position inside the 8x8 chroma block
      if (m1.idx[1:0] == 2'd1) begin          // (1,0): top preferred
        use_l = av1.left && !av1.top;
      end else if (m1.idx[1:0] == 2'd2) begin // (0,1): left preferred
        use_t = av1.top && !av1.left;
      end
    end
    if (use_t && use_l)  dc = (sum_t + sum_l + 4) >> 3;
    else if (use_t)      dc = (sum_t + 2) >> 2;
    else if (use_l)      dc = (sum_l + 2) >> 2;
    else                 dc = 128;

    for (int m = 0; m < 9; m++)
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          pred_c[m][8*(4*y+x) +: 8] = pred_pixel(e, m, x, y, dc);

    if (m1.kind == SLOT_LUMA) begin
      en_c[0] = av1.top;
      en_c[1] = av1.left;
      en_c[2] = 1'b1;
      en_c[3] = av1.top;
      en_c[4] = av1.top && av1.left && av1.corner;
      en_c[5] = av1.top && av1.left && av1.corner;
      en_c[6] = av1.top && av1.left && av1.corner;
      en_c[7] = av1.top;
      en_c[8] = av1.left;
    end else begin
      en_c = 9'b0_0000_0100;   // chroma (and non-pixel slots): DC only
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_o <= '0; orig_o <= '0; mode_en_o <= '0; mpm_o <= '0;
      for (int m = 0; m < 9; m++) pred_o[m] <= '0;
    end else begin
      meta_o <= m1; orig_o <= orig1; mode_en_o <= en_c; mpm_o <= mpm1;
      for (int m = 0; m < 9; m++) pred_o[m] <= pred_c[m];
    end
  end

endmodule
