// ipred16x16: intra prediction of the large blocks - Intra 16x16 luma (chroma = 0) and
// 8x8 chroma (chroma = 1) - in the vertical, horizontal, DC and plane modes.
//
// The whole block is defined by its neighbours (top row, left column, corner), so the
// unit is stateless: each request names one 4x4 sub-block (bx, by) and gets its 16
// predicted samples one clock later. A 16x16 block is thus predicted in 16 requests and
// an 8x8 chroma block in 4, at the pace the residual arrives; the neighbours must stay
// stable in between.
//  * vertical / horizontal copy the row above / column to the left;
//  * DC, luma: mean of the 32 neighbours, or of the 16 available ones, or 128;
//    DC, chroma: each 4x4 quarter has its own mean: the top-left and bottom-right
//    quarters use top and left neighbours, the top-right quarter prefers the top ones,
//    the bottom-left quarter prefers the left ones;
//  * plane: a linear ramp a + b(x - c0) + c(y - c0) from the gradients H and V of the
//    neighbours (c0 = 7 for luma, 3 for chroma; b, c scaled by 5 or 34), clipped to 8 bits.
// Mode numbering is this unit's own (lp_mode_e); the standard numbers the chroma modes
// differently (DC 0, horizontal 1, vertical 2, plane 3) and the caller maps them.
// The four modes for 16x16 luma and for chroma follow the document; the per-sub-block
// request interface is this design's choice.
module ipred16x16
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       chroma,
  input  lp_mode_e   mode,
  input  logic [1:0] bx,            // 4x4 sub-block column (0..3, chroma 0..1)
  input  logic [1:0] by,            // 4x4 sub-block row
  input  pix_t       top  [16],     // row above (chroma uses 0..7)
  input  pix_t       left [16],     // column to the left (chroma uses 0..7)
  input  pix_t       corner,        // above-left sample
  input  logic       top_avail,
  input  logic       left_avail,
  output logic       out_valid,
  output pix_t       pred [16]
);

  sint_t n, hgrad, vgrad, pa, pb, pc, c0;
  sint_t st_all, sl_all, st_q, sl_q;
  pix_t  dc;
  pix_t  p [16];

  // neighbour at offset i of the top row / left column, i = -1 is the corner
  function automatic sint_t tn(input pix_t t [16], input pix_t m, input int i);
    return (i < 0) ? sint_t'(m) : sint_t'(t[i]);
  endfunction

  always_comb begin
    n = chroma ? 8 : 16;
    c0 = chroma ? 3 : 7;
    hgrad = 0; vgrad = 0; st_all = 0; sl_all = 0; st_q = 0; sl_q = 0;
    for (int i = 0; i < 8; i++) begin
      if (i < n / 2) begin
        hgrad += (i + 1) * (tn(top, corner, n / 2 + i) - tn(top, corner, n / 2 - 2 - i));
        vgrad += (i + 1) * (tn(left, corner, n / 2 + i) - tn(left, corner, n / 2 - 2 - i));
      end
    end
    for (int i = 0; i < 16; i++) begin
      if (i < n) begin
        st_all += sint_t'(top[i]);
        sl_all += sint_t'(left[i]);
      end
    end
    for (int i = 0; i < 4; i++) begin
      st_q += sint_t'(top[4 * bx + i]);
      sl_q += sint_t'(left[4 * by + i]);
    end
    pa = 16 * (sint_t'(left[n - 1]) + sint_t'(top[n - 1]));
    pb = chroma ? (34 * hgrad + 32) >>> 6 : (5 * hgrad + 32) >>> 6;
    pc = chroma ? (34 * vgrad + 32) >>> 6 : (5 * vgrad + 32) >>> 6;

    // DC value of the requested sub-block
    if (!chroma) begin
      if (top_avail && left_avail) dc = pix_t'((st_all + sl_all + 16) >>> 5);
      else if (left_avail)         dc = pix_t'((sl_all + 8) >>> 4);
      else if (top_avail)          dc = pix_t'((st_all + 8) >>> 4);
      else                         dc = 8'd128;
    end else if (bx == by) begin
      if (top_avail && left_avail) dc = pix_t'((st_q + sl_q + 4) >>> 3);
      else if (left_avail)         dc = pix_t'((sl_q + 2) >>> 2);
      else if (top_avail)          dc = pix_t'((st_q + 2) >>> 2);
      else                         dc = 8'd128;
    end else if (bx != 2'd0) begin  // top-right quarter: top neighbours first
      if (top_avail)               dc = pix_t'((st_q + 2) >>> 2);
      else if (left_avail)         dc = pix_t'((sl_q + 2) >>> 2);
      else                         dc = 8'd128;
    end else begin                  // bottom-left quarter: left neighbours first
      if (left_avail)              dc = pix_t'((sl_q + 2) >>> 2);
      else if (top_avail)          dc = pix_t'((st_q + 2) >>> 2);
      else                         dc = 8'd128;
    end

    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        case (mode)
          LP_V:     p[y*4+x] = top[4 * bx + x];
          LP_H:     p[y*4+x] = left[4 * by + y];
          LP_DC:    p[y*4+x] = dc;
          default:  p[y*4+x] = clip1(int'((pa + pb * (sint_t'(4 * bx + x) - c0)
                                             + pc * (sint_t'(4 * by + y) - c0) + 16) >>> 5));
        endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 16; i++) pred[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pred <= p;
    end
  end

endmodule
