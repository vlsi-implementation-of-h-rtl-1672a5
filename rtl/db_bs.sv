// db_bs: boundary-strength derivation for the deblocking filter of one macroblock.
// For every 4-sample segment of the four vertical and four horizontal luma edges it
// decides how strongly the edge is filtered, from what the decoder knows about the two
// 4x4 blocks on either side:
//   4  the edge is a macroblock edge and either side is intra coded,
//   3  an internal edge and the macroblock is intra coded,
//   2  either block has non-zero transform coefficients,
//   1  the blocks use different reference pictures, or their motion vectors differ by
//      4 or more quarter samples horizontally or vertically,
//   0  otherwise (the edge is left unfiltered).
// Chroma edges reuse the luma values of the matching segments (done by deblock_mb).
// Interface (combinational, valid whenever the inputs are):
//   cur_intra / left_intra / top_intra: intra flag of this macroblock and its neighbours;
//   nz[16], mv_x[16], mv_y[16], ref_id[16]: per 4x4 block of this macroblock, raster
//   order (index = by*4 + bx), motion vectors in quarter samples;
//   left_*[4]: the right-hand column of blocks of the left macroblock, index by;
//   top_*[4]: the bottom row of blocks of the macroblock above, index bx;
//   bs_v[e][s]: vertical edge e (x = 4e), segment s (rows 4s..4s+3);
//   bs_h[e][s]: horizontal edge e (y = 4e), segment s (columns 4s..4s+3).
// Picture edges are not masked here; deblock_mb skips edge 0 itself when the neighbour
// is missing. The rules are the H.264 baseline rules for frame macroblocks. The document
// only says filtering is conditional; the port layout and the reference-picture
// identifier (equal ids mean the same picture) are this design's choices.
module db_bs
  import h264_pkg::*;
(
  input  logic        cur_intra,
  input  logic        left_intra,
  input  logic        top_intra,
  input  logic        nz      [16],
  input  coef_t       mv_x    [16],
  input  coef_t       mv_y    [16],
  input  logic [3:0]  ref_id  [16],
  input  logic        left_nz [4],
  input  coef_t       left_mv_x [4],
  input  coef_t       left_mv_y [4],
  input  logic [3:0]  left_ref  [4],
  input  logic        top_nz  [4],
  input  coef_t       top_mv_x [4],
  input  coef_t       top_mv_y [4],
  input  logic [3:0]  top_ref  [4],
  output logic [2:0]  bs_v [4][4],
  output logic [2:0]  bs_h [4][4]
);

  // strength of one edge segment between block p and block q
  function automatic logic [2:0] edge_bs(input logic mb_edge, input logic p_intra,
                                         input logic q_intra, input logic p_nz,
                                         input logic q_nz, input coef_t p_mx, input coef_t p_my,
                                         input coef_t q_mx, input coef_t q_my,
                                         input logic [3:0] p_ref, input logic [3:0] q_ref);
    sint_t dx, dy;
    dx = sint_t'(p_mx) - sint_t'(q_mx);
    dy = sint_t'(p_my) - sint_t'(q_my);
    if (p_intra || q_intra) return mb_edge ? 3'd4 : 3'd3;
    if (p_nz || q_nz) return 3'd2;
    if (p_ref != q_ref || dx >= 4 || dx <= -4 || dy >= 4 || dy <= -4) return 3'd1;
    return 3'd0;
  endfunction

  always_comb begin
    for (int e = 0; e < 4; e++) begin
      for (int s = 0; s < 4; s++) begin
        // vertical edge e, segment s: q = block (bx=e, by=s), p = the block to its left
        if (e == 0)
          bs_v[e][s] = edge_bs(1'b1, left_intra, cur_intra, left_nz[s], nz[s*4],
                               left_mv_x[s], left_mv_y[s], mv_x[s*4], mv_y[s*4],
                               left_ref[s], ref_id[s*4]);
        else
          bs_v[e][s] = edge_bs(1'b0, cur_intra, cur_intra, nz[s*4+e-1], nz[s*4+e],
                               mv_x[s*4+e-1], mv_y[s*4+e-1], mv_x[s*4+e], mv_y[s*4+e],
                               ref_id[s*4+e-1], ref_id[s*4+e]);
        // horizontal edge e, segment s: q = block (bx=s, by=e), p = the block above
        if (e == 0)
          bs_h[e][s] = edge_bs(1'b1, top_intra, cur_intra, top_nz[s], nz[s],
                               top_mv_x[s], top_mv_y[s], mv_x[s], mv_y[s],
                               top_ref[s], ref_id[s]);
        else
          bs_h[e][s] = edge_bs(1'b0, cur_intra, cur_intra, nz[(e-1)*4+s], nz[e*4+s],
                               mv_x[(e-1)*4+s], mv_y[(e-1)*4+s], mv_x[e*4+s], mv_y[e*4+s],
                               ref_id[(e-1)*4+s], ref_id[e*4+s]);
      end
    end
  end

endmodule
