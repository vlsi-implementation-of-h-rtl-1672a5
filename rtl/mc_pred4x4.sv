// mc_pred4x4: motion-compensated prediction of one 4x4 block from a reference window.
//
// Luma (chroma = 0): quarter-sample accuracy. Half-sample values come from the 6-tap filter
// (1, -5, 20, 20, -5, 1), rounded as (x + 16) >> 5; the centre half-sample position j is the
// 6-tap filter applied to unrounded horizontal half-sample values, rounded as
// (x + 512) >> 10. Quarter-sample values are the rounded average of the two nearest
// integer/half-sample values. The window win[r][c] holds reference rows -2..6 and
// columns -2..6 around the block's integer position, so win[2][2] is the sample the
// integer motion vector points at. frac_x/frac_y are the quarter-sample fractions (0..3).
//
// Chroma (chroma = 1): eighth-sample accuracy, bilinear weighting of the four neighbouring
// samples, ((8-dx)(8-dy)A + dx(8-dy)B + (8-dx)dy C + dx dy D + 32) >> 6. The 5x5 chroma
// reference area sits at win[2..6][2..6]; frac_x/frac_y are eighth-sample fractions (0..7).
//
// Timing: start loads nothing (the window must stay stable); the block computes one sample
// per clock in raster order and raises done after 16 clocks with pred[] complete.
// The quarter-sample accuracy comes from the document; the interpolation filters are the
// standard's, and the sample-serial schedule and window interface are this design's choices.
module mc_pred4x4
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       chroma,
  input  logic [2:0] frac_x,
  input  logic [2:0] frac_y,
  input  pix_t       win  [9][9],
  output logic       busy,
  output logic       done,
  output pix_t       pred [16]
);

  logic [3:0] idx;
  pix_t       sample;

  function automatic int tap6(input int a, input int b, input int c, input int d,
                              input int e, input int f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction

  // Interpolated luma sample at quarter position (fx, fy) relative to win[r0+2][c0+2].
  function automatic pix_t luma_sample(input pix_t w [9][9], input int r0, input int c0,
                                       input int fx, input int fy);
    int g, hh, mm, b1, h1, s1, m1, j1, b, h, s, m, j;
    int row_b1 [6];
    g  = int'(w[r0+2][c0+2]);
    hh = int'(w[r0+2][c0+3]);                 // integer sample to the right
    mm = int'(w[r0+3][c0+2]);                 // integer sample below
    for (int i = 0; i < 6; i++)
      row_b1[i] = tap6(int'(w[r0+i][c0]), int'(w[r0+i][c0+1]), int'(w[r0+i][c0+2]),
                       int'(w[r0+i][c0+3]), int'(w[r0+i][c0+4]), int'(w[r0+i][c0+5]));
    b1 = row_b1[2];
    s1 = row_b1[3];
    h1 = tap6(int'(w[r0][c0+2]), int'(w[r0+1][c0+2]), int'(w[r0+2][c0+2]),
              int'(w[r0+3][c0+2]), int'(w[r0+4][c0+2]), int'(w[r0+5][c0+2]));
    m1 = tap6(int'(w[r0][c0+3]), int'(w[r0+1][c0+3]), int'(w[r0+2][c0+3]),
              int'(w[r0+3][c0+3]), int'(w[r0+4][c0+3]), int'(w[r0+5][c0+3]));
    j1 = tap6(row_b1[0], row_b1[1], row_b1[2], row_b1[3], row_b1[4], row_b1[5]);
    b = int'(clip1((b1 + 16) >>> 5));
    h = int'(clip1((h1 + 16) >>> 5));
    s = int'(clip1((s1 + 16) >>> 5));
    m = int'(clip1((m1 + 16) >>> 5));
    j = int'(clip1((j1 + 512) >>> 10));
    case ({fy[1:0], fx[1:0]})
      4'b00_00: return pix_t'(g);
      4'b00_01: return pix_t'((g + b + 1) >> 1);     // a
      4'b00_10: return pix_t'(b);                    // b
      4'b00_11: return pix_t'((hh + b + 1) >> 1);    // c
      4'b01_00: return pix_t'((g + h + 1) >> 1);     // d
      4'b01_01: return pix_t'((b + h + 1) >> 1);     // e
      4'b01_10: return pix_t'((b + j + 1) >> 1);     // f
      4'b01_11: return pix_t'((b + m + 1) >> 1);     // g
      4'b10_00: return pix_t'(h);                    // h
      4'b10_01: return pix_t'((h + j + 1) >> 1);     // i
      4'b10_10: return pix_t'(j);                    // j
      4'b10_11: return pix_t'((j + m + 1) >> 1);     // k
      4'b11_00: return pix_t'((mm + h + 1) >> 1);    // n
      4'b11_01: return pix_t'((h + s + 1) >> 1);     // p
      4'b11_10: return pix_t'((j + s + 1) >> 1);     // q
      default:  return pix_t'((m + s + 1) >> 1);     // r
    endcase
  endfunction

  function automatic pix_t chroma_sample(input pix_t w [9][9], input int r0, input int c0,
                                         input int dx, input int dy);
    int a, b, c, d;
    a = int'(w[r0+2][c0+2]);
    b = int'(w[r0+2][c0+3]);
    c = int'(w[r0+3][c0+2]);
    d = int'(w[r0+3][c0+3]);
    return pix_t'(((8 - dx) * (8 - dy) * a + dx * (8 - dy) * b + (8 - dx) * dy * c
                   + dx * dy * d + 32) >> 6);
  endfunction

  always_comb begin
    if (chroma) sample = chroma_sample(win, int'(idx[3:2]), int'(idx[1:0]),
                                       int'(frac_x), int'(frac_y));
    else        sample = luma_sample(win, int'(idx[3:2]), int'(idx[1:0]),
                                     int'(frac_x[1:0]), int'(frac_y[1:0]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      for (int i = 0; i < 16; i++) pred[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        idx  <= '0;
      end else if (busy) begin
        pred[idx] <= sample;
        idx       <= idx + 4'd1;
        if (idx == 4'd15) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
