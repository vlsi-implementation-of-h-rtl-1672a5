// itiq: inverse quantisation and inverse integer transform of one block of residual data.
//
// Three transforms are supported, selected by `mode`:
//  * TR_4X4       - a 4x4 residual block. Each coefficient c(i,j) is scaled to
//                   d = (c * v(QP%6, class(i,j))) << (QP/6), then the 4x4 core transform is
//                   applied to rows and columns with the 1/2 shifts of the standard, and the
//                   result is rounded as (x + 32) >> 6. When use_dc is set the (0,0) position
//                   takes dc_in as an already scaled value (the DC of an Intra 16x16 or chroma
//                   block, produced by one of the two DC modes below).
//  * TR_LUMA_DC   - the 4x4 array of luma DC values of an Intra 16x16 macroblock: a 4x4
//                   Hadamard transform, then scaling by v(QP%6,0) and 2^(QP/6) / 4 with
//                   rounding below QP 12.
//  * TR_CHROMA_DC - the 2x2 array of chroma DC values (coef_in[0..3], raster order): a 2x2
//                   Hadamard transform, then ((f * v(QP%6,0)) << (QP/6)) >> 1.
//                   Only res_out[0..3] are meaningful; the others are zero.
//
// Interface: start with coefficients, qp and mode; res_out and done appear one clock later,
// so one block is processed per clock. Arrays are in raster order, index = row*4 + col.
// The three transforms come from the document; the arithmetic is the H.264 baseline
// definition, and the single-cycle structure and 16-bit widths are this design's choices.
module itiq
  import h264_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  tr_mode_e  mode,
  input  logic [5:0] qp,
  input  logic      use_dc,
  input  coef_t     dc_in,
  input  coef_t     coef_in [16],
  output logic      done,
  output coef_t     res_out [16]
);

  coef_t r_next [16];
  sint_t qdiv, qmod;
  sint_t dq [16];     // scaled coefficients of a 4x4 block
  sint_t th [16];     // after the horizontal pass
  sint_t tv [16];     // after the vertical pass
  sint_t hh [16];     // luma DC: after the horizontal Hadamard pass
  sint_t hv [16];     // luma DC: after the vertical Hadamard pass
  sint_t c2 [4];      // chroma DC: 2x2 transform

  // Output k of the 4-point inverse core transform of (x0, x1, x2, x3).
  function automatic int icore(input int x0, input int x1, input int x2, input int x3,
                               input int k);
    case (k)
      0:       return (x0 + x2) + (x1 + (x3 >>> 1));
      1:       return (x0 - x2) + ((x1 >>> 1) - x3);
      2:       return (x0 - x2) - ((x1 >>> 1) - x3);
      default: return (x0 + x2) - (x1 + (x3 >>> 1));
    endcase
  endfunction

  // Output k of the 4-point Hadamard transform (rows of [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]).
  function automatic int had4(input int x0, input int x1, input int x2, input int x3,
                              input int k);
    case (k)
      0:       return x0 + x1 + x2 + x3;
      1:       return x0 + x1 - x2 - x3;
      2:       return x0 - x1 - x2 + x3;
      default: return x0 - x1 + x2 - x3;
    endcase
  endfunction

  assign qdiv = int'(qp) / 6;
  assign qmod = int'(qp) % 6;

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        dq[r*4+c] = (use_dc && r == 0 && c == 0) ? int'(dc_in)
                  : (int'(coef_in[r*4+c]) * dq_scale(qmod, dq_class(r, c))) <<< qdiv;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 4; k++)
        th[r*4+k] = icore(dq[r*4+0], dq[r*4+1], dq[r*4+2], dq[r*4+3], k);
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 4; k++)
        tv[k*4+c] = icore(th[0*4+c], th[1*4+c], th[2*4+c], th[3*4+c], k);
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 4; k++)
        hh[r*4+k] = had4(int'(coef_in[r*4+0]), int'(coef_in[r*4+1]),
                         int'(coef_in[r*4+2]), int'(coef_in[r*4+3]), k);
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 4; k++)
        hv[k*4+c] = had4(hh[0*4+c], hh[1*4+c], hh[2*4+c], hh[3*4+c], k);
    c2[0] = int'(coef_in[0]) + int'(coef_in[1]) + int'(coef_in[2]) + int'(coef_in[3]);
    c2[1] = int'(coef_in[0]) - int'(coef_in[1]) + int'(coef_in[2]) - int'(coef_in[3]);
    c2[2] = int'(coef_in[0]) + int'(coef_in[1]) - int'(coef_in[2]) - int'(coef_in[3]);
    c2[3] = int'(coef_in[0]) - int'(coef_in[1]) - int'(coef_in[2]) + int'(coef_in[3]);
  end

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      case (mode)
        TR_4X4:     r_next[i] = coef_t'((tv[i] + 32) >>> 6);
        TR_LUMA_DC: r_next[i] = (qdiv >= 2)
                              ? coef_t'((hv[i] * dq_scale(qmod, 0)) <<< (qdiv - 2))
                              : coef_t'((hv[i] * dq_scale(qmod, 0) + (1 << (1 - qdiv))) >>> (2 - qdiv));
        TR_CHROMA_DC: r_next[i] = (i < 4)
                              ? coef_t'(((c2[i % 4] * dq_scale(qmod, 0)) <<< qdiv) >>> 1)
                              : coef_t'(0);
        default:    r_next[i] = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int i = 0; i < 16; i++) res_out[i] <= '0;
    end else begin
      done <= start;
      if (start) res_out <= r_next;
    end
  end

endmodule
