// ipred4x4: intra prediction of one 4x4 luma block in any of the nine Intra_4x4 modes
// (0 vertical, 1 horizontal, 2 DC, 3 diagonal down-left, 4 diagonal down-right,
// 5 vertical-left, 6 horizontal-down, 7 vertical-right, 8 horizontal-up).
//
// The thirteen neighbouring samples are arranged on one edge line e[0..12]:
// e[0..3] = left column bottom-to-top (L3..L0), e[4] = top-left corner M,
// e[5..12] = top row and top-right row (T0..T7). Every directional mode is then a
// 2-tap or 3-tap filter at an offset along that line, which keeps the datapath small.
// When the top-right samples are unavailable T4..T7 are replaced by T3, as the
// standard prescribes. DC uses whichever of top/left is available, or 128.
//
// Interface: in_valid with mode and neighbours; pred/out_valid appear one clock later
// (one block per clock). pred[y*4+x] is the sample in row y, column x.
// The list of modes follows the document; the edge-line datapath, the one-cycle latency
// and the availability inputs are this design's choices.
module ipred4x4
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  i4_mode_e   mode,
  input  pix_t       top   [8],     // T0..T7: row above (T4..T7 above-right)
  input  pix_t       left  [4],     // L0..L3: column to the left, top to bottom
  input  pix_t       corner,        // M: above-left sample
  input  logic       top_avail,
  input  logic       left_avail,
  input  logic       topright_avail,
  output logic       out_valid,
  output pix_t       pred  [16]
);

  pix_t e [13];
  pix_t p [16];

  always_comb begin
    for (int i = 0; i < 4; i++) e[i] = left[3-i];
    e[4] = corner;
    for (int i = 0; i < 4; i++) e[5+i] = top[i];
    for (int i = 4; i < 8; i++) e[5+i] = topright_avail ? top[i] : top[3];
  end

  // 3-tap [1 2 1] and 2-tap [1 1] filters centred at edge-line position k.
  function automatic pix_t f3(input pix_t a, input pix_t b, input pix_t c);
    return pix_t'((int'(a) + 2 * int'(b) + int'(c) + 2) >> 2);
  endfunction
  function automatic pix_t f2(input pix_t a, input pix_t b);
    return pix_t'((int'(a) + int'(b) + 1) >> 1);
  endfunction

  sint_t st, sl, z, k;
  assign st = int'(top[0]) + int'(top[1]) + int'(top[2]) + int'(top[3]);
  assign sl = int'(left[0]) + int'(left[1]) + int'(left[2]) + int'(left[3]);

  always_comb begin
    z = 0; k = 0;
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        p[y*4+x] = '0;
        case (mode)
          I4_V:  p[y*4+x] = top[x];
          I4_H:  p[y*4+x] = left[y];
          I4_DC: begin
            if (top_avail && left_avail) p[y*4+x] = pix_t'((st + sl + 4) >> 3);
            else if (left_avail)         p[y*4+x] = pix_t'((sl + 2) >> 2);
            else if (top_avail)          p[y*4+x] = pix_t'((st + 2) >> 2);
            else                         p[y*4+x] = 8'd128;
          end
          I4_DDL: begin
            k = 5 + x + y;                      // T[x+y]
            if (x == 3 && y == 3) p[y*4+x] = pix_t'((int'(e[11]) + 3 * int'(e[12]) + 2) >> 2);
            else                  p[y*4+x] = f3(e[k], e[k+1], e[k+2]);
          end
          I4_DDR: begin
            k = 4 + x - y;                      // centre on the edge line
            p[y*4+x] = f3(e[k-1], e[k], e[k+1]);
          end
          I4_VL: begin
            k = 5 + x + (y >> 1);
            if (y % 2 == 0) p[y*4+x] = f2(e[k], e[k+1]);
            else            p[y*4+x] = f3(e[k], e[k+1], e[k+2]);
          end
          I4_HD: begin
            z = 2 * y - x;
            if (z >= 0 && z % 2 == 0)  begin k = 3 - (y - (x >> 1)); p[y*4+x] = f2(e[k], e[k+1]); end
            else if (z >= 0)           begin k = 3 - (y - (x >> 1)); p[y*4+x] = f3(e[k], e[k+1], e[k+2]); end
            else if (z == -1)          p[y*4+x] = f3(e[3], e[4], e[5]);
            else                       begin k = 5 + x - 1;      p[y*4+x] = f3(e[k-2], e[k-1], e[k]); end
          end
          I4_VR: begin
            z = 2 * x - y;
            if (z >= 0 && z % 2 == 0)  begin k = 5 + x - (y >> 1); p[y*4+x] = f2(e[k-1], e[k]); end
            else if (z >= 0)           begin k = 5 + x - (y >> 1); p[y*4+x] = f3(e[k-2], e[k-1], e[k]); end
            else if (z == -1)          p[y*4+x] = f3(e[3], e[4], e[5]);
            else                       begin k = 3 - (y - 1);    p[y*4+x] = f3(e[k], e[k+1], e[k+2]); end
          end
          I4_HU: begin
            z = x + 2 * y;
            k = 3 - (y + (x >> 1));             // L[y + x/2]
            if (z > 5)                 p[y*4+x] = left[3];
            else if (z == 5)           p[y*4+x] = pix_t'((int'(left[2]) + 3 * int'(left[3]) + 2) >> 2);
            else if (z % 2 == 0)       p[y*4+x] = f2(e[k], e[k-1]);
            else                       p[y*4+x] = f3(e[k], e[k-1], e[k-2]);
          end
          default: p[y*4+x] = '0;
        endcase
      end
    end
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
