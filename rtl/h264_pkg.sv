// h264_pkg: types and constant tables shared by the decoder's hardware engines.
// The tables are the H.264 baseline-profile constants: the dequantisation scale v(m,k),
// the deblocking thresholds alpha/beta and the clipping table tC0. They are held as
// functions so that every engine computes them in logic, with no memory file.
package h264_pkg;

  typedef logic [7:0]         pix_t;     // one 8-bit luma or chroma sample
  typedef logic signed [15:0] coef_t;    // transform coefficient / residual value
  typedef logic signed [31:0] sint_t;    // 4-state integer for module-level intermediates

  // Intra 4x4 luma prediction modes, numbered as the standard numbers them.
  typedef enum logic [3:0] {
    I4_V   = 4'd0, I4_H   = 4'd1, I4_DC  = 4'd2, I4_DDL = 4'd3, I4_DDR = 4'd4,
    I4_VL  = 4'd5, I4_HD  = 4'd6, I4_VR  = 4'd7, I4_HU  = 4'd8
  } i4_mode_e;

  // Intra 16x16 luma / 8x8 chroma prediction modes (chroma mode numbers are mapped by
  // the caller: the standard numbers them DC 0, horizontal 1, vertical 2, plane 3).
  typedef enum logic [1:0] {LP_V = 2'd0, LP_H = 2'd1, LP_DC = 2'd2, LP_PLANE = 2'd3} lp_mode_e;

  // The three inverse transforms of the residual path.
  typedef enum logic [1:0] {
    TR_4X4       = 2'd0,   // ordinary 4x4 residual block
    TR_LUMA_DC   = 2'd1,   // 4x4 Hadamard of the luma DC values (Intra 16x16)
    TR_CHROMA_DC = 2'd2    // 2x2 transform of the chroma DC values
  } tr_mode_e;

  // Sample component, used by the deblocking buffer.
  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  localparam int unsigned SLOT_CYCLES_DEF  = 3600;     // cycles per pipeline stage slot
  localparam int unsigned FRAME_CYCLES_DEF = 1801801;  // cycles per frame at 54 MHz, ~30 frame/s
  localparam int unsigned CIF_MBS          = 396;      // 22 x 18 macroblocks

  // Clip an integer to the 8-bit sample range.
  function automatic pix_t clip1(input int v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return pix_t'(v);
  endfunction

  // Clip to [lo, hi].
  function automatic int clip3(input int lo, input int hi, input int v);
    if (v < lo)      return lo;
    else if (v > hi) return hi;
    else             return v;
  endfunction

  // Dequantisation scale v(m, k): m = QP % 6, k = 0 for positions with both indices even,
  // 1 for both odd, 2 otherwise.
  function automatic int dq_scale(input int m, input int k);
    case (m)
      0: return (k == 0) ? 10 : (k == 1) ? 16 : 13;
      1: return (k == 0) ? 11 : (k == 1) ? 18 : 14;
      2: return (k == 0) ? 13 : (k == 1) ? 20 : 16;
      3: return (k == 0) ? 14 : (k == 1) ? 23 : 18;
      4: return (k == 0) ? 16 : (k == 1) ? 25 : 20;
      default: return (k == 0) ? 18 : (k == 1) ? 29 : 23;
    endcase
  endfunction

  // Position class of coefficient (row r, column c) for dq_scale.
  function automatic int dq_class(input int r, input int c);
    if ((r % 2 == 0) && (c % 2 == 0)) return 0;
    else if ((r % 2 == 1) && (c % 2 == 1)) return 1;
    else return 2;
  endfunction

  // Deblocking edge threshold alpha(indexA), indexA = 0..51.
  function automatic int db_alpha(input int idx);
    case (idx)
      16: return 4;   17: return 4;   18: return 5;   19: return 6;   20: return 7;
      21: return 8;   22: return 9;   23: return 10;  24: return 12;  25: return 13;
      26: return 15;  27: return 17;  28: return 20;  29: return 22;  30: return 25;
      31: return 28;  32: return 32;  33: return 36;  34: return 40;  35: return 45;
      36: return 50;  37: return 56;  38: return 63;  39: return 71;  40: return 80;
      41: return 90;  42: return 101; 43: return 113; 44: return 127; 45: return 144;
      46: return 162; 47: return 182; 48: return 203; 49: return 226; 50: return 255;
      51: return 255;
      default: return 0;
    endcase
  endfunction

  // Deblocking threshold beta(indexB), indexB = 0..51.
  function automatic int db_beta(input int idx);
    if (idx < 16) return 0;
    else if (idx < 19) return 2;
    else if (idx < 23) return 3;
    else if (idx < 26) return 4;
    else if (idx < 36) return 6 + (idx - 26) / 2;   // 26,27->6 ... 34,35->10
    else return 11 + (idx - 36) / 2;               // 36,37->11 ... 50,51->18
  endfunction

  // Clipping value tC0(indexA, bS) for bS = 1..3.
  function automatic int db_tc0(input int idx, input int bs);
    int t1, t2, t3;
    case (idx)
      17, 18, 19, 20: begin t1 = 0;  t2 = 0;  t3 = 1;  end
      21, 22:         begin t1 = 0;  t2 = 1;  t3 = 1;  end
      23, 24, 25, 26: begin t1 = 1;  t2 = 1;  t3 = 1;  end
      27, 28, 29, 30: begin t1 = 1;  t2 = 1;  t3 = 2;  end
      31, 32:         begin t1 = 1;  t2 = 2;  t3 = 3;  end
      33:             begin t1 = 2;  t2 = 2;  t3 = 3;  end
      34:             begin t1 = 2;  t2 = 2;  t3 = 4;  end
      35, 36:         begin t1 = 2;  t2 = 3;  t3 = 4;  end
      37:             begin t1 = 3;  t2 = 3;  t3 = 5;  end
      38, 39:         begin t1 = 3;  t2 = 4;  t3 = 6;  end
      40:             begin t1 = 4;  t2 = 5;  t3 = 7;  end
      41:             begin t1 = 4;  t2 = 5;  t3 = 8;  end
      42:             begin t1 = 4;  t2 = 6;  t3 = 9;  end
      43:             begin t1 = 5;  t2 = 7;  t3 = 10; end
      44:             begin t1 = 6;  t2 = 8;  t3 = 11; end
      45:             begin t1 = 6;  t2 = 8;  t3 = 13; end
      46:             begin t1 = 7;  t2 = 10; t3 = 14; end
      47:             begin t1 = 8;  t2 = 11; t3 = 16; end
      48:             begin t1 = 9;  t2 = 12; t3 = 18; end
      49:             begin t1 = 10; t2 = 13; t3 = 20; end
      50:             begin t1 = 11; t2 = 15; t3 = 23; end
      51:             begin t1 = 13; t2 = 17; t3 = 25; end
      default:        begin t1 = 0;  t2 = 0;  t3 = 0;  end
    endcase
    return (bs == 1) ? t1 : (bs == 2) ? t2 : t3;
  endfunction

endpackage
