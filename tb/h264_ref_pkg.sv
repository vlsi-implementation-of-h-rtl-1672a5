// h264_ref_pkg: reference models shared by the testbenches. db_line() is the deblocking
// filter of one line of samples written from the standard's equations, with its own copy
// of the alpha, beta and tC0 tables; it is independent of the RTL filter.
package h264_ref_pkg;

  function automatic int r_alpha(input int qp);
    int t [36] = '{4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,
                   90,101,113,127,144,162,182,203,226,255,255};
    return (qp >= 16) ? t[qp-16] : 0;
  endfunction

  function automatic int r_beta(input int qp);
    int t [36] = '{2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,
                   15,16,16,17,17,18,18};
    return (qp >= 16) ? t[qp-16] : 0;
  endfunction

  function automatic int r_tc0(input int qp, input int bs);
    int t [35][3] = '{'{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},
                      '{1,1,1},'{1,1,1},'{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},
                      '{1,2,3},'{1,2,3},'{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},
                      '{3,4,6},'{3,4,6},'{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},
                      '{6,8,13},'{7,10,14},'{8,11,16},'{9,12,18},'{10,13,20},'{11,15,23},
                      '{13,17,25}};
    return (qp >= 17) ? t[qp-17][bs-1] : 0;
  endfunction

  function automatic int iabs(input int v); return v < 0 ? -v : v; endfunction
  function automatic int c3(input int lo, input int hi, input int v);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  // Filters s[0..7] = p3 p2 p1 p0 q0 q1 q2 q3 in place; returns 1 when the line was filtered.
  function automatic bit db_line(ref int s [8], input int bs, input int qp, input bit chroma);
    int P0, P1, P2, P3, Q0, Q1, Q2, Q3, a, b, t0, t, dl;
    P3 = s[0]; P2 = s[1]; P1 = s[2]; P0 = s[3]; Q0 = s[4]; Q1 = s[5]; Q2 = s[6]; Q3 = s[7];
    a = r_alpha(qp); b = r_beta(qp);
    if (!(bs != 0 && iabs(P0 - Q0) < a && iabs(P1 - P0) < b && iabs(Q1 - Q0) < b)) return 0;
    if (bs == 4) begin
      if (!chroma && iabs(P2 - P0) < b && iabs(P0 - Q0) < (a / 4 + 2)) begin
        s[3] = (P2 + 2*P1 + 2*P0 + 2*Q0 + Q1 + 4) / 8;
        s[2] = (P2 + P1 + P0 + Q0 + 2) / 4;
        s[1] = (2*P3 + 3*P2 + P1 + P0 + Q0 + 4) / 8;
      end else s[3] = (2*P1 + P0 + Q1 + 2) / 4;
      if (!chroma && iabs(Q2 - Q0) < b && iabs(P0 - Q0) < (a / 4 + 2)) begin
        s[4] = (P1 + 2*P0 + 2*Q0 + 2*Q1 + Q2 + 4) / 8;
        s[5] = (P0 + Q0 + Q1 + Q2 + 2) / 4;
        s[6] = (2*Q3 + 3*Q2 + Q1 + Q0 + P0 + 4) / 8;
      end else s[4] = (2*Q1 + Q0 + P1 + 2) / 4;
    end else begin
      t0 = r_tc0(qp, bs);
      t  = chroma ? t0 + 1 : t0 + (iabs(P2 - P0) < b) + (iabs(Q2 - Q0) < b);
      dl = c3(-t, t, (4 * (Q0 - P0) + (P1 - Q1) + 4) >>> 3);
      s[3] = c3(0, 255, P0 + dl);
      s[4] = c3(0, 255, Q0 - dl);
      if (!chroma && iabs(P2 - P0) < b) s[2] = P1 + c3(-t0, t0, (P2 + ((P0 + Q0 + 1) >> 1) - 2*P1) >>> 1);
      if (!chroma && iabs(Q2 - Q0) < b) s[5] = Q1 + c3(-t0, t0, (Q2 + ((P0 + Q0 + 1) >> 1) - 2*Q1) >>> 1);
    end
    return 1;
  endfunction

endpackage
