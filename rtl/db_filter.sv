// db_filter: the deblocking filter applied to one line of samples across one block edge.
// p[0..3] are the samples on one side (p[0] next to the edge), q[0..3] on the other.
//
// The line is filtered only when bs != 0 and |p0-q0| < alpha, |p1-p0| < beta and
// |q1-q0| < beta, with alpha/beta looked up from qp (the average QP of the two blocks; the
// slice offsets for the thresholds are taken as zero).
//  * bs 1..3: p0/q0 move by delta = clip(-tc, tc, ((q0-p0)*4 + p1 - q1 + 4) >> 3);
//    for luma, p1 (q1) is also corrected when |p2-p0| < beta (|q2-q0| < beta), and tc is
//    tC0 plus one for each of these two conditions; for chroma tc = tC0 + 1.
//  * bs 4: the strong filter; for luma, where |p2-p0| < beta and |p0-q0| < alpha/4 + 2,
//    p0..p2 are replaced by 5-, 4- and 5-tap averages, otherwise only p0 by a 3-tap one.
//    Chroma always uses the 3-tap form on p0/q0.
// Purely combinational; pf/qf are the new p0..p2 / q0..q2 (unchanged where not filtered).
// The standard defines this filter; the document specifies where and in which order it
// is applied (see deblock_mb).
module db_filter
  import h264_pkg::*;
(
  input  pix_t       p  [4],
  input  pix_t       q  [4],
  input  logic [2:0] bs,
  input  logic [5:0] qp,
  input  logic       chroma,
  output pix_t       pf [3],
  output pix_t       qf [3],
  output logic       filtered
);

  sint_t p0, p1, p2, p3, q0, q1, q2, q3;
  sint_t alpha, beta, ap, aq, tc0, tc, delta;
  logic on;

  always_comb begin
    p0 = int'(p[0]); p1 = int'(p[1]); p2 = int'(p[2]); p3 = int'(p[3]);
    q0 = int'(q[0]); q1 = int'(q[1]); q2 = int'(q[2]); q3 = int'(q[3]);
    alpha = db_alpha(int'(qp));
    beta  = db_beta(int'(qp));
    ap = (p2 > p0) ? p2 - p0 : p0 - p2;
    aq = (q2 > q0) ? q2 - q0 : q0 - q2;
    on = (bs != 3'd0) &&
         (((p0 > q0) ? p0 - q0 : q0 - p0) < alpha) &&
         (((p1 > p0) ? p1 - p0 : p0 - p1) < beta) &&
         (((q1 > q0) ? q1 - q0 : q0 - q1) < beta);
    tc0 = 0; tc = 0; delta = 0;
    for (int i = 0; i < 3; i++) begin
      pf[i] = p[i];
      qf[i] = q[i];
    end
    filtered = on;
    if (on) begin
      if (bs < 3'd4) begin
        tc0 = db_tc0(int'(qp), int'(bs));
        if (chroma) tc = tc0 + 1;
        else        tc = tc0 + ((ap < beta) ? 1 : 0) + ((aq < beta) ? 1 : 0);
        delta = clip3(-tc, tc, (((q0 - p0) <<< 2) + (p1 - q1) + 4) >>> 3);
        pf[0] = clip1(p0 + delta);
        qf[0] = clip1(q0 - delta);
        if (!chroma && ap < beta)
          pf[1] = pix_t'(p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - (p1 <<< 1)) >>> 1));
        if (!chroma && aq < beta)
          qf[1] = pix_t'(q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - (q1 <<< 1)) >>> 1));
      end else begin
        if (!chroma && ap < beta && ((p0 > q0) ? p0 - q0 : q0 - p0) < ((alpha >>> 2) + 2)) begin
          pf[0] = pix_t'((p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >>> 3);
          pf[1] = pix_t'((p2 + p1 + p0 + q0 + 2) >>> 2);
          pf[2] = pix_t'((2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >>> 3);
        end else begin
          pf[0] = pix_t'((2 * p1 + p0 + q1 + 2) >>> 2);
        end
        if (!chroma && aq < beta && ((p0 > q0) ? p0 - q0 : q0 - p0) < ((alpha >>> 2) + 2)) begin
          qf[0] = pix_t'((p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >>> 3);
          qf[1] = pix_t'((p0 + q0 + q1 + q2 + 2) >>> 2);
          qf[2] = pix_t'((2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >>> 3);
        end else begin
          qf[0] = pix_t'((2 * q1 + q0 + p1 + 2) >>> 2);
        end
      end
    end
  end

endmodule
