// tb_db_filter: self-checking testbench of the single-line deblocking edge filter.
// A hand-worked strong-filter case (a step of 10 at QP 51) is checked first; then random
// lines with small steps (so that the thresholds are sometimes met and sometimes not)
// for bS 0..4, luma and chroma, against a reference model of the standard's filter with
// its own copy of the alpha/beta/tC0 tables.
module tb_db_filter;
  import h264_pkg::*;

  pix_t       p [4], q [4], pf [3], qf [3];
  logic [2:0] bs;
  logic [5:0] qp;
  logic       chroma, filtered;
  int         checks = 0, failures = 0, n_filt = 0, n_strong = 0;
  int         ep [3], eq [3];
  logic       eflt;

  db_filter dut (.p, .q, .bs, .qp, .chroma, .pf, .qf, .filtered);

  // tables indexed from 16 (values below are zero)
  int ALPHA [36] = '{4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,50,56,63,71,80,
                     90,101,113,127,144,162,182,203,226,255,255};
  int BETA  [36] = '{2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,11,11,12,12,13,13,14,14,15,
                     15,16,16,17,17,18,18};
  int TC0 [35][3] = '{'{0,0,1},'{0,0,1},'{0,0,1},'{0,0,1},'{0,1,1},'{0,1,1},'{1,1,1},
                      '{1,1,1},'{1,1,1},'{1,1,1},'{1,1,2},'{1,1,2},'{1,1,2},'{1,1,2},
                      '{1,2,3},'{1,2,3},'{2,2,3},'{2,2,4},'{2,3,4},'{2,3,4},'{3,3,5},
                      '{3,4,6},'{3,4,6},'{4,5,7},'{4,5,8},'{4,6,9},'{5,7,10},'{6,8,11},
                      '{6,8,13},'{7,10,14},'{8,11,16},'{9,12,18},'{10,13,20},'{11,15,23},
                      '{13,17,25}};   // indexA 17..51

  function automatic int iabs(input int v); return v < 0 ? -v : v; endfunction
  function automatic int c3(input int lo, input int hi, input int v);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction

  task automatic model();
    int P0, P1, P2, P3, Q0, Q1, Q2, Q3, a, b, t0, t, dl;
    P0 = p[0]; P1 = p[1]; P2 = p[2]; P3 = p[3]; Q0 = q[0]; Q1 = q[1]; Q2 = q[2]; Q3 = q[3];
    a = (qp >= 16) ? ALPHA[qp-16] : 0;
    b = (qp >= 16) ? BETA[qp-16] : 0;
    ep = '{P0, P1, P2}; eq = '{Q0, Q1, Q2};
    eflt = (bs != 0) && iabs(P0 - Q0) < a && iabs(P1 - P0) < b && iabs(Q1 - Q0) < b;
    if (!eflt) return;
    if (bs == 4) begin
      if (!chroma && iabs(P2 - P0) < b && iabs(P0 - Q0) < (a / 4 + 2)) begin
        ep[0] = (P2 + 2*P1 + 2*P0 + 2*Q0 + Q1 + 4) / 8;
        ep[1] = (P2 + P1 + P0 + Q0 + 2) / 4;
        ep[2] = (2*P3 + 3*P2 + P1 + P0 + Q0 + 4) / 8;
        n_strong++;
      end else ep[0] = (2*P1 + P0 + Q1 + 2) / 4;
      if (!chroma && iabs(Q2 - Q0) < b && iabs(P0 - Q0) < (a / 4 + 2)) begin
        eq[0] = (P1 + 2*P0 + 2*Q0 + 2*Q1 + Q2 + 4) / 8;
        eq[1] = (P0 + Q0 + Q1 + Q2 + 2) / 4;
        eq[2] = (2*Q3 + 3*Q2 + Q1 + Q0 + P0 + 4) / 8;
      end else eq[0] = (2*Q1 + Q0 + P1 + 2) / 4;
    end else begin
      t0 = (qp >= 17) ? TC0[qp-17][bs-1] : 0;
      t  = chroma ? t0 + 1 : t0 + (iabs(P2 - P0) < b) + (iabs(Q2 - Q0) < b);
      dl = c3(-t, t, (4 * (Q0 - P0) + (P1 - Q1) + 4) >>> 3);
      ep[0] = c3(0, 255, P0 + dl);
      eq[0] = c3(0, 255, Q0 - dl);
      if (!chroma && iabs(P2 - P0) < b) ep[1] = P1 + c3(-t0, t0, (P2 + ((P0 + Q0 + 1) >> 1) - 2*P1) >>> 1);
      if (!chroma && iabs(Q2 - Q0) < b) eq[1] = Q1 + c3(-t0, t0, (Q2 + ((P0 + Q0 + 1) >> 1) - 2*Q1) >>> 1);
    end
  endtask

  task automatic check(input string tag);
    #1;
    checks++;
    if (filtered != eflt) begin failures++; $display("FAIL %s: filtered=%0b exp %0b", tag, filtered, eflt); end
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (int'(pf[i]) != ep[i] || int'(qf[i]) != eq[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s i=%0d: p %0d/%0d q %0d/%0d (bs %0d qp %0d ch %0b)",
                                    tag, i, pf[i], ep[i], qf[i], eq[i], bs, qp, chroma);
      end
    end
  endtask

  initial begin
    // hand-worked strong filter: p = 100, q = 110, QP 51, bS 4, luma
    for (int i = 0; i < 4; i++) begin p[i] = 100; q[i] = 110; end
    bs = 4; qp = 51; chroma = 0;
    ep = '{104, 103, 101}; eq = '{106, 108, 109}; eflt = 1;
    check("hand");
    for (int it = 0; it < 20000; it++) begin
      int base;
      base = $urandom_range(20, 235);
      for (int i = 0; i < 4; i++) begin
        p[i] = 8'(base + $urandom_range(0, 8) - 4);
        q[i] = 8'(base + $urandom_range(0, 24) - 12);
      end
      bs = 3'($urandom_range(0, 4)); qp = 6'($urandom_range(10, 51)); chroma = 1'($urandom);
      model();
      if (eflt) n_filt++;
      check($sformatf("rand %0d", it));
    end
    checks++;
    if (n_filt < 1000 || n_strong < 50) begin
      failures++; $display("FAIL: too few filtered lines (%0d, strong %0d)", n_filt, n_strong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
