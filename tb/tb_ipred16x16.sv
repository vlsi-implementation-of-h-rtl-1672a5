// tb_ipred16x16: self-checking testbench of the Intra 16x16 / chroma 8x8 predictor.
// For random neighbours, availability and each mode, a reference model computes the
// whole 16x16 (or 8x8) block from the standard's equations in p[x,y] notation; every
// 4x4 sub-block is then requested from the unit and compared one clock later.
// Hand-worked cases: a flat neighbourhood gives a flat plane, and a linear ramp of
// neighbours gives the same ramp inside the block.
module tb_ipred16x16;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid, chroma, ta, la, out_valid;
  lp_mode_e   mode;
  logic [1:0] bx, by;
  pix_t       top [16], left [16], corner, pred [16];
  int         checks = 0, failures = 0;
  int         ref_blk [16][16];

  ipred16x16 dut (.clk, .rst_n, .in_valid, .chroma, .mode, .bx, .by, .top, .left, .corner,
                  .top_avail(ta), .left_avail(la), .out_valid, .pred);

  function automatic int P(input int x, input int y);
    if (x < 0 && y < 0) return int'(corner);
    if (y < 0) return int'(top[x]);
    return int'(left[y]);
  endfunction

  task automatic make_ref();
    int N, H, V, a, b, c, s, xo, yo, st, sl, v;
    N = chroma ? 8 : 16;
    H = 0; V = 0;
    for (int i = 0; i < N / 2; i++) begin
      H += (i + 1) * (P(N / 2 + i, -1) - P(N / 2 - 2 - i, -1));
      V += (i + 1) * (P(-1, N / 2 + i) - P(-1, N / 2 - 2 - i));
    end
    a = 16 * (P(-1, N - 1) + P(N - 1, -1));
    b = chroma ? (34 * H + 32) >>> 6 : (5 * H + 32) >>> 6;
    c = chroma ? (34 * V + 32) >>> 6 : (5 * V + 32) >>> 6;
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
      case (mode)
        LP_V: ref_blk[y][x] = P(x, -1);
        LP_H: ref_blk[y][x] = P(-1, y);
        LP_DC: begin
          if (!chroma) begin
            st = 0; sl = 0;
            for (int i = 0; i < 16; i++) begin st += P(i, -1); sl += P(-1, i); end
            ref_blk[y][x] = (ta && la) ? (st + sl + 16) >> 5 : la ? (sl + 8) >> 4 : ta ? (st + 8) >> 4 : 128;
          end else begin
            xo = (x / 4) * 4; yo = (y / 4) * 4; st = 0; sl = 0;
            for (int i = 0; i < 4; i++) begin st += P(xo + i, -1); sl += P(-1, yo + i); end
            if ((xo == 0 && yo == 0) || (xo > 0 && yo > 0))
              ref_blk[y][x] = (ta && la) ? (st + sl + 4) >> 3 : la ? (sl + 2) >> 2 : ta ? (st + 2) >> 2 : 128;
            else if (xo > 0)
              ref_blk[y][x] = ta ? (st + 2) >> 2 : la ? (sl + 2) >> 2 : 128;
            else
              ref_blk[y][x] = la ? (sl + 2) >> 2 : ta ? (st + 2) >> 2 : 128;
          end
        end
        default: begin
          v = chroma ? (a + b * (x - 3) + c * (y - 3) + 16) >>> 5 : (a + b * (x - 7) + c * (y - 7) + 16) >>> 5;
          ref_blk[y][x] = v < 0 ? 0 : v > 255 ? 255 : v;
        end
      endcase
    end
  endtask

  task automatic run(input string tag);
    int N;
    N = chroma ? 8 : 16;
    make_ref();
    for (int j = 0; j < N / 4; j++) for (int i = 0; i < N / 4; i++) begin
      @(negedge clk); in_valid = 1; bx = 2'(i); by = 2'(j);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL %s: no out_valid", tag); end
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (int'(pred[k]) != ref_blk[4*j + k/4][4*i + k%4]) begin
          failures++;
          if (failures < 10) $display("FAIL %s mode %0d ch %0b blk (%0d,%0d)[%0d]: got %0d exp %0d",
                                      tag, mode, chroma, i, j, k, pred[k], ref_blk[4*j + k/4][4*i + k%4]);
        end
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; chroma = 0; mode = LP_V; bx = 0; by = 0; ta = 1; la = 1; corner = 0;
    for (int i = 0; i < 16; i++) begin top[i] = 0; left[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    // flat neighbourhood: plane is flat
    for (int i = 0; i < 16; i++) begin top[i] = 90; left[i] = 90; end
    corner = 90; mode = LP_PLANE;
    @(negedge clk); in_valid = 1; bx = 3; by = 3; @(negedge clk); in_valid = 0;
    checks++; if (pred[15] != 90 || pred[0] != 90) begin failures++; $display("FAIL flat plane"); end
    // ramp: top[x] = 40 + 8x, left[y] = 40 + 8y, corner 32 -> H = V = sum 16(i+1)^2 = 3264,
    // b = c = (5*3264+32)>>6 = 255, a = 16*(160+160) = 5120:
    // pred(0,0) = (5120 - 7*255 - 7*255 + 16) >> 5 = 48 (the ramp, about 8 per sample)
    for (int i = 0; i < 16; i++) begin top[i] = 8'(40 + 8 * i); left[i] = 8'(40 + 8 * i); end
    corner = 32;
    @(negedge clk); in_valid = 1; bx = 0; by = 0; @(negedge clk); in_valid = 0;
    checks++; if (pred[0] != 48) begin failures++; $display("FAIL ramp plane (0,0): %0d", pred[0]); end
    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < 16; i++) begin top[i] = 8'($urandom); left[i] = 8'($urandom); end
      corner = 8'($urandom);
      chroma = 1'($urandom); mode = lp_mode_e'(it % 4);
      ta = 1'($urandom); la = 1'($urandom);
      if (mode == LP_PLANE || it % 3 == 0) begin ta = 1; la = 1; end
      run($sformatf("rand %0d", it));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
