// tb_mc_pred4x4: self-checking testbench of the 4x4 motion-compensated predictor.
// 1. A flat window must predict the flat value at every fraction.
// 2. A horizontal ramp (value 20 + 10*column) has exact half-sample values, so luma
//    fractions along x must give 20 + 10*col + 2.5*frac rounded up, for any frac_y.
// 3. Random windows at all 16 luma and 64 chroma fractions are compared with a reference
//    that builds the half-sample planes of the standard (b, h, j, ...) sample by sample.
// The block must take 16 clocks from start to done.
module tb_mc_pred4x4;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, chroma, busy, done;
  logic [2:0] frac_x, frac_y;
  pix_t       win [9][9], pred [16];
  int         checks = 0, failures = 0;
  int         expv [16];

  mc_pred4x4 dut (.clk, .rst_n, .start, .chroma, .frac_x, .frac_y, .win, .busy, .done, .pred);

  function automatic int W(input int r, input int c);   // r, c relative to block origin
    return int'(win[r+2][c+2]);
  endfunction
  function automatic int cl(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int hraw(input int r, input int c);  // half sample right of (r,c), unscaled
    return W(r, c-2) - 5*W(r, c-1) + 20*W(r, c) + 20*W(r, c+1) - 5*W(r, c+2) + W(r, c+3);
  endfunction
  function automatic int vraw(input int r, input int c);  // half sample below (r,c), unscaled
    return W(r-2, c) - 5*W(r-1, c) + 20*W(r, c) + 20*W(r+1, c) - 5*W(r+2, c) + W(r+3, c);
  endfunction
  function automatic int Hs(input int r, input int c); return cl((hraw(r, c) + 16) >>> 5); endfunction
  function automatic int Vs(input int r, input int c); return cl((vraw(r, c) + 16) >>> 5); endfunction
  function automatic int Cs(input int r, input int c);
    return cl((hraw(r-2, c) - 5*hraw(r-1, c) + 20*hraw(r, c) + 20*hraw(r+1, c)
               - 5*hraw(r+2, c) + hraw(r+3, c) + 512) >>> 10);
  endfunction
  function automatic int avg(input int a, input int b); return (a + b + 1) >> 1; endfunction

  // Luma sample at quarter position (fx, fy) of integer sample (r, c).
  function automatic int luma_ref(input int r, input int c, input int fx, input int fy);
    int G, b, h, j, s, m;
    G = W(r, c); b = Hs(r, c); h = Vs(r, c); j = Cs(r, c); s = Hs(r+1, c); m = Vs(r, c+1);
    if (fx == 0 && fy == 0) return G;
    if (fy == 0) return (fx == 2) ? b : (fx == 1) ? avg(G, b) : avg(W(r, c+1), b);
    if (fx == 0) return (fy == 2) ? h : (fy == 1) ? avg(G, h) : avg(W(r+1, c), h);
    if (fx == 2 && fy == 2) return j;
    if (fx == 2) return (fy == 1) ? avg(b, j) : avg(s, j);
    if (fy == 2) return (fx == 1) ? avg(h, j) : avg(m, j);
    // the four diagonal quarter positions average the two nearest half samples
    if (fx == 1 && fy == 1) return avg(b, h);
    if (fx == 3 && fy == 1) return avg(b, m);
    if (fx == 1 && fy == 3) return avg(h, s);
    return avg(m, s);
  endfunction

  task automatic run_block(input string tag);
    int cyc;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 17) begin failures++; $display("FAIL %s: %0d clocks to done", tag, cyc); end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(pred[i]) != expv[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s [%0d]: got %0d exp %0d", tag, i, pred[i], expv[i]);
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
    start = 0; chroma = 0; frac_x = 0; frac_y = 0;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) win[r][c] = 77;
    repeat (2) @(posedge clk); rst_n = 1;
    // 1. flat
    for (int f = 0; f < 16; f++) begin
      frac_x = 3'(f % 4); frac_y = 3'(f / 4);
      for (int i = 0; i < 16; i++) expv[i] = 77;
      run_block("flat");
    end
    // 2. horizontal ramp
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) win[r][c] = 8'(20 + 10 * c);
    for (int f = 0; f < 16; f++) begin
      frac_x = 3'(f % 4); frac_y = 3'(f / 4);
      for (int i = 0; i < 16; i++) expv[i] = (2 * (20 + 10 * (i % 4 + 2)) + 5 * (f % 4) + 1) / 2;
      run_block("ramp");
    end
    // 3. random luma and chroma
    for (int it = 0; it < 160; it++) begin
      for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) win[r][c] = 8'($urandom);
      if (it % 2 == 0) begin
        chroma = 0; frac_x = 3'($urandom_range(0, 3)); frac_y = 3'($urandom_range(0, 3));
        for (int i = 0; i < 16; i++) expv[i] = luma_ref(i / 4, i % 4, int'(frac_x), int'(frac_y));
      end else begin
        chroma = 1; frac_x = 3'($urandom); frac_y = 3'($urandom);
        for (int i = 0; i < 16; i++) begin
          int dx, dy, r, c;
          dx = int'(frac_x); dy = int'(frac_y); r = i / 4; c = i % 4;
          expv[i] = ((8-dx)*(8-dy)*W(r, c) + dx*(8-dy)*W(r, c+1) + (8-dx)*dy*W(r+1, c)
                     + dx*dy*W(r+1, c+1) + 32) >> 6;
        end
      end
      run_block($sformatf("rand %0d", it));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
