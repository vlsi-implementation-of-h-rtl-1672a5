// tb_deblock_mb: self-checking testbench of the macroblock deblocking engine.
// Loads a macroblock with its top and left neighbours (smooth content with a step at
// every 4x4 block boundary), runs the filter and compares the whole buffer with a
// reference that filters the same buffer edge by edge in the order: luma vertical edges
// left to right, luma horizontal edges top to bottom, then Cb and Cr the same way.
// The neighbours get their own random QPs, so the macroblock edges are filtered with the
// rounded average of the two QPs and the internal edges with this macroblock's QP.
// Runs at all four combinations of picture-edge flags; the run must take 192, 160, 160
// and 128 clocks, and picture-boundary samples must stay untouched.
module tb_deblock_mb;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       wr_en, start, left_avail, top_avail, busy, done;
  comp_e      wr_comp, rd_comp;
  logic [2:0] wr_bx, wr_by, rd_bx, rd_by;
  pix_t       wr_data [16], rd_data [16];
  logic [5:0] qp_y, qp_c, qp_left_y, qp_left_c, qp_top_y, qp_top_c;
  logic [2:0] bs_v [4][4], bs_h [4][4];
  logic [7:0] lines_filtered;
  int checks = 0, failures = 0, ref_lines;

  int RY [20][20], RB [12][12], RR [12][12];

  deblock_mb dut (.clk, .rst_n, .wr_en, .wr_comp, .wr_bx, .wr_by, .wr_data, .rd_comp,
                  .rd_bx, .rd_by, .rd_data, .start, .left_avail, .top_avail, .qp_y, .qp_c, .qp_left_y, .qp_left_c, .qp_top_y, .qp_top_c,
                  .bs_v, .bs_h, .busy, .done, .lines_filtered);

  function automatic int get(input int c, input int r, input int x);
    return (c == 0) ? RY[r][x] : (c == 1) ? RB[r][x] : RR[r][x];
  endfunction
  task automatic put(input int c, input int r, input int x, input int v);
    if (c == 0) RY[r][x] = v; else if (c == 1) RB[r][x] = v; else RR[r][x] = v;
  endtask

  task automatic ref_filter();
    int s [8];
    int n, lines, edges, e0, bsv, first, qpe;
    ref_lines = 0;
    for (int c = 0; c < 3; c++) begin
      n = (c == 0) ? 16 : 8; edges = (c == 0) ? 4 : 2;
      for (int d = 0; d < 2; d++) begin
        first = ((d == 0 && !left_avail) || (d == 1 && !top_avail)) ? 1 : 0;
        for (int e = first; e < edges; e++) begin
          e0 = 4 + 4 * e;
          for (int l = 0; l < n; l++) begin
            if (c == 0) bsv = d ? bs_h[e][l/4] : bs_v[e][l/4];
            else        bsv = d ? bs_h[2*e][l/2] : bs_v[2*e][l/2];
            for (int i = 0; i < 8; i++)
              s[i] = d ? get(c, e0 - 4 + i, 4 + l) : get(c, 4 + l, e0 - 4 + i);
            qpe = (c == 0) ? int'(qp_y) : int'(qp_c);
            if (e == 0)
              qpe = (qpe + (d ? ((c == 0) ? int'(qp_top_y) : int'(qp_top_c))
                              : ((c == 0) ? int'(qp_left_y) : int'(qp_left_c))) + 1) / 2;
            if (db_line(s, bsv, qpe, c != 0)) ref_lines++;
            for (int i = 1; i < 7; i++)
              if (d) put(c, e0 - 4 + i, 4 + l, s[i]); else put(c, 4 + l, e0 - 4 + i, s[i]);
          end
        end
      end
    end
  endtask

  task automatic load_block(input int c, input int bx, input int by);
    @(negedge clk);
    wr_en = 1; wr_comp = comp_e'(c); wr_bx = 3'(bx); wr_by = 3'(by);
    for (int r = 0; r < 4; r++) for (int x = 0; x < 4; x++)
      wr_data[r*4+x] = pix_t'(get(c, 4*by + r, 4*bx + x));
    @(negedge clk); wr_en = 0;
  endtask

  task automatic run_case(input bit la, input bit ta);
    int cyc, nb, base, exp_cyc;
    // content: a gentle gradient plus a per-block offset, so block edges have small steps
    for (int c = 0; c < 3; c++) begin
      nb = (c == 0) ? 5 : 3;
      base = $urandom_range(60, 180);
      for (int r = 0; r < 4 * nb; r++) for (int x = 0; x < 4 * nb; x++)
        put(c, r, x, base + (r + x) / 4 + ((((r / 4) * 7 + (x / 4) * 3 + c) % 5) * 3)
                     + $urandom_range(0, 2));
    end
    for (int e = 0; e < 4; e++) for (int s = 0; s < 4; s++) begin
      bs_v[e][s] = 3'($urandom_range(0, 4)); bs_h[e][s] = 3'($urandom_range(0, 4));
    end
    qp_y = 6'($urandom_range(24, 51)); qp_c = 6'($urandom_range(24, 39));
    qp_left_y = 6'($urandom_range(16, 51)); qp_left_c = 6'($urandom_range(16, 39));
    qp_top_y = 6'($urandom_range(16, 51)); qp_top_c = 6'($urandom_range(16, 39));
    left_avail = la; top_avail = ta;
    for (int c = 0; c < 3; c++) begin
      nb = (c == 0) ? 5 : 3;
      for (int by = 0; by < nb; by++) for (int bx = 0; bx < nb; bx++)
        if (!(bx == 0 && by == 0)) load_block(c, bx, by);
    end
    ref_filter();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    exp_cyc = 192 - (la ? 0 : 32) - (ta ? 0 : 32);
    checks++;
    if (cyc != exp_cyc + 1) begin failures++; $display("FAIL la=%0b ta=%0b: %0d clocks, exp %0d", la, ta, cyc - 1, exp_cyc); end
    checks++;
    if (int'(lines_filtered) != ref_lines) begin
      failures++; $display("FAIL lines filtered %0d exp %0d", lines_filtered, ref_lines);
    end
    checks++;
    if (ref_lines < 20) begin failures++; $display("FAIL: test content filtered only %0d lines", ref_lines); end
    for (int c = 0; c < 3; c++) begin
      nb = (c == 0) ? 5 : 3;
      for (int by = 0; by < nb; by++) for (int bx = 0; bx < nb; bx++) begin
        if (bx == 0 && by == 0) continue;
        rd_comp = comp_e'(c); rd_bx = 3'(bx); rd_by = 3'(by);
        #1;
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(rd_data[i]) != get(c, 4*by + i/4, 4*bx + i%4)) begin
            failures++;
            if (failures < 10) $display("FAIL la=%0b ta=%0b comp %0d blk (%0d,%0d) [%0d]: got %0d exp %0d",
                                        la, ta, c, bx, by, i, rd_data[i], get(c, 4*by + i/4, 4*bx + i%4));
          end
        end
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; start = 0; wr_comp = COMP_Y; rd_comp = COMP_Y; wr_bx = 0; wr_by = 0;
    rd_bx = 0; rd_by = 0; left_avail = 1; top_avail = 1; qp_y = 30; qp_c = 30; qp_left_y = 30; qp_left_c = 30; qp_top_y = 30; qp_top_c = 30;
    for (int i = 0; i < 16; i++) wr_data[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      run_case(1, 1);
      run_case(0, 1);
      run_case(1, 0);
      run_case(0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
