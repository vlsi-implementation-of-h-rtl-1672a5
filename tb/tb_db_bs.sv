// tb_db_bs: self-checking testbench for the boundary-strength derivation db_bs.
// The reference places the macroblock and its left/top neighbour blocks on one 5x5 grid
// of 4x4 blocks (row 0 = blocks above, column 0 = blocks to the left) and applies the
// strength rules to each pair of adjacent blocks. It runs hand-set cases (all intra,
// intra neighbour only, coefficients only, motion-vector thresholds at exactly 3 and 4
// quarter samples, different reference pictures) and then random inputs with small
// motion vectors so that every threshold is crossed often. All 32 strengths are compared
// for every case. Inputs are applied and outputs sampled on the falling clock edge.
module tb_db_bs;
  import h264_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       cur_intra, left_intra, top_intra;
  logic       nz [16];
  coef_t      mv_x [16], mv_y [16];
  logic [3:0] ref_id [16];
  logic       left_nz [4], top_nz [4];
  coef_t      left_mv_x [4], left_mv_y [4], top_mv_x [4], top_mv_y [4];
  logic [3:0] left_ref [4], top_ref [4];
  logic [2:0] bs_v [4][4], bs_h [4][4];

  db_bs dut (.*);

  int checks = 0, failures = 0;
  int n_bs [5];

  // 5x5 grid of blocks: [row][col], row/col 0 are the neighbours
  int g_intra [5][5], g_nz [5][5], g_mx [5][5], g_my [5][5], g_ref [5][5];

  function automatic int ref_bs(int pr, int pc, int qr, int qc, bit mb_edge);
    int dx, dy;
    dx = g_mx[pr][pc] - g_mx[qr][qc];
    dy = g_my[pr][pc] - g_my[qr][qc];
    if (dx < 0) dx = -dx;
    if (dy < 0) dy = -dy;
    if (g_intra[pr][pc] != 0 || g_intra[qr][qc] != 0) return mb_edge ? 4 : 3;
    if (g_nz[pr][pc] != 0 || g_nz[qr][qc] != 0) return 2;
    if (g_ref[pr][pc] != g_ref[qr][qc] || dx >= 4 || dy >= 4) return 1;
    return 0;
  endfunction

  // copy the grid onto the DUT ports
  task automatic apply();
    cur_intra = (g_intra[1][1] != 0);
    left_intra = (g_intra[1][0] != 0);
    top_intra = (g_intra[0][1] != 0);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        nz[r*4+c] = (g_nz[r+1][c+1] != 0);
        mv_x[r*4+c] = coef_t'(g_mx[r+1][c+1]);
        mv_y[r*4+c] = coef_t'(g_my[r+1][c+1]);
        ref_id[r*4+c] = 4'(g_ref[r+1][c+1]);
      end
    for (int i = 0; i < 4; i++) begin
      left_nz[i] = (g_nz[i+1][0] != 0); left_mv_x[i] = coef_t'(g_mx[i+1][0]);
      left_mv_y[i] = coef_t'(g_my[i+1][0]); left_ref[i] = 4'(g_ref[i+1][0]);
      top_nz[i] = (g_nz[0][i+1] != 0); top_mv_x[i] = coef_t'(g_mx[0][i+1]);
      top_mv_y[i] = coef_t'(g_my[0][i+1]); top_ref[i] = 4'(g_ref[0][i+1]);
    end
  endtask

  // the intra flag is per macroblock: keep the grid consistent with that
  task automatic set_intra(int cur, int left, int top);
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        g_intra[r][c] = (r == 0) ? top : (c == 0) ? left : cur;
  endtask

  task automatic clear_grid();
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        g_intra[r][c] = 0; g_nz[r][c] = 0; g_mx[r][c] = 0; g_my[r][c] = 0; g_ref[r][c] = 0;
      end
  endtask

  task automatic check_case(string tag);
    int e;
    apply();
    @(negedge clk);
    for (int k = 0; k < 4; k++)
      for (int s = 0; s < 4; s++) begin
        e = ref_bs(s + 1, k, s + 1, k + 1, k == 0);
        checks++;
        n_bs[e]++;
        if (int'(bs_v[k][s]) != e) begin
          failures++;
          if (failures < 10) $display("%s: bs_v[%0d][%0d] = %0d exp %0d", tag, k, s, bs_v[k][s], e);
        end
        e = ref_bs(k, s + 1, k + 1, s + 1, k == 0);
        checks++;
        n_bs[e]++;
        if (int'(bs_h[k][s]) != e) begin
          failures++;
          if (failures < 10) $display("%s: bs_h[%0d][%0d] = %0d exp %0d", tag, k, s, bs_h[k][s], e);
        end
      end
  endtask

  task automatic expect_one(string tag, bit v, int k, int s, int exp);
    checks++;
    if (int'(v ? bs_v[k][s] : bs_h[k][s]) != exp) begin
      failures++;
      $display("%s: got %0d exp %0d", tag, v ? bs_v[k][s] : bs_h[k][s], exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) n_bs[i] = 0;
    // hand cases, checked against hand-written values as well as the reference
    clear_grid(); set_intra(1, 0, 0); check_case("all intra");
    expect_one("intra mb edge", 1, 0, 2, 4); expect_one("intra internal", 0, 3, 1, 3);
    clear_grid(); set_intra(0, 1, 0); check_case("left intra");
    expect_one("left intra edge", 1, 0, 0, 4); expect_one("left intra top", 0, 0, 0, 0);
    clear_grid(); g_nz[2][2] = 1; check_case("coefficients");
    expect_one("nz left of block", 1, 1, 1, 2); expect_one("nz right of block", 1, 2, 1, 2);
    expect_one("nz far", 1, 3, 1, 0);
    clear_grid(); g_mx[1][2] = 3; check_case("mv 3");
    expect_one("mv diff 3", 1, 1, 0, 0);
    clear_grid(); g_my[1][2] = -4; check_case("mv -4");
    expect_one("mv diff 4", 1, 1, 0, 1); expect_one("mv diff 4 right", 1, 2, 0, 1);
    clear_grid(); g_ref[0][3] = 1; check_case("ref");
    expect_one("different reference", 0, 0, 2, 1);
    // random cases
    for (int t = 0; t < 6000; t++) begin
      clear_grid();
      set_intra(($urandom % 6) == 0, ($urandom % 5) == 0, ($urandom % 5) == 0);
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          g_nz[r][c] = ($urandom % 4) == 0;
          g_mx[r][c] = int'($urandom % 13) - 6;
          g_my[r][c] = int'($urandom % 13) - 6;
          if (t % 3 == 0) g_mx[r][c] = g_mx[r][c] * 700;   // wide vectors as well
          g_ref[r][c] = (($urandom % 6) == 0) ? int'($urandom % 16) : 0;
        end
      check_case("random");
    end
    $display("strengths seen: bs0 %0d bs1 %0d bs2 %0d bs3 %0d bs4 %0d",
             n_bs[0], n_bs[1], n_bs[2], n_bs[3], n_bs[4]);
    checks++;
    if (n_bs[0] == 0 || n_bs[1] == 0 || n_bs[2] == 0 || n_bs[3] == 0 || n_bs[4] == 0) begin
      failures++;
      $display("not every strength was produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
