// tb_itiq: self-checking testbench of the inverse quantisation / inverse transform unit.
// Checks hand-worked cases (a lone DC coefficient in each of the three modes) and random
// blocks against a reference written in the standard's e/f/g/h butterfly notation with
// an explicit matrix product for the two Hadamard transforms. Results must appear exactly
// one clock after start.
module tb_itiq;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, done, use_dc;
  tr_mode_e   mode;
  logic [5:0] qp;
  coef_t      dc_in, coef_in [16], res_out [16];
  int         checks = 0, failures = 0;
  int         expv [16];

  itiq dut (.clk, .rst_n, .start, .mode, .qp, .use_dc, .dc_in, .coef_in, .done, .res_out);

  function automatic int vtab(input int m, input int r, input int c);
    int v0 [6] = '{10, 11, 13, 14, 16, 18};
    int v1 [6] = '{16, 18, 20, 23, 25, 29};
    int v2 [6] = '{13, 14, 16, 18, 20, 23};
    if (r % 2 == 0 && c % 2 == 0) return v0[m];
    if (r % 2 == 1 && c % 2 == 1) return v1[m];
    return v2[m];
  endfunction

  task automatic ref_4x4();
    int d [4][4], f [4][4], g [4][4];
    int e0, e1, e2, e3;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      d[i][j] = int'(coef_in[i*4+j]) * vtab(int'(qp) % 6, i, j) * (1 << (int'(qp) / 6));
    if (use_dc) d[0][0] = int'(dc_in);
    for (int i = 0; i < 4; i++) begin
      e0 = d[i][0] + d[i][2]; e1 = d[i][0] - d[i][2];
      e2 = (d[i][1] >>> 1) - d[i][3]; e3 = d[i][1] + (d[i][3] >>> 1);
      f[i][0] = e0 + e3; f[i][1] = e1 + e2; f[i][2] = e1 - e2; f[i][3] = e0 - e3;
    end
    for (int j = 0; j < 4; j++) begin
      e0 = f[0][j] + f[2][j]; e1 = f[0][j] - f[2][j];
      e2 = (f[1][j] >>> 1) - f[3][j]; e3 = f[1][j] + (f[3][j] >>> 1);
      g[0][j] = e0 + e3; g[1][j] = e1 + e2; g[2][j] = e1 - e2; g[3][j] = e0 - e3;
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) expv[i*4+j] = (g[i][j] + 32) >>> 6;
  endtask

  task automatic ref_luma_dc();
    int H [4][4] = '{'{1, 1, 1, 1}, '{1, 1, -1, -1}, '{1, -1, -1, 1}, '{1, -1, 1, -1}};
    int t [4][4], f [4][4], q6, scale;
    q6 = int'(qp) / 6; scale = vtab(int'(qp) % 6, 0, 0);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i][j] = 0;
      for (int k = 0; k < 4; k++) t[i][j] += H[i][k] * int'(coef_in[k*4+j]);
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      f[i][j] = 0;
      for (int k = 0; k < 4; k++) f[i][j] += t[i][k] * H[k][j];
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      if (q6 >= 2) expv[i*4+j] = f[i][j] * scale * (1 << (q6 - 2));
      else         expv[i*4+j] = (f[i][j] * scale + (1 << (1 - q6))) >>> (2 - q6);
  endtask

  task automatic ref_chroma_dc();
    int f [4];
    f[0] = coef_in[0] + coef_in[1] + coef_in[2] + coef_in[3];
    f[1] = coef_in[0] - coef_in[1] + coef_in[2] - coef_in[3];
    f[2] = coef_in[0] + coef_in[1] - coef_in[2] - coef_in[3];
    f[3] = coef_in[0] - coef_in[1] - coef_in[2] + coef_in[3];
    for (int i = 0; i < 16; i++) expv[i] = 0;
    for (int i = 0; i < 4; i++)
      expv[i] = (f[i] * vtab(int'(qp) % 6, 0, 0) * (1 << (int'(qp) / 6))) >>> 1;
  endtask

  task automatic apply_and_check(input string tag);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!done) begin failures++; $display("FAIL %s: done not one clock after start", tag); end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(res_out[i]) != expv[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s [%0d]: got %0d exp %0d", tag, i, res_out[i], expv[i]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; mode = TR_4X4; qp = 28; use_dc = 0; dc_in = 0;
    for (int i = 0; i < 16; i++) coef_in[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // lone DC coefficient 1 at QP 28: 1*16<<4 = 256 everywhere, (256+32)>>6 = 4
    coef_in[0] = 1;
    for (int i = 0; i < 16; i++) expv[i] = 4;
    apply_and_check("fixed 4x4");
    // luma DC: Hadamard of a lone 1 is 1 everywhere, 1*16 << (4-2) = 64
    mode = TR_LUMA_DC;
    for (int i = 0; i < 16; i++) expv[i] = 64;
    apply_and_check("fixed lumaDC");
    // chroma DC: (1*16 << 4) >> 1 = 128 in the four DC positions
    mode = TR_CHROMA_DC;
    for (int i = 0; i < 16; i++) expv[i] = (i < 4) ? 128 : 0;
    apply_and_check("fixed chromaDC");
    for (int it = 0; it < 600; it++) begin
      qp = 6'($urandom_range(0, 51));
      use_dc = 1'($urandom);
      dc_in = coef_t'($signed($urandom_range(0, 2047)) - 1024);
      for (int i = 0; i < 16; i++) coef_in[i] = coef_t'($signed($urandom_range(0, 63)) - 32);
      case (it % 3)
        0: begin mode = TR_4X4; ref_4x4(); end
        1: begin mode = TR_LUMA_DC; if (qp > 40) qp = 40; ref_luma_dc(); end
        default: begin mode = TR_CHROMA_DC; ref_chroma_dc(); end
      endcase
      // keep every result inside the 16-bit output
      begin
        logic fits;
        fits = 1;
        for (int i = 0; i < 16; i++) if (expv[i] > 32767 || expv[i] < -32768) fits = 0;
        if (fits) apply_and_check($sformatf("rand %0d", it));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
