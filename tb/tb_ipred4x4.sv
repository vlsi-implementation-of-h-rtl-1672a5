// tb_ipred4x4: self-checking testbench of the intra 4x4 predictor.
// A reference model written directly in the standard's p[x,y] notation (p[x,-1] the row
// above, p[-1,y] the left column, p[-1,-1] the corner) computes every mode for random
// neighbours and availability; the DUT output is compared one clock after the request.
// A fixed case with known results (DC of all-equal neighbours, mode 8 corner values)
// is checked too.
module tb_ipred4x4;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     in_valid, out_valid;
  i4_mode_e mode;
  pix_t     top [8], left [4], corner, pred [16];
  logic     ta, la, tra;
  int       checks = 0, failures = 0;

  ipred4x4 dut (.clk, .rst_n, .in_valid, .mode, .top, .left, .corner,
                .top_avail(ta), .left_avail(la), .topright_avail(tra), .out_valid, .pred);

  // p[x,y] for x,y in -1..7
  function automatic int P(input int x, input int y);
    if (x == -1 && y == -1) return int'(corner);
    if (y == -1) return (x > 3 && !tra) ? int'(top[3]) : int'(top[x]);
    return int'(left[y]);
  endfunction

  function automatic int ref_pred(input int m, input int x, input int y);
    int z, s;
    case (m)
      0: return P(x, -1);
      1: return P(-1, y);
      2: begin
        s = 0;
        if (ta && la) begin for (int i = 0; i < 4; i++) s += P(i, -1) + P(-1, i); return (s + 4) >> 3; end
        if (la) begin for (int i = 0; i < 4; i++) s += P(-1, i); return (s + 2) >> 2; end
        if (ta) begin for (int i = 0; i < 4; i++) s += P(i, -1); return (s + 2) >> 2; end
        return 128;
      end
      3: if (x == 3 && y == 3) return (P(6, -1) + 3 * P(7, -1) + 2) >> 2;
         else return (P(x + y, -1) + 2 * P(x + y + 1, -1) + P(x + y + 2, -1) + 2) >> 2;
      4: if (x > y) return (P(x - y - 2, -1) + 2 * P(x - y - 1, -1) + P(x - y, -1) + 2) >> 2;
         else if (x < y) return (P(-1, y - x - 2) + 2 * P(-1, y - x - 1) + P(-1, y - x) + 2) >> 2;
         else return (P(0, -1) + 2 * P(-1, -1) + P(-1, 0) + 2) >> 2;
      5: if (y == 0 || y == 2) return (P(x + (y >> 1), -1) + P(x + (y >> 1) + 1, -1) + 1) >> 1;
         else return (P(x + (y >> 1), -1) + 2 * P(x + (y >> 1) + 1, -1) + P(x + (y >> 1) + 2, -1) + 2) >> 2;
      6: begin
        z = 2 * y - x;
        if (z == 0 || z == 2 || z == 4 || z == 6)
          return (P(-1, y - (x >> 1) - 1) + P(-1, y - (x >> 1)) + 1) >> 1;
        else if (z == 1 || z == 3 || z == 5)
          return (P(-1, y - (x >> 1) - 2) + 2 * P(-1, y - (x >> 1) - 1) + P(-1, y - (x >> 1)) + 2) >> 2;
        else if (z == -1)
          return (P(-1, 0) + 2 * P(-1, -1) + P(0, -1) + 2) >> 2;
        else
          return (P(x - 1, -1) + 2 * P(x - 2, -1) + P(x - 3, -1) + 2) >> 2;
      end
      7: begin
        z = 2 * x - y;
        if (z == 0 || z == 2 || z == 4 || z == 6)
          return (P(x - (y >> 1) - 1, -1) + P(x - (y >> 1), -1) + 1) >> 1;
        else if (z == 1 || z == 3 || z == 5)
          return (P(x - (y >> 1) - 2, -1) + 2 * P(x - (y >> 1) - 1, -1) + P(x - (y >> 1), -1) + 2) >> 2;
        else if (z == -1)
          return (P(-1, 0) + 2 * P(-1, -1) + P(0, -1) + 2) >> 2;
        else
          return (P(-1, y - 1) + 2 * P(-1, y - 2) + P(-1, y - 3) + 2) >> 2;
      end
      default: begin
        z = x + 2 * y;
        if (z == 0 || z == 2 || z == 4)
          return (P(-1, y + (x >> 1)) + P(-1, y + (x >> 1) + 1) + 1) >> 1;
        else if (z == 1 || z == 3)
          return (P(-1, y + (x >> 1)) + 2 * P(-1, y + (x >> 1) + 1) + P(-1, y + (x >> 1) + 2) + 2) >> 2;
        else if (z == 5)
          return (P(-1, 2) + 3 * P(-1, 3) + 2) >> 2;
        else
          return P(-1, 3);
      end
    endcase
  endfunction

  task automatic run(input int m);
    @(negedge clk);
    mode = i4_mode_e'(m); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL: no out_valid mode %0d", m); end
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        checks++;
        if (int'(pred[y*4+x]) != ref_pred(m, x, y)) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d (%0d,%0d): got %0d exp %0d", m, x, y,
                                      pred[y*4+x], ref_pred(m, x, y));
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
    in_valid = 0; mode = I4_V; ta = 1; la = 1; tra = 1; corner = 0;
    for (int i = 0; i < 8; i++) top[i] = 0;
    for (int i = 0; i < 4; i++) left[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // known values: flat neighbours of 100 give DC 100; mode 8 bottom rows equal L3
    for (int i = 0; i < 8; i++) top[i] = 100;
    for (int i = 0; i < 4; i++) left[i] = 8'(10 * i);
    corner = 100;
    @(negedge clk); mode = I4_HU; in_valid = 1; @(negedge clk); in_valid = 0;
    checks++; if (pred[15] != 30 || pred[12] != 30 || pred[0] != 5) begin
      failures++; $display("FAIL fixed HU: %0d %0d %0d", pred[15], pred[12], pred[0]); end
    for (int it = 0; it < 400; it++) begin
      for (int i = 0; i < 8; i++) top[i] = 8'($urandom);
      for (int i = 0; i < 4; i++) left[i] = 8'($urandom);
      corner = 8'($urandom);
      ta = 1'($urandom); la = 1'($urandom); tra = 1'($urandom);
      if (it % 4 == 0) begin ta = 1; la = 1; end
      run(it % 9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
