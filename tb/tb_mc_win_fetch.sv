// tb_mc_win_fetch: self-checking testbench of the reference-window fetch mc_win_fetch.
// A behavioural 128-word memory with a one-clock read holds a random 21x21 reference area
// at a 6-word row stride behind a non-zero base address. Every window position (ox, oy)
// in 0..12 is fetched; each of the 81 window samples is compared with the area, the read
// count must be 27 and done must come exactly 29 clocks after start. A start while busy
// must be ignored. Inputs are driven and outputs sampled on the falling clock edge.
module tb_mc_win_fetch;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, rd_en, busy, done;
  logic [6:0] base, rd_addr;
  logic [4:0] ox, oy;
  logic [31:0] rd_data;
  logic [7:0] win [9][9];

  mc_win_fetch dut (.*);

  logic [31:0] mem [128];
  int area [21][21];
  int checks = 0, failures = 0, reads = 0;
  localparam int BASE = 2;

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data <= mem[rd_addr];
      reads <= reads + 1;
    end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, r0;
    start = 0; base = 7'(BASE); ox = 0; oy = 0;
    for (int i = 0; i < 128; i++) mem[i] = $urandom;
    for (int y = 0; y < 21; y++)
      for (int x = 0; x < 21; x++) begin
        area[y][x] = int'($urandom % 256);
        mem[BASE + y * 6 + x / 4][8 * (x % 4) +: 8] = 8'(area[y][x]);
      end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int y0 = 0; y0 <= 12; y0++)
      for (int x0 = 0; x0 <= 12; x0++) begin
        @(negedge clk);
        start = 1; ox = 5'(x0); oy = 5'(y0);
        r0 = reads;
        @(negedge clk);
        start = 0;
        cyc = 1;
        if (x0 == 5 && y0 == 5) begin   // a second start while busy is ignored
          start = 1; ox = 0; oy = 0;
          @(negedge clk); start = 0; cyc++;
        end
        while (!done && cyc < 100) begin @(negedge clk); cyc++; end
        chk(done, "done never came");
        chk(cyc == 29, $sformatf("(%0d,%0d) took %0d clocks", x0, y0, cyc));
        chk(reads - r0 == 27, $sformatf("(%0d,%0d) %0d reads", x0, y0, reads - r0));
        for (int r = 0; r < 9; r++)
          for (int c = 0; c < 9; c++)
            chk(int'(win[r][c]) == area[y0 + r][x0 + c],
                $sformatf("(%0d,%0d) win[%0d][%0d] = %0d exp %0d", x0, y0, r, c, win[r][c],
                          area[y0 + r][x0 + c]));
        @(negedge clk);
        chk(!busy && !done, "idle after done");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
