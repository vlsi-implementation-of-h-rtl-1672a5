// tb_mb_pipe_ctrl: self-checking testbench of the macroblock pipeline controller,
// at reduced sizes (slot 20 clocks, frame period 400 clocks, 6 macroblocks).
// Three stage models answer each stage_start with stage_done after a latency. Checked:
//  * every macroblock passes stage 0, 1, 2 in order, one slot apart, none skipped;
//  * no slot is shorter than SLOT_CYCLES;
//  * a frame without overruns takes exactly (NUM_MB + 2) slots (+2 clocks of control);
//  * a stage that overruns its slot stalls the pipeline and is counted once;
//  * a frame longer than the frame period makes the next frame tick be dropped.
module tb_mb_pipe_ctrl;
  localparam int SLOT = 20, FRAME = 400, NMB = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       enable, frame_tick, frame_busy, frame_done;
  logic [2:0] stage_done, stage_start, stage_valid;
  logic [2:0] stage_mb [3];
  logic [15:0] overrun_cnt, late_frames, frame_cnt;
  int checks = 0, failures = 0;
  int frame_no = 0, t0 = 0, cyc = 0, last_adv = -1000;
  int stalls_injected = 0;
  int next_expected [3];
  int lat [3];
  int cnt [3];
  bit slow_frame;

  mb_pipe_ctrl #(.SLOT_CYCLES(SLOT), .FRAME_CYCLES(FRAME), .NUM_MB(NMB)) dut (
    .clk, .rst_n, .enable, .stage_done, .frame_tick, .frame_busy, .frame_done, .stage_start,
    .stage_valid, .stage_mb, .overrun_cnt, .late_frames, .frame_cnt);

  always @(negedge clk) cyc++;

  // stage models (sampling on the falling edge, away from the controller's updates)
  always @(negedge clk) begin
    for (int s = 0; s < 3; s++) begin
      stage_done[s] <= 1'b0;
      if (cnt[s] > 0) begin
        cnt[s]--;
        if (cnt[s] == 0) stage_done[s] <= 1'b1;
      end
      if (stage_start[s]) begin
        // frame 1: stage 1 overruns on macroblock 2, stage 2 on macroblock 4
        // frame 2: stage 0 stalls 400 clocks on macroblock 1 (frame overruns its period)
        lat[s] = 3 + (s * 4) + int'(stage_mb[s]);
        if (frame_no == 1 && s == 1 && stage_mb[s] == 2) begin lat[s] = SLOT + 7; stalls_injected++; end
        if (frame_no == 1 && s == 2 && stage_mb[s] == 4) begin lat[s] = SLOT + 3; stalls_injected++; end
        if (frame_no == 2 && s == 0 && stage_mb[s] == 1) begin lat[s] = 400;     stalls_injected++; end
        cnt[s] = lat[s];
        checks++;
        if (int'(stage_mb[s]) != next_expected[s]) begin
          failures++;
          $display("FAIL stage %0d got mb %0d exp %0d", s, stage_mb[s], next_expected[s]);
        end
        next_expected[s]++;
      end
    end
    if (stage_start != 0) begin
      checks++;
      if (last_adv >= 0 && cyc - last_adv < SLOT && !frame_tick) begin
        failures++; $display("FAIL slot of %0d clocks", cyc - last_adv);
      end
      last_adv = cyc;
      // stage s+1 starts on the macroblock stage s had
      checks++;
      if (stage_start[1] && stage_start[0] && stage_mb[1] + 1 != stage_mb[0]) begin
        failures++; $display("FAIL stage 0/1 mbs %0d %0d", stage_mb[0], stage_mb[1]);
      end
    end
    if (frame_tick && !frame_busy) begin
      t0 = cyc; for (int s = 0; s < 3; s++) next_expected[s] = 0;
      last_adv = -1000;
    end
    if (frame_done) begin
      checks++;
      if (frame_no != 1 && frame_no != 2 && cyc - t0 != (NMB + 2) * SLOT + 2) begin
        failures++; $display("FAIL frame %0d took %0d clocks exp %0d", frame_no, cyc - t0, (NMB + 2) * SLOT + 2);
      end
      if ((frame_no == 1 || frame_no == 2) && cyc - t0 <= (NMB + 2) * SLOT + 2) begin
        failures++; $display("FAIL frame %0d with a stall was not longer", frame_no);
      end
      for (int s = 0; s < 3; s++) begin
        checks++;
        if (next_expected[s] != NMB) begin failures++; $display("FAIL stage %0d saw %0d mbs", s, next_expected[s]); end
      end
      frame_no++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; stage_done = 0;
    for (int s = 0; s < 3; s++) begin cnt[s] = 0; next_expected[s] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); enable = 1;
    wait (frame_no == 5);
    @(negedge clk);
    checks++;
    if (int'(overrun_cnt) != stalls_injected) begin
      failures++; $display("FAIL overruns %0d exp %0d", overrun_cnt, stalls_injected);
    end
    checks++;
    if (late_frames != 1) begin failures++; $display("FAIL late frames %0d exp 1", late_frames); end
    checks++;
    if (frame_cnt != 5) begin failures++; $display("FAIL frame count %0d", frame_cnt); end
    $display("stalls %0d, dropped frame ticks %0d, frames %0d", overrun_cnt, late_frames, frame_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
