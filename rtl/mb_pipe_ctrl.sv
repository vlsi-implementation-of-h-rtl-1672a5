// mb_pipe_ctrl: macroblock-level pipeline controller and frame timer.
//
// Decoding runs as a three-stage macroblock pipeline: stage 0 is entropy decoding
// (high- and low-level), stage 1 is intra prediction with inverse quantisation/transform
// (and motion-vector decoding with motion compensation), stage 2 is reconstruction with
// deblocking. While stage 2 works on macroblock n, stage 1 works on n+1 and stage 0 on n+2.
//
// Time is divided into slots of SLOT_CYCLES clocks. At the end of a slot, when every
// occupied stage has reported stage_done for its macroblock, the macroblocks move one
// stage on and each occupied stage gets a stage_start pulse together with its macroblock
// number on stage_mb. A stage that has not finished by the end of its slot stretches the
// slot (a stall): the pipeline waits for it, and overrun_cnt counts such slots.
//
// A frame timer raises frame_tick every FRAME_CYCLES clocks (one frame period). A tick
// starts the decoding of the NUM_MB macroblocks of a frame; the frame takes NUM_MB + 2
// slots and ends with frame_done. A tick that arrives while the previous frame is still
// being decoded is dropped and counted in late_frames.
//
// The stage split, the 3600-cycle slot, the 1,801,801-cycle frame period and the 396
// macroblocks of a CIF frame come from the document; the stall rule, the frame-drop rule
// and the counters are this design's choices.
module mb_pipe_ctrl #(
  parameter int unsigned SLOT_CYCLES  = 3600,
  parameter int unsigned FRAME_CYCLES = 1801801,
  parameter int unsigned NUM_MB       = 396,
  localparam int unsigned MBW = $clog2(NUM_MB + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enable,
  input  logic [2:0]     stage_done,     // pulse: stage s finished its macroblock
  output logic           frame_tick,
  output logic           frame_busy,
  output logic           frame_done,
  output logic [2:0]     stage_start,    // pulse: stage s begins macroblock stage_mb[s]
  output logic [2:0]     stage_valid,
  output logic [MBW-1:0] stage_mb [3],
  output logic [15:0]    overrun_cnt,
  output logic [15:0]    late_frames,
  output logic [15:0]    frame_cnt
);

  logic [$clog2(FRAME_CYCLES)-1:0] frame_timer;
  logic [$clog2(SLOT_CYCLES+1)-1:0] slot_cnt;
  logic [MBW-1:0] next_mb;
  logic [2:0]     fin;
  logic           stalled;
  logic           slot_end, all_fin, advance;

  assign frame_tick = enable && (frame_timer == '0);
  assign slot_end   = (slot_cnt >= ($clog2(SLOT_CYCLES+1))'(SLOT_CYCLES - 1));
  assign all_fin    = &(fin | stage_done | ~stage_valid);
  assign advance    = frame_busy && slot_end && all_fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_timer <= '0;
    end else if (enable) begin
      if (frame_timer == ($clog2(FRAME_CYCLES))'(FRAME_CYCLES - 1)) frame_timer <= '0;
      else                                                            frame_timer <= frame_timer + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_busy  <= 1'b0;
      frame_done  <= 1'b0;
      stage_start <= '0;
      stage_valid <= '0;
      for (int s = 0; s < 3; s++) stage_mb[s] <= '0;
      next_mb     <= '0;
      fin         <= '0;
      stalled     <= 1'b0;
      slot_cnt    <= '0;
      overrun_cnt <= '0;
      late_frames <= '0;
      frame_cnt   <= '0;
    end else begin
      stage_start <= '0;
      frame_done  <= 1'b0;
      fin         <= fin | stage_done;

      if (frame_tick) begin
        if (frame_busy) late_frames <= late_frames + 16'd1;
        else begin
          frame_busy <= 1'b1;
          next_mb    <= '0;
          slot_cnt   <= ($clog2(SLOT_CYCLES+1))'(SLOT_CYCLES - 1);  // first slot starts at once
          fin        <= '1;
          stalled    <= 1'b0;
        end
      end

      if (advance) begin
        // shift the macroblocks one stage on
        stage_valid[2] <= stage_valid[1];
        stage_mb[2]    <= stage_mb[1];
        stage_valid[1] <= stage_valid[0];
        stage_mb[1]    <= stage_mb[0];
        stage_valid[0] <= (next_mb < MBW'(NUM_MB));
        stage_mb[0]    <= next_mb;
        if (next_mb < MBW'(NUM_MB)) next_mb <= next_mb + 1'b1;
        stage_start    <= {stage_valid[1], stage_valid[0], next_mb < MBW'(NUM_MB)};
        fin            <= '0;
        slot_cnt       <= '0;
        stalled        <= 1'b0;
        if (!stage_valid[1] && !stage_valid[0] && stage_valid[2] && next_mb == MBW'(NUM_MB)) begin
          // the last macroblock has left the pipeline
          frame_busy  <= 1'b0;
          frame_done  <= 1'b1;
          frame_cnt   <= frame_cnt + 16'd1;
          stage_valid <= '0;
          stage_start <= '0;
        end
      end else if (frame_busy) begin
        if (slot_end) begin
          if (!stalled) overrun_cnt <= overrun_cnt + 16'd1;
          stalled <= 1'b1;
        end else begin
          slot_cnt <= slot_cnt + 1'b1;
        end
      end
    end
  end

endmodule
