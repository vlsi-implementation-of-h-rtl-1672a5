// mc_win_fetch: loads the 9x9 reference window of one 4x4 motion-compensated block from
// the motion-compensation local memory.
// The local memory holds a reference area (for luma, the 21x21 samples a 16x16 macroblock
// needs with the 6-tap filter: 16 + 5) as rows of STRIDE_W 32-bit words, four 8-bit samples
// per word, sample 0 in bits 7:0. With the default 6-word (24-sample) stride, 21 rows take
// 126 of the 128 words of a 4096-bit memory. A window starts at sample (ox, oy) of the area,
// which is the integer motion-vector position minus 2 in each direction; 9 samples at any
// byte offset span at most 3 words, so the unit reads 3 words for each of the 9 rows.
// Interface: start with base (word address of the area), ox, oy; the unit drives the memory
// read port (rd_en/rd_addr, data on rd_data one clock later) for 27 clocks from the clock
// after start, and pulses done 29 clocks after start with the window on win[row][col].
// A new start while busy is ignored. The document gives the MC engine a 4096-bit local memory filled by DMA; the
// area layout, stride and read order are this design's choices.
module mc_win_fetch #(
  parameter int unsigned AW       = 7,   // word address width of the local memory
  parameter int unsigned STRIDE_W = 6    // words per stored row
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [4:0]    ox,
  input  logic [4:0]    oy,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [31:0]   rd_data,
  output logic          busy,
  output logic          done,
  output logic [7:0]    win [9][9]
);

  logic [4:0] ox_q, oy_q;
  logic [AW-1:0] base_q;
  logic [3:0] row;        // row being requested
  logic [1:0] wd;         // word of the row being requested
  logic       issuing;
  logic       ret_v;      // a read is returning this clock
  logic [3:0] ret_row;
  logic [1:0] ret_wd;

  assign rd_en   = issuing;
  assign rd_addr = AW'(32'(base_q) + (32'(oy_q) + 32'(row)) * STRIDE_W + 32'(ox_q[4:2]) + 32'(wd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; issuing <= 1'b0; ret_v <= 1'b0;
      row <= '0; wd <= '0; ret_row <= '0; ret_wd <= '0;
      ox_q <= '0; oy_q <= '0; base_q <= '0;
      for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) win[r][c] <= '0;
    end else begin
      done <= 1'b0;
      ret_v <= issuing;
      ret_row <= row;
      ret_wd <= wd;
      if (start && !busy) begin
        busy <= 1'b1; issuing <= 1'b1; row <= '0; wd <= '0;
        ox_q <= ox; oy_q <= oy; base_q <= base;
      end else if (issuing) begin
        if (wd == 2'd2) begin
          wd <= '0;
          if (row == 4'd8) issuing <= 1'b0;
          else row <= row + 4'd1;
        end else begin
          wd <= wd + 2'd1;
        end
      end
      // store the returning word's samples that fall inside the window
      if (ret_v) begin
        for (int b = 0; b < 4; b++) begin
          if (4 * int'(ret_wd) + b >= int'(ox_q[1:0]) && 4 * int'(ret_wd) + b - int'(ox_q[1:0]) < 9)
            win[ret_row][4 * int'(ret_wd) + b - int'(ox_q[1:0])] <= rd_data[8*b +: 8];
        end
        if (ret_row == 4'd8 && ret_wd == 2'd2) begin
          busy <= 1'b0; done <= 1'b1;
        end
      end
    end
  end

endmodule
