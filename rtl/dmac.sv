// dmac: single-channel, dual-addressed DMA controller.
//
// The channel is programmed with an explicit source and an explicit destination address
// and copies words between any two places of the address space (local memories of the
// engines or the external frame memory). There is no buffer memory inside: the word read
// from the source in one clock is written to the destination in the next, straight from
// the read data, so a transfer moves one word per clock once started.
//
// Two modes:
//  * packet mode (CTRL.mode = 0): COUNT consecutive words, SRC.. to DST..
//  * burst block mode (CTRL.mode = 1): a two-dimensional block of ROWS rows of COUNT words;
//    after each row the source address advances by SRC_STRIDE and the destination by
//    DST_STRIDE words (e.g. a 16x16 macroblock out of a frame in memory).
//
// Registers (cfg_we, word index cfg_addr): 0 SRC, 1 DST, 2 COUNT, 3 ROWS, 4 SRC_STRIDE,
// 5 DST_STRIDE, 6 CTRL (bit 0 start, bit 1 mode). Writing CTRL with bit 0 set starts the
// transfer; busy stays high until done pulses. gnt = 0 holds back the next read (the bus
// is busy); a read already issued still completes its write.
// Memory side: rd_en/rd_addr with rd_data returned on the next clock; wr_en/wr_addr/wr_data.
// The single channel, the dual addressing without buffer, the one-word-per-clock transfer
// and the two mode names follow the document; what each mode moves, the register map and
// the bus handshake are this design's choices.
module dmac #(
  parameter int unsigned AW = 32,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration port
  input  logic          cfg_we,
  input  logic [2:0]    cfg_addr,
  input  logic [31:0]   cfg_wdata,
  output logic          busy,
  output logic          done,
  // memory side
  input  logic          gnt,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [DW-1:0] rd_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [DW-1:0] wr_data
);

  typedef enum logic {MODE_PACKET = 1'b0, MODE_BLOCK = 1'b1} dma_mode_e;

  logic [AW-1:0] src, dst, src_stride, dst_stride;
  logic [31:0]   count, rows;
  dma_mode_e     mode;

  logic [AW-1:0] src_row, dst_row, src_cur, dst_cur;
  logic [31:0]   col, row;
  logic          issuing;
  logic          last_word;
  logic          pend;         // a read is in flight
  logic [AW-1:0] pend_addr;

  assign last_word = (col == count - 32'd1) && (mode == MODE_PACKET || row == rows - 32'd1);
  assign rd_en     = issuing && gnt;
  assign rd_addr   = src_cur;
  assign wr_en     = pend;
  assign wr_addr   = pend_addr;
  assign wr_data   = rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src <= '0; dst <= '0; src_stride <= '0; dst_stride <= '0;
      count <= '0; rows <= '0; mode <= MODE_PACKET;
      src_row <= '0; dst_row <= '0; src_cur <= '0; dst_cur <= '0;
      col <= '0; row <= '0;
      issuing <= 1'b0; busy <= 1'b0; done <= 1'b0;
      pend <= 1'b0; pend_addr <= '0;
    end else begin
      done <= 1'b0;
      pend <= rd_en;
      if (rd_en) pend_addr <= dst_cur;

      if (cfg_we && !busy) begin
        case (cfg_addr)
          3'd0: src        <= AW'(cfg_wdata);
          3'd1: dst        <= AW'(cfg_wdata);
          3'd2: count      <= cfg_wdata;
          3'd3: rows       <= cfg_wdata;
          3'd4: src_stride <= AW'(cfg_wdata);
          3'd5: dst_stride <= AW'(cfg_wdata);
          3'd6: begin
            mode <= dma_mode_e'(cfg_wdata[1]);
            if (cfg_wdata[0] && count != 0 && (!cfg_wdata[1] || rows != 0)) begin
              busy    <= 1'b1;
              issuing <= 1'b1;
              src_cur <= src; dst_cur <= dst;
              src_row <= src; dst_row <= dst;
              col     <= '0;  row     <= '0;
            end
          end
          default: ;
        endcase
      end

      if (rd_en) begin
        if (last_word) begin
          issuing <= 1'b0;
        end else if (col == count - 32'd1) begin
          // next row of a block
          col     <= '0;
          row     <= row + 32'd1;
          src_row <= src_row + src_stride;
          dst_row <= dst_row + dst_stride;
          src_cur <= src_row + src_stride;
          dst_cur <= dst_row + dst_stride;
        end else begin
          col     <= col + 32'd1;
          src_cur <= src_cur + AW'(1);
          dst_cur <= dst_cur + AW'(1);
        end
      end

      if (busy && !issuing) begin                 // the last write, if any, completes now
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
