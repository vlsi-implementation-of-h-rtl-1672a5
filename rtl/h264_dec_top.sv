// h264_dec_top: the dedicated hardware engines of the H.264 baseline decoder, wired as
// one subsystem. The programmable processor (scheduling, high-level entropy decoding and
// syntax parsing), the system bus, the low-level entropy decoder, stream input, video
// output, motion-vector decoding and the external frame memory sit outside; their
// connections are ports of this module.
//
// Residual/prediction path for one 4x4 block:
//   coefficients -> itiq (inverse quantisation + inverse transform) -> residual
//   ipred4x4 / ipred16x16 (intra) or mc_pred4x4 (inter)                -> prediction
//   rec4x4 adds the two when both are ready, and the reconstructed block is written into
//   the deblocking buffer of deblock_mb at the block position given with the coefficients.
// After the macroblock is complete, db_start runs the deblocking filter on the buffer,
// and the filtered samples are read out through db_rd_*. The boundary strengths come
// from db_bs, which derives them from the intra flags, coefficient flags, motion vectors
// and reference pictures given on the db_* ports; they are also visible on db_bs_v/h.
//
// dmac moves data between the external frame memory (addresses with bit 31 set, through
// the fm_* port) and the local memory of the motion-compensation engine (lm_sram, addresses
// with bit 31 clear), one word per clock. A transfer from one local-memory address to
// another is not supported by the single-ported local memory. While the DMA is idle the
// engine side may read the local memory through lm_*. With mc_use_lm, mc_win_fetch reads
// the 9x9 reference window from the local memory (27 reads, before lm_*; the controller
// must not run a DMA transfer into the local memory at the same time) and then starts
// mc_pred4x4 on it, 29 + 17 clocks in all.
//
// mb_pipe_ctrl times the three-stage macroblock pipeline and the frames; its stage_done
// inputs come from the processor, which knows when each stage's work is complete.
// Timing: itiq, ipred4x4 and ipred16x16 take one clock, mc_pred4x4 16 clocks, rec4x4 one clock and a
// deblocking run 160..192 clocks. The engine split follows the document; the glue
// (ready flags, address map, buffer write from the reconstruction) is this design's.
module h264_dec_top
  import h264_pkg::*;
#(
  parameter int unsigned SLOT_CYCLES  = 3600,
  parameter int unsigned FRAME_CYCLES = 1801801,
  parameter int unsigned NUM_MB       = 396,
  parameter int unsigned MC_LM_BITS   = 4096,
  localparam int unsigned MBW  = $clog2(NUM_MB + 1),
  localparam int unsigned LMAW = $clog2(MC_LM_BITS / 32)
) (
  input  logic            clk,
  input  logic            rst_n,
  // macroblock pipeline control
  input  logic            pipe_enable,
  input  logic [2:0]      stage_done,
  output logic            frame_tick,
  output logic            frame_busy,
  output logic            frame_done,
  output logic [2:0]      stage_start,
  output logic [2:0]      stage_valid,
  output logic [MBW-1:0]  stage_mb [3],
  output logic [15:0]     overrun_cnt,
  output logic [15:0]     late_frames,
  output logic [15:0]     frame_cnt,
  // coefficients of one block from the entropy decoder
  input  logic            coef_valid,
  input  tr_mode_e        coef_mode,
  input  logic [5:0]      coef_qp,
  input  logic            coef_use_dc,
  input  coef_t           coef_dc,
  input  coef_t           coef [16],
  input  comp_e           blk_comp,       // where the reconstructed block goes
  input  logic [2:0]      blk_bx,
  input  logic [2:0]      blk_by,
  output logic            res_valid,      // itiq result (also the DC outputs)
  output coef_t           res [16],
  // intra prediction request
  input  logic            ipred_go,
  input  i4_mode_e        ipred_mode,
  input  pix_t            ipred_top [8],
  input  pix_t            ipred_left [4],
  input  pix_t            ipred_corner,
  input  logic            ipred_top_avail,
  input  logic            ipred_left_avail,
  input  logic            ipred_topright_avail,
  // Intra 16x16 luma / 8x8 chroma prediction request (one 4x4 sub-block per request)
  input  logic            ipred16_go,
  input  logic            ipred16_chroma,
  input  lp_mode_e        ipred16_mode,
  input  logic [1:0]      ipred16_bx,
  input  logic [1:0]      ipred16_by,
  input  pix_t            ipred16_top [16],
  input  pix_t            ipred16_left [16],
  input  pix_t            ipred16_corner,
  input  logic            ipred16_top_avail,
  input  logic            ipred16_left_avail,
  // inter prediction request
  input  logic            mc_go,
  input  logic            mc_chroma,
  input  logic [2:0]      mc_frac_x,
  input  logic [2:0]      mc_frac_y,
  input  pix_t            mc_win [9][9],
  // mc_use_lm = 1 with mc_go: fetch the window from the local memory first (area at word
  // mc_lm_base, window at sample mc_ox, mc_oy of the area) instead of using mc_win
  input  logic            mc_use_lm,
  input  logic [LMAW-1:0] mc_lm_base,
  input  logic [4:0]      mc_ox,
  input  logic [4:0]      mc_oy,
  output logic            mc_busy,
  // reconstruction
  output logic            rec_valid,
  output pix_t            rec_blk [16],
  // deblocking
  input  logic            db_wr_en,       // load neighbour samples (while no block is written)
  input  comp_e           db_wr_comp,
  input  logic [2:0]      db_wr_bx,
  input  logic [2:0]      db_wr_by,
  input  pix_t            db_wr_data [16],
  input  comp_e           db_rd_comp,
  input  logic [2:0]      db_rd_bx,
  input  logic [2:0]      db_rd_by,
  output pix_t            db_rd_data [16],
  input  logic            db_start,
  input  logic            db_left_avail,
  input  logic            db_top_avail,
  input  logic [5:0]      db_qp_y,
  input  logic [5:0]      db_qp_c,
  input  logic [5:0]      db_qp_left_y,
  input  logic [5:0]      db_qp_left_c,
  input  logic [5:0]      db_qp_top_y,
  input  logic [5:0]      db_qp_top_c,
  // per-4x4-block facts for the boundary strengths (db_bs), raster order by*4+bx
  input  logic            db_cur_intra,
  input  logic            db_left_intra,
  input  logic            db_top_intra,
  input  logic            db_nz [16],
  input  coef_t           db_mv_x [16],
  input  coef_t           db_mv_y [16],
  input  logic [3:0]      db_ref [16],
  input  logic            db_left_nz [4],
  input  coef_t           db_left_mv_x [4],
  input  coef_t           db_left_mv_y [4],
  input  logic [3:0]      db_left_ref [4],
  input  logic            db_top_nz [4],
  input  coef_t           db_top_mv_x [4],
  input  coef_t           db_top_mv_y [4],
  input  logic [3:0]      db_top_ref [4],
  output logic [2:0]      db_bs_v [4][4],
  output logic [2:0]      db_bs_h [4][4],
  output logic            db_busy,
  output logic            db_done,
  output logic [7:0]      db_lines_filtered,
  // DMA configuration
  input  logic            dma_cfg_we,
  input  logic [2:0]      dma_cfg_addr,
  input  logic [31:0]     dma_cfg_wdata,
  input  logic            dma_gnt,
  output logic            dma_busy,
  output logic            dma_done,
  // external frame memory
  output logic            fm_rd_en,
  output logic [30:0]     fm_rd_addr,
  input  logic [31:0]     fm_rd_data,
  output logic            fm_wr_en,
  output logic [30:0]     fm_wr_addr,
  output logic [31:0]     fm_wr_data,
  // engine-side read of the motion-compensation local memory
  input  logic            lm_rd_en,
  input  logic [LMAW-1:0] lm_rd_addr,
  output logic [31:0]     lm_rd_data
);

  // ---------------------------------------------------------------- pipeline control
  mb_pipe_ctrl #(.SLOT_CYCLES(SLOT_CYCLES), .FRAME_CYCLES(FRAME_CYCLES), .NUM_MB(NUM_MB)) u_ctrl (
    .clk, .rst_n, .enable(pipe_enable), .stage_done,
    .frame_tick, .frame_busy, .frame_done, .stage_start, .stage_valid, .stage_mb,
    .overrun_cnt, .late_frames, .frame_cnt
  );

  // ---------------------------------------------------------------- residual
  itiq u_itiq (
    .clk, .rst_n, .start(coef_valid), .mode(coef_mode), .qp(coef_qp),
    .use_dc(coef_use_dc), .dc_in(coef_dc), .coef_in(coef), .done(res_valid), .res_out(res)
  );

  // ---------------------------------------------------------------- prediction
  logic ipred_valid, ipred16_valid, mc_done;
  pix_t ipred_blk [16], ipred16_blk [16], mc_blk [16];

  ipred4x4 u_ipred (
    .clk, .rst_n, .in_valid(ipred_go), .mode(ipred_mode), .top(ipred_top), .left(ipred_left),
    .corner(ipred_corner), .top_avail(ipred_top_avail), .left_avail(ipred_left_avail),
    .topright_avail(ipred_topright_avail), .out_valid(ipred_valid), .pred(ipred_blk)
  );

  ipred16x16 u_ipred16 (
    .clk, .rst_n, .in_valid(ipred16_go), .chroma(ipred16_chroma), .mode(ipred16_mode),
    .bx(ipred16_bx), .by(ipred16_by), .top(ipred16_top), .left(ipred16_left),
    .corner(ipred16_corner), .top_avail(ipred16_top_avail), .left_avail(ipred16_left_avail),
    .out_valid(ipred16_valid), .pred(ipred16_blk)
  );

  // window fetch from the local memory; the interpolation starts when it is done, with the
  // chroma flag and fraction latched at mc_go
  logic [31:0] lm_q;        // local-memory read data (shared by DMA, fetch and lm_rd_*)
  logic       fetch_rd_en, fetch_busy, fetch_done, mc_core_busy, mc_src_lm;
  logic [LMAW-1:0] fetch_rd_addr;
  logic [7:0] fetch_win [9][9];
  pix_t       mc_win_sel [9][9];
  logic       mc_chroma_q;
  logic [2:0] mc_frac_x_q, mc_frac_y_q;

  mc_win_fetch #(.AW(LMAW)) u_fetch (
    .clk, .rst_n, .start(mc_go && mc_use_lm), .base(mc_lm_base), .ox(mc_ox), .oy(mc_oy),
    .rd_en(fetch_rd_en), .rd_addr(fetch_rd_addr), .rd_data(lm_q), .busy(fetch_busy),
    .done(fetch_done), .win(fetch_win)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mc_src_lm <= 1'b0; mc_chroma_q <= 1'b0; mc_frac_x_q <= '0; mc_frac_y_q <= '0;
    end else if (mc_go) begin
      mc_src_lm <= mc_use_lm; mc_chroma_q <= mc_chroma;
      mc_frac_x_q <= mc_frac_x; mc_frac_y_q <= mc_frac_y;
    end
  end

  always_comb
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 9; c++)
        mc_win_sel[r][c] = mc_src_lm ? pix_t'(fetch_win[r][c]) : mc_win[r][c];

  mc_pred4x4 u_mc (
    .clk, .rst_n, .start((mc_go && !mc_use_lm) || fetch_done),
    .chroma(mc_src_lm ? mc_chroma_q : mc_chroma),
    .frac_x(mc_src_lm ? mc_frac_x_q : mc_frac_x), .frac_y(mc_src_lm ? mc_frac_y_q : mc_frac_y),
    .win(mc_win_sel), .busy(mc_core_busy), .done(mc_done), .pred(mc_blk)
  );
  assign mc_busy = mc_core_busy || fetch_busy;

  // ---------------------------------------------------------------- reconstruction
  // Only ordinary 4x4 residual blocks are reconstructed; DC results go back to the
  // controller on res/res_valid and return later through coef_dc.
  tr_mode_e coef_mode_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          coef_mode_q <= TR_4X4;
    else if (coef_valid) coef_mode_q <= coef_mode;
  end

  logic  res_rdy, pred_rdy, rec_go;
  logic [1:0] pred_src;   // 0: intra 4x4, 1: intra 16x16/chroma, 2: motion compensation
  comp_e blk_comp_q;
  logic [2:0] blk_bx_q, blk_by_q;
  pix_t  pred_sel [16];

  assign rec_go = res_rdy && pred_rdy;
  always_comb
    for (int i = 0; i < 16; i++)
      pred_sel[i] = (pred_src == 2'd2) ? mc_blk[i] : (pred_src == 2'd1) ? ipred16_blk[i] : ipred_blk[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_rdy <= 1'b0; pred_rdy <= 1'b0; pred_src <= 2'd0;
      blk_comp_q <= COMP_Y; blk_bx_q <= '0; blk_by_q <= '0;
    end else begin
      if (coef_valid) begin
        blk_comp_q <= blk_comp; blk_bx_q <= blk_bx; blk_by_q <= blk_by;
      end
      if (res_valid && coef_mode_q == TR_4X4) res_rdy <= 1'b1;
      else if (rec_go)                        res_rdy <= 1'b0;
      if (ipred_valid)        begin pred_rdy <= 1'b1; pred_src <= 2'd0; end
      else if (ipred16_valid) begin pred_rdy <= 1'b1; pred_src <= 2'd1; end
      else if (mc_done)       begin pred_rdy <= 1'b1; pred_src <= 2'd2; end
      else if (rec_go)      pred_rdy <= 1'b0;
    end
  end

  rec4x4 u_rec (
    .clk, .rst_n, .in_valid(rec_go), .pred(pred_sel), .res(res),
    .out_valid(rec_valid), .recon(rec_blk)
  );

  // ---------------------------------------------------------------- deblocking
  comp_e      rec_comp_q;
  logic [2:0] rec_bx_q, rec_by_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_comp_q <= COMP_Y; rec_bx_q <= '0; rec_by_q <= '0;
    end else if (rec_go) begin
      rec_comp_q <= blk_comp_q; rec_bx_q <= blk_bx_q; rec_by_q <= blk_by_q;
    end
  end

  logic       dbw_en;
  comp_e      dbw_comp;
  logic [2:0] dbw_bx, dbw_by;
  pix_t       dbw_data [16];
  always_comb begin
    dbw_en   = rec_valid | db_wr_en;
    dbw_comp = rec_valid ? rec_comp_q : db_wr_comp;
    dbw_bx   = rec_valid ? rec_bx_q   : db_wr_bx;
    dbw_by   = rec_valid ? rec_by_q   : db_wr_by;
    for (int i = 0; i < 16; i++) dbw_data[i] = rec_valid ? rec_blk[i] : db_wr_data[i];
  end

  db_bs u_bs (
    .cur_intra(db_cur_intra), .left_intra(db_left_intra), .top_intra(db_top_intra),
    .nz(db_nz), .mv_x(db_mv_x), .mv_y(db_mv_y), .ref_id(db_ref),
    .left_nz(db_left_nz), .left_mv_x(db_left_mv_x), .left_mv_y(db_left_mv_y),
    .left_ref(db_left_ref), .top_nz(db_top_nz), .top_mv_x(db_top_mv_x),
    .top_mv_y(db_top_mv_y), .top_ref(db_top_ref), .bs_v(db_bs_v), .bs_h(db_bs_h)
  );

  deblock_mb u_db (
    .clk, .rst_n,
    .wr_en(dbw_en), .wr_comp(dbw_comp), .wr_bx(dbw_bx), .wr_by(dbw_by), .wr_data(dbw_data),
    .rd_comp(db_rd_comp), .rd_bx(db_rd_bx), .rd_by(db_rd_by), .rd_data(db_rd_data),
    .start(db_start), .left_avail(db_left_avail), .top_avail(db_top_avail),
    .qp_y(db_qp_y), .qp_c(db_qp_c), .qp_left_y(db_qp_left_y), .qp_left_c(db_qp_left_c),
    .qp_top_y(db_qp_top_y), .qp_top_c(db_qp_top_c), .bs_v(db_bs_v), .bs_h(db_bs_h),
    .busy(db_busy), .done(db_done), .lines_filtered(db_lines_filtered)
  );

  // ---------------------------------------------------------------- DMA and local memory
  logic        d_rd_en, d_wr_en;
  logic [31:0] d_rd_addr, d_wr_addr, d_rd_data, d_wr_data;
  logic        rd_from_fm_q;
  logic        lm_en, lm_we;
  logic [LMAW-1:0] lm_addr;

  dmac #(.AW(32), .DW(32)) u_dma (
    .clk, .rst_n, .cfg_we(dma_cfg_we), .cfg_addr(dma_cfg_addr), .cfg_wdata(dma_cfg_wdata),
    .busy(dma_busy), .done(dma_done), .gnt(dma_gnt),
    .rd_en(d_rd_en), .rd_addr(d_rd_addr), .rd_data(d_rd_data),
    .wr_en(d_wr_en), .wr_addr(d_wr_addr), .wr_data(d_wr_data)
  );

  assign fm_rd_en   = d_rd_en &&  d_rd_addr[31];
  assign fm_rd_addr = d_rd_addr[30:0];
  assign fm_wr_en   = d_wr_en &&  d_wr_addr[31];
  assign fm_wr_addr = d_wr_addr[30:0];
  assign fm_wr_data = d_wr_data;
  assign d_rd_data  = rd_from_fm_q ? fm_rd_data : lm_q;
  assign lm_rd_data = lm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rd_from_fm_q <= 1'b0;
    else if (d_rd_en) rd_from_fm_q <= d_rd_addr[31];
  end

  always_comb begin
    if (d_wr_en && !d_wr_addr[31]) begin
      lm_en = 1'b1; lm_we = 1'b1; lm_addr = d_wr_addr[LMAW-1:0];
    end else if (d_rd_en && !d_rd_addr[31]) begin
      lm_en = 1'b1; lm_we = 1'b0; lm_addr = d_rd_addr[LMAW-1:0];
    end else if (fetch_rd_en) begin
      lm_en = 1'b1; lm_we = 1'b0; lm_addr = fetch_rd_addr;
    end else begin
      lm_en = lm_rd_en && !dma_busy; lm_we = 1'b0; lm_addr = lm_rd_addr;
    end
  end

  lm_sram #(.BITS(MC_LM_BITS), .WIDTH(32)) u_mc_lm (
    .clk, .en(lm_en), .we(lm_we), .addr(lm_addr), .wdata(d_wr_data), .rdata(lm_q)
  );

endmodule
