// tb_h264_dec_top: end-to-end testbench of the decoder's hardware engines at the
// default (full) parameters: 3600-clock slots, 1,801,801-clock frame period, 396
// macroblocks of a CIF frame.
//
// While the pipeline controller runs one whole frame (stage models answer the stage
// starts; stage 1 of macroblock 5 is made to overrun its slot), the datapath processes
// macroblock 0 in full:
//  * DMA: a packet copy from frame memory into the motion-compensation local memory, a
//    burst-block copy (2-D) into it, and a packet copy back out to frame memory; the
//    local memory is read back and compared.
//  * ITIQ: the luma DC and chroma DC transforms of a lone coefficient (hand values), then
//    one residual block per 4x4 block with a lone DC coefficient k (residual 4k at QP 28).
//  * Prediction: intra 4x4 DC, Intra 16x16 vertical and quarter-sample motion
//    compensation for the luma blocks (one of them with its window fetched from the
//    local memory the DMA filled); chroma DC intra prediction for Cb and chroma
//    motion compensation for Cr, all from flat neighbours or windows; reconstruction is
//    checked against prediction + residual.
//  * Boundary strengths derived from block facts (intra neighbour, coefficients, motion
//    vectors, reference pictures), checked against hand values giving 4, 2, 1 and 0.
//  * Deblocking of the reconstructed macroblock with its neighbours, compared with a
//    reference filter, once inside the picture and once on its left picture edge.
// Every mechanism (stall, frame completion, both DMA modes, all three transforms, intra
// and both kinds of inter prediction, reconstruction, boundary strengths, filtering, picture-edge skip) is
// counted and must have happened at least once.
module tb_h264_dec_top;
  import h264_pkg::*;
  import h264_ref_pkg::*;

  localparam int NUM_MB = 396, SLOT = 3600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ports of the top, same names
  logic            pipe_enable;
  logic [2:0]      stage_done;
  logic            frame_tick, frame_busy, frame_done;
  logic [2:0]      stage_start, stage_valid;
  logic [8:0]      stage_mb [3];
  logic [15:0]     overrun_cnt, late_frames, frame_cnt;
  logic            coef_valid, coef_use_dc;
  tr_mode_e        coef_mode;
  logic [5:0]      coef_qp;
  coef_t           coef_dc, coef [16], res [16];
  comp_e           blk_comp;
  logic [2:0]      blk_bx, blk_by;
  logic            res_valid;
  logic            ipred_go, ipred_top_avail, ipred_left_avail, ipred_topright_avail;
  i4_mode_e        ipred_mode;
  pix_t            ipred_top [8], ipred_left [4], ipred_corner;
  logic            ipred16_go, ipred16_chroma, ipred16_top_avail, ipred16_left_avail;
  lp_mode_e        ipred16_mode;
  logic [1:0]      ipred16_bx, ipred16_by;
  pix_t            ipred16_top [16], ipred16_left [16], ipred16_corner;
  logic            mc_go, mc_chroma, mc_busy, mc_use_lm;
  logic [6:0]      mc_lm_base;
  logic [4:0]      mc_ox, mc_oy;
  logic [2:0]      mc_frac_x, mc_frac_y;
  pix_t            mc_win [9][9];
  logic            rec_valid;
  pix_t            rec_blk [16];
  logic            db_wr_en, db_start, db_left_avail, db_top_avail, db_busy, db_done;
  comp_e           db_wr_comp, db_rd_comp;
  logic [2:0]      db_wr_bx, db_wr_by, db_rd_bx, db_rd_by;
  pix_t            db_wr_data [16], db_rd_data [16];
  logic [5:0]      db_qp_y, db_qp_c, db_qp_left_y, db_qp_left_c, db_qp_top_y, db_qp_top_c;
  logic [2:0]      db_bs_v [4][4], db_bs_h [4][4];
  logic            db_cur_intra, db_left_intra, db_top_intra;
  logic            db_nz [16], db_left_nz [4], db_top_nz [4];
  coef_t           db_mv_x [16], db_mv_y [16], db_left_mv_x [4], db_left_mv_y [4];
  coef_t           db_top_mv_x [4], db_top_mv_y [4];
  logic [3:0]      db_ref [16], db_left_ref [4], db_top_ref [4];
  logic [7:0]      db_lines_filtered;
  logic            dma_cfg_we, dma_gnt, dma_busy, dma_done;
  logic [2:0]      dma_cfg_addr;
  logic [31:0]     dma_cfg_wdata;
  logic            fm_rd_en, fm_wr_en;
  logic [30:0]     fm_rd_addr, fm_wr_addr;
  logic [31:0]     fm_rd_data, fm_wr_data;
  logic            lm_rd_en;
  logic [6:0]      lm_rd_addr;
  logic [31:0]     lm_rd_data;

  h264_dec_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall, n_frames, n_dma_packet = 0, n_dma_block = 0, n_tr4x4 = 0, n_trldc = 0,
      n_trcdc = 0, n_intra = 0, n_intra16 = 0, n_mc_luma = 0, n_mc_lm = 0, n_mc_chroma = 0, n_rec = 0, n_db_lines = 0, n_bs_checked = 0,
      n_db_edge_skip = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------ frame memory model
  logic [31:0] fm [65536];
  always @(posedge clk) begin
    if (fm_rd_en) fm_rd_data <= fm[fm_rd_addr[15:0]];
    if (fm_wr_en) fm[fm_wr_addr[15:0]] <= fm_wr_data;
  end

  // ------------------------------------------------------------ stage models
  bit dp_finished = 0;
  int cnt [3] = '{0, 0, 0};
  bit wait_dp = 0;
  always @(negedge clk) begin
    for (int s = 0; s < 3; s++) begin
      stage_done[s] <= 1'b0;
      if (cnt[s] > 0) begin
        cnt[s]--;
        if (cnt[s] == 0) stage_done[s] <= 1'b1;
      end
      if (stage_start[s]) begin
        if (s == 2 && stage_mb[s] == 0) wait_dp = 1;      // real datapath work
        else if (s == 1 && stage_mb[s] == 5) cnt[s] = SLOT + 500;
        else cnt[s] = 200 + 300 * s;
      end
    end
    if (wait_dp && dp_finished) begin wait_dp = 0; stage_done[2] <= 1'b1; end
  end

  // ------------------------------------------------------------ DMA helpers
  task automatic dma(input bit block, input logic [31:0] src, input logic [31:0] dst,
                     input int count, input int rows, input int sstr, input int dstr);
    logic [31:0] regs [6];
    int cyc;
    regs = '{src, dst, count, rows, sstr, dstr};
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); dma_cfg_we = 1; dma_cfg_addr = 3'(i); dma_cfg_wdata = regs[i];
    end
    @(negedge clk); dma_cfg_addr = 6; dma_cfg_wdata = {30'd0, block, 1'b1};
    @(negedge clk); dma_cfg_we = 0;
    cyc = 1;
    while (!dma_done && cyc < 10000) begin @(negedge clk); cyc++; end
    chk(cyc == (block ? count * rows : count) + 2, $sformatf("DMA of %0d words took %0d clocks", block ? count * rows : count, cyc));
    if (block) n_dma_block++; else n_dma_packet++;
  endtask


  task automatic lm_check(input int a, input logic [31:0] exp, input string tag);
    @(negedge clk); lm_rd_en = 1; lm_rd_addr = 7'(a);
    @(negedge clk); lm_rd_en = 0;
    chk(lm_rd_data == exp, $sformatf("%s LM[%0d] = %h exp %h", tag, a, lm_rd_data, exp));
  endtask

  // ------------------------------------------------------------ reference buffers
  int RY [20][20], RB [12][12], RR [12][12];
  function automatic int get(input int c, input int r, input int x);
    return (c == 0) ? RY[r][x] : (c == 1) ? RB[r][x] : RR[r][x];
  endfunction
  task automatic put(input int c, input int r, input int x, input int v);
    if (c == 0) RY[r][x] = v; else if (c == 1) RB[r][x] = v; else RR[r][x] = v;
  endtask

  task automatic ref_deblock(input bit la, input bit ta, output int lines);
    int s [8];
    int n, edges, e0, bsv, first, qpe;
    lines = 0;
    for (int c = 0; c < 3; c++) begin
      n = (c == 0) ? 16 : 8; edges = (c == 0) ? 4 : 2;
      for (int d = 0; d < 2; d++) begin
        first = ((d == 0 && !la) || (d == 1 && !ta)) ? 1 : 0;
        for (int e = first; e < edges; e++) begin
          e0 = 4 + 4 * e;
          for (int l = 0; l < n; l++) begin
            if (c == 0) bsv = d ? db_bs_h[e][l/4] : db_bs_v[e][l/4];
            else        bsv = d ? db_bs_h[2*e][l/2] : db_bs_v[2*e][l/2];
            for (int i = 0; i < 8; i++)
              s[i] = d ? get(c, e0 - 4 + i, 4 + l) : get(c, 4 + l, e0 - 4 + i);
            qpe = (c == 0) ? int'(db_qp_y) : int'(db_qp_c);
            if (e == 0)   // macroblock edge: average with the neighbour's QP
              qpe = (qpe + (d ? ((c == 0) ? int'(db_qp_top_y) : int'(db_qp_top_c))
                              : ((c == 0) ? int'(db_qp_left_y) : int'(db_qp_left_c))) + 1) / 2;
            if (db_line(s, bsv, qpe, c != 0)) lines++;
            for (int i = 1; i < 7; i++)
              if (d) put(c, e0 - 4 + i, 4 + l, s[i]); else put(c, 4 + l, e0 - 4 + i, s[i]);
          end
        end
      end
    end
  endtask

  task automatic run_deblock(input bit la, input bit ta);
    int cyc, lines, nb;
    // strengths derived by db_bs from the block facts set at reset (see below)
    for (int e = 0; e < 4; e++) for (int s = 0; s < 4; s++) begin
      chk(int'(db_bs_v[e][s]) == ((e == 0) ? 4 : (e == 3) ? 0 : 1),
          $sformatf("bs_v[%0d][%0d] = %0d", e, s, db_bs_v[e][s]));
      chk(int'(db_bs_h[e][s]) == ((e == 0) ? 2 : 1), $sformatf("bs_h[%0d][%0d] = %0d", e, s, db_bs_h[e][s]));
    end
    n_bs_checked++;
    ref_deblock(la, ta, lines);
    db_left_avail = la; db_top_avail = ta;
    @(negedge clk); db_start = 1;
    @(negedge clk); db_start = 0;
    cyc = 1;
    while (!db_done && cyc < 1000) begin @(negedge clk); cyc++; end
    chk(cyc == 193 - (la ? 0 : 32) - (ta ? 0 : 32), $sformatf("deblock took %0d clocks", cyc - 1));
    chk(int'(db_lines_filtered) == lines, $sformatf("filtered %0d lines exp %0d", db_lines_filtered, lines));
    n_db_lines += int'(db_lines_filtered);
    if (!la || !ta) n_db_edge_skip++;
    for (int c = 0; c < 3; c++) begin
      nb = (c == 0) ? 5 : 3;
      for (int by = 0; by < nb; by++) for (int bx = 0; bx < nb; bx++) begin
        if (bx == 0 && by == 0) continue;
        db_rd_comp = comp_e'(c); db_rd_bx = 3'(bx); db_rd_by = 3'(by);
        #1;
        for (int i = 0; i < 16; i++)
          chk(int'(db_rd_data[i]) == get(c, 4*by + i/4, 4*bx + i%4),
              $sformatf("deblocked comp %0d blk (%0d,%0d)[%0d] = %0d exp %0d", c, bx, by, i,
                        db_rd_data[i], get(c, 4*by + i/4, 4*bx + i%4)));
      end
    end
  endtask

  // one 4x4 block through ITIQ + prediction + REC into the deblocking buffer
  // local-memory word a, as loaded by the DMA transfers at the start of the test
  function automatic logic [31:0] lm_word(input int a);
    if (a < 64) return fm[16'h0100 + a];
    return fm[16'h2000 + 88 * ((a - 64) / 8) + (a - 64) % 8];
  endfunction

  task automatic do_block(input int c, input int bx, input int by, input int k, input int kind);
    int p, cyc, pv [16], x, y;
    @(negedge clk);
    coef_valid = 1; coef_mode = TR_4X4; coef_qp = 28; coef_use_dc = 0;
    for (int i = 0; i < 16; i++) coef[i] = 0;
    coef[0] = coef_t'(k);
    blk_comp = comp_e'(c); blk_bx = 3'(bx + 1); blk_by = 3'(by + 1);
    if (kind == 0) begin            // intra DC, neighbours 100
      ipred_go = 1; ipred_mode = I4_DC; p = 100;
      ipred_top_avail = 1; ipred_left_avail = 1; ipred_topright_avail = 1;
      for (int i = 0; i < 8; i++) ipred_top[i] = 100;
      for (int i = 0; i < 4; i++) ipred_left[i] = 100;
      ipred_corner = 100;
      n_intra++;
    end else if (kind == 3) begin   // Intra 16x16 / chroma prediction from flat neighbours
      ipred16_go = 1; ipred16_chroma = (c != 0); p = (c == 0) ? 100 : 118;
      ipred16_mode = (c == 0) ? LP_V : LP_DC; ipred16_bx = 2'(bx); ipred16_by = 2'(by);
      ipred16_top_avail = 1; ipred16_left_avail = 1;
      for (int i = 0; i < 16; i++) begin ipred16_top[i] = pix_t'(p); ipred16_left[i] = pix_t'(p); end
      ipred16_corner = pix_t'(p);
      n_intra16++;
    end else if (kind == 4) begin   // motion compensation, window fetched from the local memory
      // area at word 0 with a 6-word stride; window at (3,3), integer position (5,5)
      mc_go = 1; mc_use_lm = 1; mc_lm_base = 0; mc_ox = 3; mc_oy = 3; mc_chroma = 0;
      mc_frac_x = 0; mc_frac_y = 0; p = -1;
      for (int i = 0; i < 16; i++) begin
        y = 5 + i / 4; x = 5 + i % 4;
        pv[i] = int'(lm_word(6 * y + x / 4)[8 * (x % 4) +: 8]);
      end
      n_mc_lm++;
    end else begin                  // motion compensation from a flat window
      mc_go = 1; mc_chroma = (kind == 2); p = (kind == 2) ? 118 : 104;
      mc_frac_x = (kind == 2) ? 3'd5 : 3'd1; mc_frac_y = (kind == 2) ? 3'd3 : 3'd2;
      for (int r = 0; r < 9; r++) for (int x = 0; x < 9; x++) mc_win[r][x] = pix_t'(p);
      if (kind == 2) n_mc_chroma++; else n_mc_luma++;
    end
    @(negedge clk);
    coef_valid = 0; ipred_go = 0; ipred16_go = 0; mc_go = 0; mc_use_lm = 0;
    n_tr4x4++;
    cyc = 0;
    while (!rec_valid && cyc < 100) begin @(negedge clk); cyc++; end
    chk(rec_valid, "reconstruction never completed");
    for (int i = 0; i < 16; i++) begin
      if (p >= 0) pv[i] = p;
      pv[i] = (pv[i] + 4 * k > 255) ? 255 : pv[i] + 4 * k;
    end
    for (int i = 0; i < 16; i++)
      chk(int'(rec_blk[i]) == pv[i], $sformatf("rec comp %0d blk (%0d,%0d)[%0d] = %0d exp %0d",
                                                c, bx, by, i, rec_blk[i], pv[i]));
    for (int i = 0; i < 16; i++) put(c, 4 * (by + 1) + i / 4, 4 * (bx + 1) + i % 4, pv[i]);
    n_rec++;
  endtask

  initial begin
    repeat (1800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ datapath sequence
  initial begin
    pipe_enable = 0; coef_valid = 0; coef_use_dc = 0; coef_mode = TR_4X4; coef_qp = 28;
    coef_dc = 0; blk_comp = COMP_Y; blk_bx = 0; blk_by = 0;
    for (int i = 0; i < 16; i++) begin coef[i] = 0; db_wr_data[i] = 0; end
    ipred_go = 0; ipred_mode = I4_DC; ipred_corner = 0; ipred_top_avail = 1;
    ipred_left_avail = 1; ipred_topright_avail = 1;
    for (int i = 0; i < 8; i++) ipred_top[i] = 0;
    for (int i = 0; i < 4; i++) ipred_left[i] = 0;
    ipred16_go = 0; ipred16_chroma = 0; ipred16_mode = LP_DC; ipred16_bx = 0; ipred16_by = 0;
    ipred16_corner = 0; ipred16_top_avail = 1; ipred16_left_avail = 1;
    for (int i = 0; i < 16; i++) begin ipred16_top[i] = 0; ipred16_left[i] = 0; end
    mc_go = 0; mc_chroma = 0; mc_use_lm = 0; mc_lm_base = 0; mc_ox = 0; mc_oy = 0; mc_frac_x = 0; mc_frac_y = 0;
    for (int r = 0; r < 9; r++) for (int x = 0; x < 9; x++) mc_win[r][x] = 0;
    db_wr_en = 0; db_start = 0; db_left_avail = 1; db_top_avail = 1; db_wr_comp = COMP_Y;
    db_rd_comp = COMP_Y; db_wr_bx = 0; db_wr_by = 0; db_rd_bx = 0; db_rd_by = 0;
    db_qp_y = 36; db_qp_c = 34; db_qp_left_y = 40; db_qp_left_c = 37; db_qp_top_y = 30; db_qp_top_c = 29;
    // boundary-strength inputs: intra macroblock on the left (4), coefficients in the
    // blocks above (2), vertical motion differing by 4 between block rows (1), reference
    // picture changing between block columns 0..2 (1) and not between 2 and 3 (0)
    db_cur_intra = 0; db_left_intra = 1; db_top_intra = 0;
    for (int i = 0; i < 16; i++) begin
      db_nz[i] = 0; db_mv_x[i] = 0; db_mv_y[i] = coef_t'(4 * (i / 4));
      db_ref[i] = 4'((i % 4 > 2) ? 2 : i % 4);
    end
    for (int i = 0; i < 4; i++) begin
      db_left_nz[i] = 0; db_left_mv_x[i] = 0; db_left_mv_y[i] = 0; db_left_ref[i] = 0;
      db_top_nz[i] = 1; db_top_mv_x[i] = 0; db_top_mv_y[i] = 0; db_top_ref[i] = 0;
    end
    dma_cfg_we = 0; dma_cfg_addr = 0; dma_cfg_wdata = 0; dma_gnt = 1;
    lm_rd_en = 0; lm_rd_addr = 0;
    for (int i = 0; i < 65536; i++) fm[i] = 32'h1234_0000 ^ (i * 32'h0001_0003);
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); pipe_enable = 1;

    // DMA: frame memory -> LM (packet), frame memory -> LM (2-D block), LM -> frame memory
    dma(0, 32'h8000_0100, 32'd0, 64, 0, 0, 0);
    for (int a = 0; a < 64; a++) lm_check(a, fm[16'h0100 + a], "packet");
    dma(1, 32'h8000_2000, 32'd64, 8, 4, 88, 8);
    for (int r = 0; r < 4; r++) for (int x = 0; x < 8; x++)
      lm_check(64 + 8 * r + x, fm[16'h2000 + 88 * r + x], "block");
    dma(0, 32'd0, 32'h8000_8000, 16, 0, 0, 0);
    for (int a = 0; a < 16; a++) chk(fm[16'h8000 + a] == fm[16'h0100 + a], "LM to frame memory");

    // ITIQ DC transforms (results return on res)
    @(negedge clk); coef_valid = 1; coef_mode = TR_LUMA_DC; coef_qp = 28;
    for (int i = 0; i < 16; i++) coef[i] = 0;
    coef[0] = 1;
    @(negedge clk); coef_valid = 0;
    for (int i = 0; i < 16; i++) chk(res_valid && res[i] == 64, "luma DC transform");
    n_trldc++;
    @(negedge clk); coef_valid = 1; coef_mode = TR_CHROMA_DC;
    @(negedge clk); coef_valid = 0;
    for (int i = 0; i < 4; i++) chk(res_valid && res[i] == 128, "chroma DC transform");
    n_trcdc++;
    @(negedge clk);
    chk(!rec_valid, "a DC result must not be reconstructed");

    // neighbours of the macroblock in the deblocking buffer
    for (int c = 0; c < 3; c++) begin
      int nb;
      nb = (c == 0) ? 5 : 3;
      for (int by = 0; by < nb; by++) for (int bx = 0; bx < nb; bx++) begin
        if (!(bx == 0 || by == 0) || (bx == 0 && by == 0)) continue;
        @(negedge clk);
        db_wr_en = 1; db_wr_comp = comp_e'(c); db_wr_bx = 3'(bx); db_wr_by = 3'(by);
        for (int i = 0; i < 16; i++) begin
          db_wr_data[i] = pix_t'(((c == 0) ? 100 : 118) + 2 * ((bx + by) % 2));
          put(c, 4 * by + i / 4, 4 * bx + i % 4, int'(db_wr_data[i]));
        end
        @(negedge clk); db_wr_en = 0;
      end
    end

    // the 16 luma and 2 x 4 chroma blocks of the macroblock
    for (int by = 0; by < 4; by++) for (int bx = 0; bx < 4; bx++)
      do_block(0, bx, by, (bx + 2 * by) % 3, (bx == 3 && by == 0) ? 4 : (by == 3) ? 3 : (bx + by) % 2);
    for (int c = 1; c < 3; c++)
      for (int by = 0; by < 2; by++) for (int bx = 0; bx < 2; bx++)
        do_block(c, bx, by, (bx + by) % 2, (c == 1) ? 3 : 2);

    run_deblock(1, 1);
    dp_finished = 1;
    run_deblock(0, 1);

    wait (frame_done);
    @(negedge clk);
    n_stall  = int'(overrun_cnt);
    n_frames = int'(frame_cnt);
    chk(late_frames == 0, "a 396-macroblock frame must fit in the frame period");
    chk(n_frames == 1, "one frame decoded");
    chk(n_stall == 1, $sformatf("stalls %0d exp 1", n_stall));
    $display("stalls %0d frames %0d dma packet %0d block %0d itiq 4x4 %0d lumaDC %0d chromaDC %0d",
             n_stall, n_frames, n_dma_packet, n_dma_block, n_tr4x4, n_trldc, n_trcdc);
    $display("intra 16x16/chroma %0d mc from local memory %0d", n_intra16, n_mc_lm);
    $display("intra %0d mc luma %0d mc chroma %0d rec %0d deblocked lines %0d edge skips %0d",
             n_intra, n_mc_luma, n_mc_chroma, n_rec, n_db_lines, n_db_edge_skip);
    chk(n_stall > 0 && n_frames > 0 && n_dma_packet > 0 && n_dma_block > 0 && n_tr4x4 > 0 &&
        n_trldc > 0 && n_trcdc > 0 && n_intra > 0 && n_intra16 > 0 && n_mc_lm > 0 && n_mc_luma > 0 && n_mc_chroma > 0 &&
        n_rec > 0 && n_db_lines > 0 && n_bs_checked > 0 && n_db_edge_skip > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
