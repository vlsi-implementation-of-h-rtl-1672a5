// deblock_mb: deblocking filter engine for one macroblock held in a local buffer.
//
// The buffer holds the current macroblock together with the neighbouring samples the
// filter reaches into: luma is a 20x20 array whose rows 0..3 are the bottom rows of the
// macroblock above and whose columns 0..3 are the right columns of the macroblock to the
// left; the current 16x16 block sits at [4..19][4..19]. Each chroma component is a 12x12
// array laid out the same way around its 8x8 block. Top and left neighbours are changed
// by the filter, as the edges they share with the current macroblock are filtered.
//
// Order of filtering (one line of samples per clock): luma first the four vertical edges
// from left to right, 16 lines each, then the four horizontal edges from top to bottom;
// then Cb and then Cr, each with two vertical and two horizontal edges of eight lines.
// An edge on the left (top) picture boundary, flagged by left_avail/top_avail = 0, is not
// filtered and costs no cycles. A full macroblock takes 192 clocks, 160 at a left or top
// picture edge and 128 at both.
//
// Boundary strength comes from outside: bs_v[e][s] / bs_h[e][s] for luma edge e and
// 4-sample segment s. A chroma edge uses the strength of the luma edge and segment it
// covers. qp_y/qp_c are the luma and chroma QP of this macroblock and are used on its
// internal edges. On edge 0 the filter uses the rounded average with the neighbour's QP,
// (qp + qp_nb + 1) >> 1, where qp_nb is qp_left_* for the left edge and qp_top_* for the
// top edge, as H.264 prescribes for an edge shared by two macroblocks.
//
// Interface: while idle, wr_en writes a 4x4 block wr_data at block coordinates
// (wr_bx, wr_by) of component wr_comp in the extended grid (luma 0..4, chroma 0..2);
// rd_data always shows the 4x4 block at (rd_bx, rd_by) of rd_comp. start begins
// filtering; busy is high until done pulses. The edge order, the left/top reach and
// the picture-edge rule follow the document; the buffer layout, one line per clock,
// external bS and a single QP per macroblock are this design's choices.
module deblock_mb
  import h264_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // buffer access
  input  logic       wr_en,
  input  comp_e      wr_comp,
  input  logic [2:0] wr_bx,
  input  logic [2:0] wr_by,
  input  pix_t       wr_data [16],
  input  comp_e      rd_comp,
  input  logic [2:0] rd_bx,
  input  logic [2:0] rd_by,
  output pix_t       rd_data [16],
  // filter control
  input  logic       start,
  input  logic       left_avail,
  input  logic       top_avail,
  input  logic [5:0] qp_y,
  input  logic [5:0] qp_c,
  input  logic [5:0] qp_left_y,
  input  logic [5:0] qp_left_c,
  input  logic [5:0] qp_top_y,
  input  logic [5:0] qp_top_c,
  input  logic [2:0] bs_v [4][4],
  input  logic [2:0] bs_h [4][4],
  output logic       busy,
  output logic       done,
  output logic [7:0] lines_filtered   // lines changed by the filter in the last run
);

  pix_t y_buf  [20][20];
  pix_t cb_buf [12][12];
  pix_t cr_buf [12][12];

  comp_e      comp;
  logic       dir;      // 0: vertical edges, 1: horizontal edges
  logic [1:0] edge_i;
  logic [3:0] line;

  sint_t rp [4], cp [4], rq [4], cq [4];
  pix_t p [4], q [4], pf [3], qf [3];
  logic [2:0] bs_cur;
  logic [5:0] qp_cur;
  logic [6:0] qp_sum;
  logic       filt;
  logic       last_line, last_edge;

  function automatic pix_t rd_pix(input comp_e c, input int r, input int col,
                                  input pix_t yb [20][20], input pix_t bb [12][12],
                                  input pix_t rb [12][12]);
    case (c)
      COMP_Y:  return yb[r][col];
      COMP_CB: return bb[r][col];
      default: return rb[r][col];
    endcase
  endfunction

  // Sample coordinates of the current line.
  sint_t e0, ln;
  assign e0 = 4 + 4 * int'(edge_i);
  assign ln = 4 + int'(line);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (!dir) begin
        rp[i] = ln;         cp[i] = e0 - 1 - i;
        rq[i] = ln;         cq[i] = e0 + i;
      end else begin
        rp[i] = e0 - 1 - i; cp[i] = ln;
        rq[i] = e0 + i;     cq[i] = ln;
      end
      p[i] = rd_pix(comp, rp[i], cp[i], y_buf, cb_buf, cr_buf);
      q[i] = rd_pix(comp, rq[i], cq[i], y_buf, cb_buf, cr_buf);
    end
    if (comp == COMP_Y) begin
      bs_cur = dir ? bs_h[edge_i][line[3:2]] : bs_v[edge_i][line[3:2]];
      qp_sum = (edge_i != 2'd0) ? {qp_y, 1'b0} : (7'(qp_y) + 7'(dir ? qp_top_y : qp_left_y) + 7'd1);
      qp_cur = qp_sum[6:1];
      last_line = (line == 4'd15);
      last_edge = (edge_i == 2'd3);
    end else begin
      // chroma edge k covers luma edge 2k; chroma line l covers luma segment l/2
      bs_cur = dir ? bs_h[{edge_i[0], 1'b0}][line[2:1]] : bs_v[{edge_i[0], 1'b0}][line[2:1]];
      qp_sum = (edge_i != 2'd0) ? {qp_c, 1'b0} : (7'(qp_c) + 7'(dir ? qp_top_c : qp_left_c) + 7'd1);
      qp_cur = qp_sum[6:1];
      last_line = (line == 4'd7);
      last_edge = (edge_i == 2'd1);
    end
  end

  db_filter u_filter (
    .p(p), .q(q), .bs(bs_cur), .qp(qp_cur), .chroma(comp != COMP_Y),
    .pf(pf), .qf(qf), .filtered(filt)
  );

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        rd_data[r*4+c] = rd_pix(rd_comp, 4 * int'(rd_by) + r, 4 * int'(rd_bx) + c,
                                y_buf, cb_buf, cr_buf);
  end

  // First edge of a direction: edge 0 lies on the picture boundary when the neighbour
  // on that side does not exist.
  function automatic logic [1:0] first_edge(input logic d, input logic la, input logic ta);
    return ((!d && !la) || (d && !ta)) ? 2'd1 : 2'd0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy           <= 1'b0;
      done           <= 1'b0;
      comp           <= COMP_Y;
      dir            <= 1'b0;
      edge_i         <= '0;
      line           <= '0;
      lines_filtered <= '0;
      for (int r = 0; r < 20; r++) for (int c = 0; c < 20; c++) y_buf[r][c] <= '0;
      for (int r = 0; r < 12; r++) for (int c = 0; c < 12; c++) begin
        cb_buf[r][c] <= '0;
        cr_buf[r][c] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (wr_en) begin
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) begin
              case (wr_comp)
                COMP_Y:  y_buf [4*int'(wr_by)+r][4*int'(wr_bx)+c] <= wr_data[r*4+c];
                COMP_CB: cb_buf[4*int'(wr_by)+r][4*int'(wr_bx)+c] <= wr_data[r*4+c];
                default: cr_buf[4*int'(wr_by)+r][4*int'(wr_bx)+c] <= wr_data[r*4+c];
              endcase
            end
        end
        if (start) begin
          busy           <= 1'b1;
          comp           <= COMP_Y;
          dir            <= 1'b0;
          edge_i         <= first_edge(1'b0, left_avail, top_avail);
          line           <= '0;
          lines_filtered <= '0;
        end
      end else begin
        // write back the filtered line
        for (int i = 0; i < 3; i++) begin
          case (comp)
            COMP_Y: begin
              y_buf[rp[i]][cp[i]] <= pf[i];
              y_buf[rq[i]][cq[i]] <= qf[i];
            end
            COMP_CB: begin
              cb_buf[rp[i]][cp[i]] <= pf[i];
              cb_buf[rq[i]][cq[i]] <= qf[i];
            end
            default: begin
              cr_buf[rp[i]][cp[i]] <= pf[i];
              cr_buf[rq[i]][cq[i]] <= qf[i];
            end
          endcase
        end
        if (filt) lines_filtered <= lines_filtered + 8'd1;
        // advance: line, edge, direction, component
        if (!last_line) begin
          line <= line + 4'd1;
        end else begin
          line <= '0;
          if (!last_edge) begin
            edge_i <= edge_i + 2'd1;
          end else if (!dir) begin
            dir    <= 1'b1;
            edge_i <= first_edge(1'b1, left_avail, top_avail);
          end else begin
            dir    <= 1'b0;
            edge_i <= first_edge(1'b0, left_avail, top_avail);
            case (comp)
              COMP_Y:  comp <= COMP_CB;
              COMP_CB: comp <= COMP_CR;
              default: begin
                comp <= COMP_Y;
                busy <= 1'b0;
                done <= 1'b1;
              end
            endcase
          end
        end
      end
    end
  end

endmodule
