// fme_stage: single-iteration fractional motion estimation (SIFME) kernel.
//
// FME refines only the two modes chosen by mode filtering. For every partition
// of those modes it takes the integer MV m found by IME and the quarter-pel MV
// predictor mvp and forms the fractional predicted MV
//     frac_pred = (mvp - 4*m) mod 4,  taken as a signed value in -2..+1
// per component. Six candidates are evaluated in one step, with no second
// refinement round: (0,0), frac_pred and the four quarter-pel diamond
// neighbours of frac_pred. The partition is processed as 4x4 blocks; for each
// block the 10x10 integer patch is read row by row (10 reads), the
// interpolation unit builds the half-pel grid, six quarter-pel selectors and
// six processing units produce six SATDs in one cycle, and these accumulate
// per candidate. At the end of the partition the MV cost is added, the compare
// unit picks the cheapest candidate (lowest index on ties) and the result is
// written to the SB buffer. After both modes the mode with the lower total
// cost (the first on ties) is the final decision.
//
// Reference data come from the level-0 buffer that IME used for the same
// macroblock when m lies inside its [-8,7] window around the integer
// predictor; otherwise the stage requests the partition's (w+6)x(h+6) patch,
// with origin (x0 + m.x - 3, y0 + m.y - 3) relative to the macroblock, to be
// loaded into the second reference SRAM and stalls until sec_done. Patch
// pixels that would lie one pixel outside the level-0 window (only for
// candidates at -3/4 pel when m is at the -8 edge) are replaced by the edge
// pixel.
//
// Timing: start -> per partition 1 setup cycle (plus the stall for a second
// reference load), 12 cycles per 4x4 block and 1 decision cycle -> done
// pulse. Two modes always cover 32 blocks, so a macroblock takes about 390 to
// 420 cycles. Inputs must stay stable while busy; results are held until the
// next start.
//
// Following the published design: the fractional prediction formula, the six
// candidates, six parallel processing units, the compare unit and SB buffer,
// the two-mode decision and reuse of the level-0 window. Choices made here:
// the signed range of the fractional prediction, the 12-cycle-per-4x4-block
// schedule, the second-SRAM request/done handshake, clamping at the window
// edge, and tie-breaking.
module fme_stage
  import me_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [3:0]                 mode_a,
  input  logic [3:0]                 mode_b,
  input  logic [3:0][1:0]            sub_mode,
  input  part_best_t [NPART-1:0]     merged,     // integer MVs per partition
  input  mv_t                        mvp_q,      // quarter-pel predictor
  input  logic [7:0]                 lambda,
  input  pix_t [MB-1:0][MB-1:0]      cur,
  // level-0 buffer (FME bank)
  output logic                       l0_re,
  output logic [5:0]                 l0_row,
  input  pix_t [36:0]                l0_rdata,
  // second reference SRAM
  output logic                       sec_req,
  output logic signed [MV_W-1:0]     sec_x,
  output logic signed [MV_W-1:0]     sec_y,
  input  logic                       sec_done,
  output logic                       sec_re,
  output logic [4:0]                 sec_row,
  input  pix_t [21:0]                sec_rdata,
  // result
  output logic                       busy,
  output logic                       done,
  output logic [3:0]                 best_mode,
  output logic [3:0][1:0]            best_sub,
  output logic [4:0]                 best_npart,
  output mv_t [15:0]                 best_mv,    // quarter-pel, in partition order
  output logic [COST_W-1:0]          best_cost
);
  typedef enum logic [2:0] {S_IDLE, S_PART, S_SEC, S_READ, S_CALC, S_DEC, S_FIN} state_t;
  state_t state;

  typedef struct packed {
    mv_t               mv;
    logic [COST_W-1:0] cost;
  } sb_entry_t;

  sb_entry_t [1:0][15:0]     sb;          // SB buffer [mode slot][partition]
  logic [1:0][COST_W-1:0]    mode_total;
  logic [1:0][4:0]           mode_np;
  logic                      midx;        // 0: mode_a, 1: mode_b
  logic [3:0]                pidx;        // partition within mode
  logic [3:0]                bidx;        // 4x4 block within partition
  logic [3:0]                rcnt;        // patch rows requested
  logic                      rd_pend, rd_src_sec;
  logic [3:0]                rd_r;
  pix_t [9:0][9:0]           patch;
  logic [5:0][COST_W-1:0]    acc;
  logic                      use_sec;

  // ------------------------------------------------------------ partition list
  logic [3:0]        cur_mode;
  logic [15:0][5:0]  plist;
  logic [4:0]        pcount;
  always_comb begin
    cur_mode = midx ? mode_b : mode_a;
    plist    = '0;
    pcount   = '0;
    if (cur_mode == 4'd8) begin
      for (int q = 0; q < 4; q++) begin
        for (int i = 0; i < 4; i++)
          if (i < int'(mode_count(4 + int'(sub_mode[q])))) begin
            plist[pcount] = 6'(mode_first(4 + int'(sub_mode[q]), q) + i);
            pcount = pcount + 1'b1;
          end
      end
    end else begin
      for (int i = 0; i < 2; i++)
        if (i < int'(mode_count(int'(cur_mode)))) begin
          plist[i] = 6'(mode_first(int'(cur_mode), 0) + i);
          pcount   = pcount + 1'b1;
        end
    end
  end

  // ------------------------------------------------------------ current partition
  part_geom_t          g;
  mv_t                 m, cen;
  logic signed [MV_W-1:0] rel_x, rel_y;
  logic signed [2:0]   fpx, fpy;
  logic                in_l0;
  logic [4:0]          bx, by;          // 4x4 block origin in MB
  logic [2:0]          nbw;             // blocks per row of partition
  logic [3:0]          nblk;

  assign cen.x = mvp_q.x >>> 2;
  assign cen.y = mvp_q.y >>> 2;

  always_comb begin
    logic signed [MV_W-1:0] dx, dy;
    g     = part_geom(int'(plist[pidx]));
    m     = merged[plist[pidx]].mv;
    rel_x = m.x - cen.x;
    rel_y = m.y - cen.y;
    in_l0 = (rel_x >= -8) && (rel_x <= 7) && (rel_y >= -8) && (rel_y <= 7);
    dx    = mvp_q.x - (m.x <<< 2);
    dy    = mvp_q.y - (m.y <<< 2);
    fpx   = dx[1] ? 3'(signed'({1'b1, dx[1:0]})) : 3'({1'b0, dx[1:0]});
    fpy   = dy[1] ? 3'(signed'({1'b1, dy[1:0]})) : 3'({1'b0, dy[1:0]});
    nbw   = 3'(g.w >> 2);
    nblk  = 4'((g.w >> 2) * (g.h >> 2) - 1);
    bx    = g.x0 + 5'((bidx % 4'(nbw)) * 4);
    by    = g.y0 + 5'((bidx / 4'(nbw)) * 4);
  end

  // candidate offsets
  typedef logic signed [2:0] off_t;
  off_t [5:0] cfx, cfy;
  always_comb begin
    cfx[0] = 3'sd0;     cfy[0] = 3'sd0;
    cfx[1] = fpx;       cfy[1] = fpy;
    cfx[2] = fpx - 3'sd1; cfy[2] = fpy;
    cfx[3] = fpx + 3'sd1; cfy[3] = fpy;
    cfx[4] = fpx;       cfy[4] = fpy - 3'sd1;
    cfx[5] = fpx;       cfy[5] = fpy + 3'sd1;
  end

  // ------------------------------------------------------------ patch reads
  function automatic logic [5:0] clamp36(input logic signed [MV_W-1:0] v);
    if (v < 0)  return 6'd0;
    if (v > 36) return 6'd36;
    return 6'(v);
  endfunction

  logic signed [MV_W-1:0] l0_r0, l0_c0;   // patch origin in the level-0 bank
  assign l0_r0 = MV_W'(by) + rel_y + 7;
  assign l0_c0 = MV_W'(bx) + rel_x + 7;

  always_comb begin
    l0_re   = 1'b0;
    sec_re  = 1'b0;
    l0_row  = clamp36(l0_r0 + MV_W'(rcnt));
    sec_row = 5'(by - g.y0 + 5'(rcnt));
    if (state == S_READ && rcnt < 10) begin
      if (use_sec) sec_re = 1'b1;
      else         l0_re  = 1'b1;
    end
  end

  assign sec_req = (state == S_SEC);
  assign sec_x   = MV_W'(g.x0) + m.x - 3;
  assign sec_y   = MV_W'(g.y0) + m.y - 3;

  always_ff @(posedge clk)
    if (rd_pend)
      for (int c = 0; c < 10; c++)
        patch[rd_r][c] <= rd_src_sec ? sec_rdata[5'(bx - g.x0) + 5'(c)]
                                     : l0_rdata[clamp36(l0_c0 + MV_W'(c))];

  // ------------------------------------------------------------ datapath
  pix_t [10:0][10:0]  hg;
  pix_t [3:0][3:0]    cur_blk;
  logic [5:0][15:0]   satd;

  fme_interp u_interp (.patch(patch), .hg(hg));

  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        cur_blk[r][c] = cur[by + 5'(r)][bx + 5'(c)];

  for (genvar k = 0; k < 6; k++) begin : g_pu
    pix_t [3:0][3:0] pred;
    logic [3:0][3:0][8:0] resid;
    fme_qpel u_sel (.hg(hg), .fx(cfx[k]), .fy(cfy[k]), .pred(pred));
    fme_pu   u_pu  (.cur(cur_blk), .pred(pred), .resid(resid), .satd(satd[k]));
  end

  // compare unit
  mv_t [5:0]              cmv;
  logic [5:0][15:0]       mvc;
  logic [COST_W-1:0]      dec_cost;
  logic [2:0]             dec_k;
  for (genvar k = 0; k < 6; k++) begin : g_mvc
    assign cmv[k].x = (m.x <<< 2) + MV_W'(cfx[k]);
    assign cmv[k].y = (m.y <<< 2) + MV_W'(cfy[k]);
    mv_cost u_mvc (.mv(cmv[k]), .mvp(mvp_q), .lambda(lambda), .cost(mvc[k]));
  end
  always_comb begin
    dec_cost = acc[0] + COST_W'(mvc[0]);
    dec_k    = 3'd0;
    for (int k = 1; k < 6; k++)
      if (acc[k] + COST_W'(mvc[k]) < dec_cost) begin
        dec_cost = acc[k] + COST_W'(mvc[k]);
        dec_k    = 3'(k);
      end
  end

  // ------------------------------------------------------------ control
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      midx       <= 1'b0;
      pidx       <= '0;
      bidx       <= '0;
      rcnt       <= '0;
      rd_pend    <= 1'b0;
      rd_src_sec <= 1'b0;
      rd_r       <= '0;
      acc        <= '0;
      use_sec    <= 1'b0;
      sb         <= '0;
      mode_total <= '0;
      mode_np    <= '0;
      done       <= 1'b0;
      best_mode  <= '0;
      best_sub   <= '0;
      best_npart <= '0;
      best_mv    <= '0;
      best_cost  <= '0;
    end else begin
      done       <= 1'b0;
      rd_pend    <= l0_re || sec_re;
      rd_src_sec <= sec_re;
      rd_r       <= rcnt;
      case (state)
        S_IDLE: if (start) begin
          midx       <= 1'b0;
          pidx       <= '0;
          mode_total <= '0;
          state      <= S_PART;
        end
        S_PART: begin
          acc     <= '0;
          bidx    <= '0;
          rcnt    <= '0;
          use_sec <= !in_l0;
          state   <= in_l0 ? S_READ : S_SEC;
        end
        S_SEC: if (sec_done) state <= S_READ;
        S_READ: begin
          if (rcnt < 10) rcnt <= rcnt + 1'b1;
          else state <= S_CALC;   // last row is captured at this edge
        end
        S_CALC: begin
          for (int k = 0; k < 6; k++) acc[k] <= acc[k] + COST_W'(satd[k]);
          rcnt <= '0;
          if (bidx == nblk) state <= S_DEC;
          else begin
            bidx  <= bidx + 1'b1;
            state <= S_READ;
          end
        end
        S_DEC: begin
          sb[midx][pidx].mv   <= cmv[dec_k];
          sb[midx][pidx].cost <= dec_cost;
          mode_total[midx]    <= mode_total[midx] + dec_cost;
          if (5'(pidx) + 1'b1 == pcount) begin
            mode_np[midx] <= pcount;
            pidx <= '0;
            if (midx) state <= S_FIN;
            else begin
              midx  <= 1'b1;
              state <= S_PART;
            end
          end else begin
            pidx  <= pidx + 1'b1;
            state <= S_PART;
          end
        end
        S_FIN: begin
          logic pick;
          pick = (mode_total[1] < mode_total[0]);
          best_mode  <= pick ? mode_b : mode_a;
          best_sub   <= sub_mode;
          best_npart <= mode_np[pick];
          for (int i = 0; i < 16; i++) best_mv[i] <= sb[pick][i].mv;
          best_cost  <= mode_total[pick];
          done       <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
