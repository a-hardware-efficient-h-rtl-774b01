// tb_fme_stage: the SIFME kernel on the synthetic frame. Each macroblock is
// built from quarter-pel-shifted reference texture (a different sub-pel
// motion per quadrant). The testbench supplies the two modes, sub-modes and
// integer MVs (as IME would), models the level-0 bank and the second reference
// SRAM, and compares the chosen mode, the quarter-pel MV of every partition and
// the total cost with a reference that evaluates the six candidates of each
// partition using H.264 quarter-pel samples, Hadamard SATD and the
// Exp-Golomb MV cost. It checks the cycle count (per partition 2 cycles plus 12
// per 4x4 block, plus the stall while the second SRAM is loaded, plus 1),
// that without stalls it stays within the 432-cycle worst case, and that both the level-0 path and the second-SRAM path were used.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_fme_stage;
  import me_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  int n_sec = 0, n_l0 = 0, n_frac = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [3:0] mode_a, mode_b;
  logic [3:0][1:0] sub_mode;
  part_best_t [NPART-1:0] merged;
  mv_t mvp_q;
  logic [7:0] lambda;
  pix_t [MB-1:0][MB-1:0] cur;
  logic l0_re, sec_req, sec_done = 0, sec_re, busy, done;
  logic [5:0] l0_row;
  logic [4:0] sec_row;
  pix_t [36:0] l0_rdata;
  pix_t [21:0] sec_rdata;
  logic signed [MV_W-1:0] sec_x, sec_y;
  logic [3:0] best_mode;
  logic [3:0][1:0] best_sub;
  logic [4:0] best_npart;
  mv_t [15:0] best_mv;
  logic [COST_W-1:0] best_cost;

  fme_stage dut (.*);

  int mbx, mby, cx, cy, sox, soy;

  always_ff @(posedge clk) begin
    if (l0_re) for (int k = 0; k < 37; k++)
      l0_rdata[k] <= 8'(fpix(mbx + cx - 10 + k, mby + cy - 10 + int'(l0_row)));
    if (sec_re) for (int k = 0; k < 22; k++)
      sec_rdata[k] <= 8'(fpix(mbx + sox + k, mby + soy + int'(sec_row)));
  end

  // second SRAM "loader": latch the patch origin, answer after a few cycles
  int sec_cycles;
  initial begin
    forever begin
      @(negedge clk);
      if (sec_req && !sec_done) begin
        sox = int'(sec_x); soy = int'(sec_y);
        n_sec++;
        repeat (4) @(negedge clk);
        sec_done = 1;
        @(negedge clk);
        sec_done = 0;
      end
    end
  end
  always @(posedge clk) if (sec_req) sec_cycles++;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // partitions of a mode (1..3 or 8 with sub-modes)
  function automatic int plist(input int mode, input int sm [4], output int lst [16]);
    int n;
    n = 0;
    if (mode != 8) begin
      for (int i = 0; i < int'(mode_count(mode)); i++) lst[n++] = mode_first(mode, 0) + i;
    end else begin
      for (int q = 0; q < 4; q++)
        for (int i = 0; i < int'(mode_count(4 + sm[q])); i++) lst[n++] = mode_first(4 + sm[q], q) + i;
    end
    return n;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int tqx [4], tqy [4], sm [4], modes [2], lst [16], np [2], total [2], emv [2][16][2];
      int pick, cyc, exp_cyc, nblk_all;
      mbx = 16 * $urandom_range(0, 30); mby = 16 * $urandom_range(0, 30);
      mvp_q.x = MV_W'($urandom_range(0, 60) - 30);
      mvp_q.y = MV_W'($urandom_range(0, 60) - 30);
      cx = int'(mvp_q.x) >>> 2; cy = int'(mvp_q.y) >>> 2;
      lambda = 8'($urandom_range(0, 12));
      for (int q = 0; q < 4; q++) begin
        tqx[q] = 4 * cx + $urandom_range(0, 40) - 20;
        tqy[q] = 4 * cy + $urandom_range(0, 40) - 20;
        if (t % 3 == 2 && q == 0) begin tqx[q] = 4 * (cx + 40) + 1; tqy[q] = 4 * (cy - 30) + 2; end
      end
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        int q;
        q = 2 * (r / 8) + (c / 8);
        cur[r][c] = 8'(qsample(4 * (mbx + c) + tqx[q], 4 * (mby + r) + tqy[q]));
      end
      // integer MVs: nearest integer position of the quadrant motion of the
      // partition's top-left pixel, kept one pixel away from the window edge
      for (int p = 0; p < NPART; p++) begin
        part_geom_t g;
        int q, ix, iy;
        g = part_geom(p);
        q = 2 * (g.y0 / 8) + (g.x0 / 8);
        ix = (tqx[q] + 2) >>> 2; iy = (tqy[q] + 2) >>> 2;
        if (ix - cx < 40) begin
          if (ix - cx < -7) ix = cx - 7; if (ix - cx > 7) ix = cx + 7;
          if (iy - cy < -7) iy = cy - 7; if (iy - cy > 7) iy = cy + 7;
        end
        merged[p].mv.x = MV_W'(ix); merged[p].mv.y = MV_W'(iy);
        merged[p].sad  = '0;
      end
      mode_a = 4'($urandom_range(1, 3));
      mode_b = (t % 2 == 0) ? 4'd8 : ((mode_a == 4'd1) ? 4'd3 : 4'd1);
      for (int q = 0; q < 4; q++) begin sm[q] = $urandom_range(0, 3); sub_mode[q] = 2'(sm[q]); end
      modes[0] = mode_a; modes[1] = mode_b;
      // reference
      nblk_all = 0;
      for (int mi = 0; mi < 2; mi++) begin
        np[mi] = plist(modes[mi], sm, lst);
        total[mi] = 0;
        for (int i = 0; i < np[mi]; i++) begin
          part_geom_t g;
          int mx, my, fx, fy, cfx [6], cfy [6], best, bk;
          g = part_geom(lst[i]);
          mx = merged[lst[i]].mv.x; my = merged[lst[i]].mv.y;
          fx = (((int'(mvp_q.x) - 4 * mx) % 4) + 4) % 4; if (fx >= 2) fx -= 4;
          fy = (((int'(mvp_q.y) - 4 * my) % 4) + 4) % 4; if (fy >= 2) fy -= 4;
          cfx = '{0, fx, fx - 1, fx + 1, fx, fx};
          cfy = '{0, fy, fy, fy, fy - 1, fy + 1};
          best = -1; bk = 0;
          for (int k = 0; k < 6; k++) begin
            int cost;
            cost = int'(lambda) * (se_len(4 * mx + cfx[k] - int'(mvp_q.x)) + se_len(4 * my + cfy[k] - int'(mvp_q.y)));
            for (int by = int'(g.y0); by < int'(g.y0 + g.h); by += 4)
              for (int bx = int'(g.x0); bx < int'(g.x0 + g.w); bx += 4) begin
                int d [16];
                for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
                  d[4*r + c] = int'(cur[by + r][bx + c])
                             - qsample(4 * (mbx + bx + c + mx) + cfx[k], 4 * (mby + by + r + my) + cfy[k]);
                cost += satd4(d);
              end
            if (best < 0 || cost < best) begin best = cost; bk = k; end
          end
          emv[mi][i][0] = 4 * mx + cfx[bk]; emv[mi][i][1] = 4 * my + cfy[bk];
          if (bk != 0) n_frac++;
          total[mi] += best;
          nblk_all += (g.w / 4) * (g.h / 4);
        end
      end
      pick = (total[1] < total[0]) ? 1 : 0;
      // run
      sec_cycles = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      exp_cyc = 2 * (np[0] + np[1]) + 12 * nblk_all + 1 + sec_cycles;
      checks++;
      if (cyc - 1 != exp_cyc) begin failures++; $display("t=%0d cycles %0d expected %0d", t, cyc - 1, exp_cyc); end
      // without second-SRAM stalls a macroblock must fit the 432-cycle worst case
      checks++;
      if (cyc - 1 - sec_cycles > 432) begin failures++; $display("t=%0d %0d cycles exceed 432", t, cyc - 1 - sec_cycles); end
      checks += 3;
      if (int'(best_mode) != modes[pick]) failures++;
      if (int'(best_npart) != np[pick]) failures++;
      if (int'(best_cost) != total[pick]) begin
        failures++;
        $display("t=%0d cost %0d expected %0d (totals %0d %0d)", t, best_cost, total[pick], total[0], total[1]);
      end
      for (int i = 0; i < np[pick]; i++) begin
        checks++;
        if (int'(best_mv[i].x) != emv[pick][i][0] || int'(best_mv[i].y) != emv[pick][i][1]) begin
          failures++;
          if (failures < 8) $display("t=%0d part %0d mv (%0d,%0d) expected (%0d,%0d)", t, i,
                                     best_mv[i].x, best_mv[i].y, emv[pick][i][0], emv[pick][i][1]);
        end
      end
      if (sec_cycles == 0) n_l0++;
      $display("t=%0d modes %0d/%0d -> %0d, %0d partitions, %0d cycles, second-SRAM stall %0d cycles",
               t, mode_a, mode_b, best_mode, best_npart, cyc - 1, sec_cycles);
    end
    $display("second-SRAM loads %0d, level-0-only macroblocks %0d, fractional winners %0d", n_sec, n_l0, n_frac);
    if (n_sec == 0 || n_l0 == 0 || n_frac == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
