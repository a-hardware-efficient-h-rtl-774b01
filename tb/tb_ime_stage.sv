// tb_ime_stage: the whole IME kernel (three levels plus mode filtering) on the
// synthetic frame. A brute-force reference searches every level, merges the
// levels per partition, evaluates the mode costs and picks the two modes the
// same way the design is specified to; the test compares modes, sub-modes and
// all 41 merged MVs/SADs, and checks the stage latency (level 0's 16+1 fill
// cycles, 256 search cycles, 2 pipeline cycles, 1 mode-selection cycle).
// Scenarios cover wins by each level and a macroblock whose quadrants move
// differently (8x8 mode).
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_ime_stage;
  import me_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  int win_l0 = 0, win_l1 = 0, win_l2 = 0, sel8 = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  pix_t [MB-1:0][MB-1:0] cur;
  mv_t mvp_q;
  int mbx, mby, cx, cy;
  logic l0_re, l1_re, l2_re;
  logic [5:0] l0_row, l1_row;
  logic [6:0] l2_row;
  pix_t [36:0] l0_rdata;
  logic [39:0][5:0] l1_rdata;
  logic [67:0][5:0] l2_rdata;
  logic [3:0] mode_a, mode_b;
  logic [3:0][1:0] sub_mode;
  part_best_t [NPART-1:0] merged;
  logic [1:0] src_lvl0;

  ime_stage dut (.*);

  always_ff @(posedge clk) begin
    if (l0_re) for (int k = 0; k < 37; k++)
      l0_rdata[k] <= 8'(fpix(mbx + cx - 10 + k, mby + cy - 10 + int'(l0_row)));
    if (l1_re) for (int k = 0; k < 40; k++)
      l1_rdata[k] <= 6'(fpix(mbx - 32 + 2*k, mby - 32 + 2*int'(l1_row)) >> 2);
    if (l2_re) for (int k = 0; k < 68; k++)
      l2_rdata[k] <= 6'(fpix(mbx - 128 + 4*k, mby - 128 + 4*int'(l2_row)) >> 2);
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bs [3][NPART], bx [3][NPART], by [3][NPART];

  task automatic ref_level(input int lv);
    int sub, npos, np, off, sh;
    sub = 1 << lv; npos = 16 * sub; off = 8 * sub * sub;
    np = (lv == 0) ? 41 : (lv == 1) ? 9 : 1;
    sh = (lv == 0) ? 0 : 2 * lv + 2;
    for (int p = 0; p < NPART; p++) bs[lv][p] = -1;
    for (int dy = 0; dy < npos; dy++)
      for (int dx = 0; dx < npos; dx++) begin
        int ox, oy;
        ox = ((lv == 0) ? cx : 0) + sub * dx - off;
        oy = ((lv == 0) ? cy : 0) + sub * dy - off;
        for (int p = 0; p < np; p++) begin
          part_geom_t g;
          int s;
          g = part_geom(p);
          s = 0;
          for (int r = int'(g.y0); r < int'(g.y0 + g.h); r += sub)
            for (int c = int'(g.x0); c < int'(g.x0 + g.w); c += sub) begin
              int a, b;
              a = int'(cur[r][c]);
              b = fpix(mbx + ox + c, mby + oy + r);
              if (lv > 0) begin a = a >> 2; b = b >> 2; end
              s += (a > b) ? a - b : b - a;
            end
          s = s << sh;
          if (bs[lv][p] < 0 || s < bs[lv][p]) begin bs[lv][p] = s; bx[lv][p] = ox; by[lv][p] = oy; end
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int qx [4], qy [4], ms [NPART], mx [NPART], my [NPART], cost [9], sm [4], ea, eb, cyc, lv0;
      mbx = 16 * $urandom_range(0, 40); mby = 16 * $urandom_range(0, 40);
      mvp_q.x = MV_W'($urandom_range(0, 80) - 40);
      mvp_q.y = MV_W'($urandom_range(0, 80) - 40);
      cx = int'(mvp_q.x) >>> 2; cy = int'(mvp_q.y) >>> 2;
      for (int q = 0; q < 4; q++) begin
        case (t)
          0: begin qx[q] = cx + 3; qy[q] = cy - 5; end                 // level 0 range
          1: begin qx[q] = 22; qy[q] = -30; end                        // level 1 only
          2: begin qx[q] = 100; qy[q] = -72; end                       // level 2 only
          3: begin qx[q] = cx - 7 + 4 * q; qy[q] = cy + 2 - q; end      // quadrants differ
          4: begin qx[q] = cx + q; qy[q] = cy - q; end
          default: begin qx[q] = 1000 + q; qy[q] = 999; end
        endcase
      end
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        int q;
        q = 2 * (r / 8) + (c / 8);
        cur[r][c] = 8'(fpix(mbx + qx[q] + c, mby + qy[q] + r));
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc - 1 != 17 + 256 + 2 + 1) begin failures++; $display("IME stage took %0d cycles", cyc); end
      ref_level(0); ref_level(1); ref_level(2);
      // merge
      for (int p = 0; p < NPART; p++) begin
        ms[p] = bs[0][p]; mx[p] = bx[0][p]; my[p] = by[0][p];
        if (p <= 8 && bs[1][p] < ms[p]) begin ms[p] = bs[1][p]; mx[p] = bx[1][p]; my[p] = by[1][p]; end
      end
      lv0 = (ms[0] == bs[0][0] && mx[0] == bx[0][0] && my[0] == by[0][0]) ? 0 : 1;
      if (bs[2][0] < ms[0]) begin ms[0] = bs[2][0]; mx[0] = bx[2][0]; my[0] = by[2][0]; lv0 = 2; end
      cost[1] = ms[0]; cost[2] = ms[1] + ms[2]; cost[3] = ms[3] + ms[4]; cost[8] = 0;
      for (int q = 0; q < 4; q++) begin
        int sc [4], b;
        sc[0] = ms[5+q];
        sc[1] = ms[9+2*q] + ms[10+2*q];
        sc[2] = ms[17+2*q] + ms[18+2*q];
        sc[3] = ms[25+4*q] + ms[26+4*q] + ms[27+4*q] + ms[28+4*q];
        b = 0;
        for (int k = 1; k < 4; k++) if (sc[k] < sc[b]) b = k;
        sm[q] = b; cost[8] += sc[b];
      end
      ea = 1;
      for (int k = 2; k <= 3; k++) if (cost[k] < cost[ea]) ea = k;
      eb = -1;
      foreach (cost[k]) if ((k inside {1, 2, 3, 8}) && k != ea)
        if (eb < 0 || cost[k] < cost[eb]) eb = k;
      checks += 3;
      if (int'(mode_a) != ea) failures++;
      if (int'(mode_b) != eb) failures++;
      if (int'(src_lvl0) != lv0) failures++;
      for (int q = 0; q < 4; q++) begin checks++; if (int'(sub_mode[q]) != sm[q]) failures++; end
      for (int p = 0; p < NPART; p++) begin
        checks++;
        if (int'(merged[p].sad) != ms[p] || int'(merged[p].mv.x) != mx[p] || int'(merged[p].mv.y) != my[p]) begin
          failures++;
          if (failures < 6) $display("t=%0d part %0d: got %0d (%0d,%0d) exp %0d (%0d,%0d)", t, p,
                                     merged[p].sad, merged[p].mv.x, merged[p].mv.y, ms[p], mx[p], my[p]);
        end
      end
      if (lv0 == 0) win_l0++; else if (lv0 == 1) win_l1++; else win_l2++;
      if (eb == 8) sel8++;
      $display("scenario %0d: modes %0d/%0d, 16x16 from level %0d, mv (%0d,%0d)", t, mode_a, mode_b, lv0, mx[0], my[0]);
    end
    $display("16x16 winners: level0 %0d level1 %0d level2 %0d; mode 8 selected %0d", win_l0, win_l1, win_l2, sel8);
    if (win_l0 == 0 || win_l1 == 0 || win_l2 == 0 || sel8 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
