// tb_ime_level: the three search levels side by side on the synthetic frame.
// The testbench models each level's reference buffer (registered row reads:
// 37-sample level-0 rows around the predictor, 6-bit subsampled level-1/2
// rows) and compares every partition's best SAD and MV with a brute-force
// full search of the same window (first position in raster order wins ties).
// Scenarios: exact motion inside each level's range and unrelated content.
// Also checks the cycle count: a window fill of BLK+1 cycles, 256 search
// cycles and 2 pipeline cycles.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_ime_level;
  import me_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  pix_t [MB-1:0][MB-1:0] cur;
  mv_t center;
  int mbx, mby;

  logic rd0, rd1, rd2;
  logic [5:0] row0, row1;
  logic [6:0] row2;
  pix_t [36:0] data0;
  logic [39:0][5:0] data1;
  logic [67:0][5:0] data2;
  logic [2:0] busy, done;
  part_best_t [NPART-1:0] best0, best1, best2;

  ime_level #(.LEVEL(0)) u0 (.clk, .rst_n, .start, .cur, .center, .rd_en(rd0), .rd_row(row0),
                             .rd_data(data0), .busy(busy[0]), .done(done[0]), .best(best0));
  ime_level #(.LEVEL(1)) u1 (.clk, .rst_n, .start, .cur, .center, .rd_en(rd1), .rd_row(row1),
                             .rd_data(data1), .busy(busy[1]), .done(done[1]), .best(best1));
  ime_level #(.LEVEL(2)) u2 (.clk, .rst_n, .start, .cur, .center, .rd_en(rd2), .rd_row(row2),
                             .rd_data(data2), .busy(busy[2]), .done(done[2]), .best(best2));

  // buffer models
  always_ff @(posedge clk) begin
    if (rd0) for (int k = 0; k < 37; k++)
      data0[k] <= 8'(fpix(mbx + center.x - 10 + k, mby + center.y - 10 + int'(row0)));
    if (rd1) for (int k = 0; k < 40; k++)
      data1[k] <= 6'(fpix(mbx - 32 + 2*k, mby - 32 + 2*int'(row1)) >> 2);
    if (rd2) for (int k = 0; k < 68; k++)
      data2[k] <= 6'(fpix(mbx - 128 + 4*k, mby - 128 + 4*int'(row2)) >> 2);
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // brute-force reference of one level
  task automatic check_level(input int lv, input part_best_t [NPART-1:0] got);
    int sub, npos, np, off, sh;
    int bs [NPART], bx [NPART], by [NPART];
    sub = 1 << lv; npos = 16 * sub; off = 8 * sub * sub;
    np = (lv == 0) ? 41 : (lv == 1) ? 9 : 1;
    sh = (lv == 0) ? 0 : 2 * lv + 2;
    for (int p = 0; p < np; p++) bs[p] = -1;
    for (int dy = 0; dy < npos; dy++)
      for (int dx = 0; dx < npos; dx++) begin
        int ox, oy;
        ox = ((lv == 0) ? int'(center.x) : 0) + sub * dx - off;
        oy = ((lv == 0) ? int'(center.y) : 0) + sub * dy - off;
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
          if (bs[p] < 0 || s < bs[p]) begin bs[p] = s; bx[p] = ox; by[p] = oy; end
        end
      end
    for (int p = 0; p < np; p++) begin
      checks++;
      if (int'(got[p].sad) != bs[p] || int'(got[p].mv.x) != bx[p] || int'(got[p].mv.y) != by[p]) begin
        failures++;
        if (failures < 6)
          $display("level %0d part %0d: got sad %0d mv (%0d,%0d), expected %0d (%0d,%0d)",
                   lv, p, got[p].sad, got[p].mv.x, got[p].mv.y, bs[p], bx[p], by[p]);
      end
    end
  endtask

  initial begin
    int cyc [3];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int tx, ty;
      mbx = 16 * $urandom_range(0, 40); mby = 16 * $urandom_range(0, 40);
      center.x = MV_W'($urandom_range(0, 40) - 20);
      center.y = MV_W'($urandom_range(0, 40) - 20);
      case (t)
        0: begin tx = center.x + $urandom_range(0, 15) - 8; ty = center.y + $urandom_range(0, 15) - 8; end
        1: begin tx = 2 * ($urandom_range(0, 31) - 16); ty = 2 * ($urandom_range(0, 31) - 16); end
        2: begin tx = 4 * ($urandom_range(0, 63) - 32); ty = 4 * ($urandom_range(0, 63) - 32); end
        3: begin tx = 0; ty = 0; end
        default: begin tx = 1000; ty = 1000; end   // unrelated content
      endcase
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
        cur[r][c] = 8'(fpix(mbx + tx + c, mby + ty + r));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = '{1, 1, 1};
      while (busy != 0) begin
        @(negedge clk);
        for (int l = 0; l < 3; l++) if (busy[l]) cyc[l]++;
      end
      // busy falls with done: cycles from the start edge to the done edge
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (cyc[l] != (16 >> l) + 1 + 256 + 2) begin
          failures++;
          $display("level %0d took %0d cycles", l, cyc[l]);
        end
      end
      check_level(0, best0);
      check_level(1, best1);
      check_level(2, best2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
