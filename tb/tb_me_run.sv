// tb_me_run: end-to-end run of the motion-estimation engine, shared by the
// full-size bench (tb_me_top, default 6-bit coarse samples, the 1080p buffer
// budget) and tb_me_top_720p (5-bit coarse samples, the 720p budget). TRUNC_W
// only selects which of the two configurations is built; the stimulus and the
// expected results are the same. The enclosing bench owns the watchdog.
//
// The bench plays the external memory controller: for each macroblock it loads the current block and the level-0 window into the
// free bank while both stages are still working on earlier macroblocks,
// writes the level-1/2 windows (whole windows at an MB-row start, 8- and
// 4-column strips into the circular buffers otherwise) once IME is idle,
// answers second-reference-SRAM requests, and issues mb_go. Eight macroblocks
// on two MB rows, then one drain step.
// Macroblock contents are built so the outcome is known exactly:
//   A  whole MB moved by an integer MV inside the level-0 range -> mode 1,
//      MV found by level 0, FME served from the shared level-0 bank
//   B  large MV reachable only by level 2 -> FME needs a second-SRAM load
//   C  four quadrants with different small MVs -> mode 8 selected in IME and
//      chosen by FME with four 8x8 partitions
//   D  medium MV reachable by level 1 (not level 0 or 2) -> second-SRAM load
// The expected decision is the mode with zero SATD and the cost is the MV rate
// cost alone. Every mechanism (bank rotation, level-1 win, level-2 win,
// second-SRAM stall, level-0 sharing, mode 8, circular strip update, row
// restart, drain) is counted and must occur at least once.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_me_run #(
  parameter int unsigned TRUNC_W = 6
);
  import me_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NMB = 8;
  localparam int X0 = 400, Y0 = 320;

  logic cur_we = 0, l0_we = 0, l1_we = 0, l2_we = 0, sec_we = 0;
  logic [3:0] cur_row;
  pix_t [15:0] cur_data, l0_data, l1_data, l2_data, sec_data;
  logic [5:0] l0_row, l0_col, l1_row, l1_col;
  logic [6:0] l2_row, l2_col;
  logic [4:0] sec_wrow, sec_wcol;
  logic [15:0] l0_mask, l1_mask, l2_mask, sec_mask;
  logic sec_req, sec_done = 0;
  logic signed [MV_W-1:0] sec_x, sec_y;
  logic [5:0] l1_base;
  logic [6:0] l2_base;
  logic mb_go = 0, mb_valid = 0, mb_row_start = 0, ready, ime_done, fme_done;
  mv_t mvp_q;
  logic [7:0] lambda = 8'd3;
  logic [3:0] ime_mode_a, ime_mode_b, best_mode;
  logic [3:0][1:0] best_sub;
  logic [4:0] best_npart;
  mv_t [15:0] best_mv;
  logic [COST_W-1:0] best_cost;

  // The default configuration is built without any parameter override.
  if (TRUNC_W == 6) begin : g_dut
    me_top dut (.*);
  end else begin : g_dut
    me_top #(.TRUNC_W(TRUNC_W)) dut (.*);
  end

  // macroblock descriptions
  int mb_x [NMB], mb_y [NMB], mvp_x [NMB], mvp_y [NMB], kind [NMB];
  int qmx [NMB][4], qmy [NMB][4];
  int cnt_swap = 0, cnt_sec = 0, cnt_share = 0, cnt_l1 = 0, cnt_l2 = 0, cnt_m8 = 0;
  int cnt_strip = 0, cnt_rowstart = 0, cnt_drain = 0, n_done = 0;
  int fme_mb = -1, nxt_fme_mb = -1;

  function automatic bit row_start(input int k);
    return (k == 0) || (k == 6);
  endfunction


  // ------------------------------------------------------------ loaders
  task automatic load_cur(input int k);
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      cur_we = 1; cur_row = 4'(r);
      for (int c = 0; c < 16; c++) begin
        int q;
        q = 2 * (r / 8) + (c / 8);
        cur_data[c] = 8'(fpix(mb_x[k] + qmx[k][q] + c, mb_y[k] + qmy[k][q] + r));
      end
    end
    @(negedge clk); cur_we = 0;
  endtask

  task automatic load_l0(input int k);
    int ox, oy;
    ox = mb_x[k] + (mvp_x[k] >>> 2) - 10; oy = mb_y[k] + (mvp_y[k] >>> 2) - 10;
    for (int r = 0; r < 37; r++)
      for (int c = 0; c < 37; c += 16) begin
        @(negedge clk);
        l0_we = 1; l0_row = 6'(r); l0_col = 6'(c);
        for (int i = 0; i < 16; i++) begin
          l0_mask[i] = (c + i < 37);
          l0_data[i] = 8'(fpix(ox + c + i, oy + r));
        end
      end
    @(negedge clk); l0_we = 0;
  endtask

  // level-1/2 windows: logical column j of the window of MB k is stored at
  // physical column (base + j) mod COLS
  task automatic load_l12(input int k, input int b1, input int b2);
    int j0_1, j0_2;
    j0_1 = row_start(k) ? 0 : 31;
    j0_2 = row_start(k) ? 0 : 63;
    for (int r = 0; r < 39; r++)
      for (int j = j0_1; j < 39; j += 16) begin
        @(negedge clk);
        l1_we = 1; l1_row = 6'(r); l1_col = 6'((b1 + j) % 40);
        for (int i = 0; i < 16; i++) begin
          l1_mask[i] = (j + i < 39);
          l1_data[i] = 8'(fpix(mb_x[k] - 32 + 2 * (j + i), mb_y[k] - 32 + 2 * r));
        end
      end
    @(negedge clk); l1_we = 0;
    for (int r = 0; r < 67; r++)
      for (int j = j0_2; j < 67; j += 16) begin
        @(negedge clk);
        l2_we = 1; l2_row = 7'(r); l2_col = 7'((b2 + j) % 68);
        for (int i = 0; i < 16; i++) begin
          l2_mask[i] = (j + i < 67);
          l2_data[i] = 8'(fpix(mb_x[k] - 128 + 4 * (j + i), mb_y[k] - 128 + 4 * r));
        end
      end
    @(negedge clk); l2_we = 0;
  endtask

  // second reference SRAM service
  initial begin
    forever begin
      @(negedge clk);
      if (sec_req && !sec_done) begin
        int ox, oy;
        ox = mb_x[fme_mb] + int'(sec_x); oy = mb_y[fme_mb] + int'(sec_y);
        cnt_sec++;
        for (int r = 0; r < 22; r++)
          for (int c = 0; c < 22; c += 16) begin
            sec_we = 1; sec_wrow = 5'(r); sec_wcol = 5'(c);
            for (int i = 0; i < 16; i++) begin
              sec_mask[i] = (c + i < 22);
              sec_data[i] = 8'(fpix(ox + c + i, oy + r));
            end
            @(negedge clk);
          end
        sec_we = 0; sec_done = 1;
        @(negedge clk);
        sec_done = 0;
      end
    end
  end

  // ------------------------------------------------------------ checker
  bit ime_fin;
  int expected_sec [NMB];
  always @(posedge clk) if (ime_done) ime_fin <= 1'b1;

  always @(negedge clk) begin
    if (fme_done) begin
      int k, emode, ecost, np, exp_mv [4][2];
      k = fme_mb;
      n_done++;
      if (kind[k] == 2) begin
        emode = 8; np = 4;
        for (int q = 0; q < 4; q++) begin exp_mv[q][0] = 4 * qmx[k][q]; exp_mv[q][1] = 4 * qmy[k][q]; end
      end else begin
        emode = 1; np = 1;
        exp_mv[0][0] = 4 * qmx[k][0]; exp_mv[0][1] = 4 * qmy[k][0];
      end
      ecost = 0;
      for (int i = 0; i < np; i++)
        ecost += int'(lambda) * (se_len(exp_mv[i][0] - mvp_x[k]) + se_len(exp_mv[i][1] - mvp_y[k]));
      checks += 3;
      if (int'(best_mode) != emode) failures++;
      if (int'(best_npart) != np) failures++;
      if (int'(best_cost) != ecost) failures++;
      if (emode == 8) begin
        checks++;
        if (best_sub != '0) failures++;
        cnt_m8++;
      end
      for (int i = 0; i < np; i++) begin
        checks++;
        if (int'(best_mv[i].x) != exp_mv[i][0] || int'(best_mv[i].y) != exp_mv[i][1]) failures++;
      end
      $display("MB %0d (kind %s): mode %0d, %0d partitions, mv0 (%0d,%0d), cost %0d (expected mode %0d mv0 (%0d,%0d) cost %0d)",
               k, (kind[k] == 0) ? "A" : (kind[k] == 1) ? "B" : (kind[k] == 2) ? "C" : "D",
               best_mode, best_npart, int'(best_mv[0].x), int'(best_mv[0].y), best_cost, emode, exp_mv[0][0], exp_mv[0][1], ecost);
    end
  end

  // partitions that FME serves from the shared level-0 bank
  always @(negedge clk)
    if (g_dut.dut.u_fme.state == g_dut.dut.u_fme.S_PART && g_dut.dut.u_fme.in_l0) cnt_share++;

  // IME-side statistics: the level that wins the 16x16 partition
  always @(negedge clk) begin
    if (g_dut.dut.u_ime.done) begin
      case (g_dut.dut.u_ime.src_lvl0)
        2'd1: cnt_l1++;
        2'd2: cnt_l2++;
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------ main sequence
  initial begin
    int b1, b2, sec_before, t_go, t_prev;
    for (int k = 0; k < NMB; k++) begin
      kind[k] = k % 4;
      mb_x[k] = X0 + 16 * ((k < 6) ? k : k - 6);
      mb_y[k] = Y0 + 16 * ((k < 6) ? 0 : 1);
      mvp_x[k] = $urandom_range(0, 16) - 8;
      mvp_y[k] = $urandom_range(0, 16) - 8;
      for (int q = 0; q < 4; q++) begin
        int cx, cy;
        cx = mvp_x[k] >>> 2; cy = mvp_y[k] >>> 2;
        case (kind[k])
          0: begin qmx[k][q] = cx + 5; qmy[k][q] = cy - 3; end
          1: begin qmx[k][q] = 76; qmy[k][q] = -60; end
          2: begin qmx[k][q] = cx - 6 + 3 * q; qmy[k][q] = cy + 4 - 2 * q; end
          default: begin qmx[k][q] = 24; qmy[k][q] = -18; end
        endcase
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // first macroblock
    load_cur(0); load_l0(0); load_l12(0, 0, 0);
    b1 = 0; b2 = 0;
    t_prev = 0;
    for (int k = 0; k <= NMB; k++) begin
      // k = macroblock entering IME now (k == NMB: drain)
      while (!ready) @(negedge clk);
      mb_go = 1; mb_valid = (k < NMB); mb_row_start = (k < NMB) && row_start(k);
      if (k < NMB) begin mvp_q.x = MV_W'(mvp_x[k]); mvp_q.y = MV_W'(mvp_y[k]); end
      nxt_fme_mb = k - 1;
      @(negedge clk);
      mb_go = 0; ime_fin = 0;
      fme_mb = nxt_fme_mb;
      cnt_swap++;
      t_go = $time / 10;
      if (k > 1) $display("stage interval %0d cycles", t_go - t_prev);
      t_prev = t_go;
      if (k == NMB) begin cnt_drain++; break; end
      checks++;
      if (int'(l1_base) != b1 || int'(l2_base) != b2) failures++;
      if (k + 1 < NMB) begin
        // next macroblock: current block and level-0 window while both stages run
        load_cur(k + 1); load_l0(k + 1);
        // level-1/2 data only after IME has released the old columns
        while (!ime_fin) @(negedge clk);
        if (row_start(k + 1)) begin b1 = 0; b2 = 0; cnt_rowstart++; end
        else begin b1 = (b1 + 8) % 40; b2 = (b2 + 4) % 68; cnt_strip++; end
        load_l12(k + 1, b1, b2);
      end
    end
    // wait for the last decision
    while (n_done < NMB) @(negedge clk);
    $display("bank swaps %0d, level-1 wins %0d, level-2 wins %0d, second-SRAM loads %0d, partitions from shared level-0 bank %0d",
             cnt_swap, cnt_l1, cnt_l2, cnt_sec, cnt_share);
    $display("mode-8 decisions %0d, strip updates %0d, row restarts %0d, drains %0d",
             cnt_m8, cnt_strip, cnt_rowstart, cnt_drain);
    checks++;
    if (cnt_sec < 4) failures++;    // at least MBs 1, 3, 5, 7 (kinds B and D)
    if (cnt_swap == 0 || cnt_l1 == 0 || cnt_l2 == 0 || cnt_sec == 0 || cnt_share == 0 ||
        cnt_m8 == 0 || cnt_strip == 0 || cnt_rowstart == 0 || cnt_drain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
