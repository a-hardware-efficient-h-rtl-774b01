// tb_mode_select: random per-level results (with deliberate ties and
// small-SAD biases toward each mode) fed to mode filtering; the merged MVs,
// the chosen sub-modes and the two candidate modes are compared with a
// reference model that evaluates every mode's cost from the partition lists.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_mode_select;
  import me_pkg::*;
  int checks = 0, failures = 0;
  int hits_mode8 = 0, hits_l1 = 0, hits_l2 = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  part_best_t [NPART-1:0] l0, l1, l2, merged;
  logic [3:0] mode_a, mode_b;
  logic [3:0][1:0] sub_mode;
  logic [1:0] src_lvl0;

  mode_select dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int ms [NPART], mvx [NPART], cost [9], sm [4], ea, eb, bias;
      bias = n % 5;
      for (int p = 0; p < NPART; p++) begin
        int s0, s1, s2;
        s0 = $urandom_range(0, 3000); s1 = $urandom_range(0, 3000); s2 = $urandom_range(0, 3000);
        if (n % 11 == 0) begin s1 = s0; s2 = s0; end        // ties
        if (bias == 4 && p >= 25) s0 = s0 / 8;               // favour 4x4 (mode 8)
        if (bias == 2 && (p == 1 || p == 2)) s0 = s0 / 8;    // favour 16x8
        l0[p].sad = SAD_W'(s0); l0[p].mv.x = MV_W'(p);       l0[p].mv.y = 12'sd1;
        l1[p].sad = SAD_W'(s1); l1[p].mv.x = MV_W'(100 + p); l1[p].mv.y = 12'sd2;
        l2[p].sad = SAD_W'(s2); l2[p].mv.x = MV_W'(200 + p); l2[p].mv.y = 12'sd3;
        ms[p] = s0; mvx[p] = p;
        if (p <= 8 && s1 < ms[p]) begin ms[p] = s1; mvx[p] = 100 + p; end
        if (p == 0 && s2 < ms[p]) begin ms[p] = s2; mvx[p] = 200 + p; end
      end
      // reference mode costs
      cost[1] = ms[0]; cost[2] = ms[1] + ms[2]; cost[3] = ms[3] + ms[4];
      cost[8] = 0;
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
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++; if (!out_valid) failures++;
      checks++; if (int'(mode_a) != ea) failures++;
      checks++; if (int'(mode_b) != eb) failures++;
      for (int q = 0; q < 4; q++) begin checks++; if (int'(sub_mode[q]) != sm[q]) failures++; end
      for (int p = 0; p < NPART; p++) begin
        checks++;
        if (int'(merged[p].sad) != ms[p] || int'(merged[p].mv.x) != mvx[p]) failures++;
      end
      if (eb == 8) hits_mode8++;
      if (mvx[0] >= 200) hits_l2++; else if (mvx[0] >= 100) hits_l1++;
    end
    $display("mode 8 chosen %0d times, level 1 won 16x16 %0d, level 2 %0d", hits_mode8, hits_l1, hits_l2);
    if (hits_mode8 == 0 || hits_l1 == 0 || hits_l2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
