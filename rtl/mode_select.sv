// mode_select: merges the three search levels and applies mode filtering
// ("select 2 candidates").
//
// For every partition the best integer MV is the lowest normalised SAD among
// the levels that search it: level 0 covers all 41 partitions, level 1 the
// partitions of modes 1-4, level 2 the 16x16 partition (ties prefer the finer
// level). Mode costs are sums of the partition SADs. Inside each 8x8 quadrant
// the cheapest sub-mode (4 to 7) is chosen, and mode 8 (8x8 with
// sub-partitions) costs the sum of the four quadrant minima. Only two modes are
// passed to fractional ME: the first is the cheapest of modes 1-3, the second
// the cheapest of the remaining candidates among modes 1, 2, 3 and 8 (ties go
// to the lower mode number). This yields 3 to 18 MVs for FME instead of 41.
// IME costs are SAD only, with no MV rate term.
//
// Timing: results are registered; out_valid follows in_valid by one cycle and
// the outputs are held until the next in_valid.
//
// Picking one mode from modes 1-3 and a second from all modes, with only the
// best sub-partitioned 8x8 case competing, follows the published design; the
// merge by smallest scaled SAD and the exact cost sums are choices made here.
module mode_select
  import me_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  part_best_t [NPART-1:0]  l0,
  input  part_best_t [NPART-1:0]  l1,       // entries 0..8 used
  input  part_best_t [NPART-1:0]  l2,       // entry 0 used
  output logic                    out_valid,
  output logic [3:0]              mode_a,   // 1..3
  output logic [3:0]              mode_b,   // 1..3 or 8
  output logic [3:0][1:0]         sub_mode, // per quadrant: 0..3 = mode 4..7
  output part_best_t [NPART-1:0]  merged,   // best integer MV per partition
  output logic [1:0]              src_lvl0  // level that won partition 0 (statistics)
);
  localparam int unsigned CW = SAD_W + 5;

  part_best_t [NPART-1:0] m;
  logic [1:0]             src0;
  logic [CW-1:0]          c [4];      // cost of mode 1, 2, 3, 8
  logic [3:0][1:0]        sm;
  logic [3:0]             ma, mb;

  always_comb begin
    m    = l0;
    src0 = 2'd0;
    for (int p = 0; p < 9; p++)
      if (l1[p].sad < m[p].sad) begin
        m[p] = l1[p];
        if (p == 0) src0 = 2'd1;
      end
    if (l2[0].sad < m[0].sad) begin
      m[0] = l2[0];
      src0 = 2'd2;
    end

    c[0] = CW'(m[0].sad);
    c[1] = CW'(m[1].sad) + CW'(m[2].sad);
    c[2] = CW'(m[3].sad) + CW'(m[4].sad);
    c[3] = '0;
    for (int q = 0; q < 4; q++) begin
      logic [CW-1:0] s [4];
      logic [CW-1:0] bs;
      s[0] = CW'(m[5 + q].sad);
      s[1] = CW'(m[9 + 2*q].sad)  + CW'(m[10 + 2*q].sad);
      s[2] = CW'(m[17 + 2*q].sad) + CW'(m[18 + 2*q].sad);
      s[3] = CW'(m[25 + 4*q].sad) + CW'(m[26 + 4*q].sad) + CW'(m[27 + 4*q].sad) + CW'(m[28 + 4*q].sad);
      bs    = s[0];
      sm[q] = 2'd0;
      for (int k = 1; k < 4; k++)
        if (s[k] < bs) begin
          bs    = s[k];
          sm[q] = 2'(k);
        end
      c[3] = c[3] + bs;
    end

    // first candidate: best of modes 1..3
    ma = 4'd1;
    if (c[1] < c[ma-1]) ma = 4'd2;
    if (c[2] < c[ma-1]) ma = 4'd3;
    // second candidate: best of the others among 1, 2, 3, 8
    mb = (ma == 4'd1) ? 4'd2 : 4'd1;
    for (int k = 0; k < 3; k++)
      if (4'(k + 1) != ma && c[k] < c[(mb == 4'd8) ? 3 : mb - 1]) mb = 4'(k + 1);
    if (c[3] < c[(mb == 4'd8) ? 3 : mb - 1]) mb = 4'd8;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mode_a    <= 4'd1;
      mode_b    <= 4'd2;
      sub_mode  <= '0;
      merged    <= '0;
      src_lvl0  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mode_a   <= ma;
        mode_b   <= mb;
        sub_mode <= sm;
        merged   <= m;
        src_lvl0 <= src0;
      end
    end
  end
endmodule
