// tb_sad_tree: random 4x4-block SAD grids (level 0) and 8x8 grids (level 1);
// each partition SAD is compared with the sum of the blocks that the
// partition's geometry covers.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_sad_tree;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0][3:0][13:0]    in4;
  logic [NPART-1:0][17:0]   out4;
  logic [1:0][1:0][15:0]    in2;
  logic [NPART-1:0][17:0]   out2;

  sad_tree #(.G(4), .IW(14), .OW(18)) dut4 (.in_sad(in4), .part_sad(out4));
  sad_tree #(.G(2), .IW(16), .OW(18)) dut2 (.in_sad(in2), .part_sad(out2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      foreach (in4[i, j]) in4[i][j] = 14'($urandom);
      foreach (in2[i, j]) in2[i][j] = 16'($urandom);
      #1;
      for (int p = 0; p < NPART; p++) begin
        part_geom_t g;
        int e4, e2;
        g = part_geom(p);
        e4 = 0; e2 = 0;
        for (int by = 0; by < 4; by++) for (int bx = 0; bx < 4; bx++)
          if (4*bx >= g.x0 && 4*bx < g.x0 + g.w && 4*by >= g.y0 && 4*by < g.y0 + g.h)
            e4 += in4[by][bx];
        for (int by = 0; by < 2; by++) for (int bx = 0; bx < 2; bx++)
          if (8*bx >= g.x0 && 8*bx < g.x0 + g.w && 8*by >= g.y0 && 8*by < g.y0 + g.h)
            e2 += in2[by][bx];
        if (p > 8) e2 = 0;
        checks += 2;
        if (int'(out4[p]) != e4) failures++;
        if (int'(out2[p]) != e2) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
