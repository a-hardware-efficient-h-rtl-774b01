// tb_fme_interp: patches cut from the synthetic frame at random positions;
// every half-pel grid sample is compared with the H.264 half-pel reference
// computed directly from the frame.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_fme_interp;
  import me_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  pix_t [9:0][9:0]   patch;
  pix_t [10:0][10:0] hg;

  fme_interp dut (.patch, .hg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 60; n++) begin
      int x0, y0;
      x0 = $urandom_range(0, 500) - 250; y0 = $urandom_range(0, 500) - 250;
      for (int r = 0; r < 10; r++) for (int c = 0; c < 10; c++)
        patch[r][c] = 8'(fpix(x0 + c - 3, y0 + r - 3));
      #1;
      for (int y = 0; y < 11; y++) for (int x = 0; x < 11; x++) begin
        checks++;
        if (int'(hg[y][x]) != hsample(2*x0 + x - 2, 2*y0 + y - 2)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
