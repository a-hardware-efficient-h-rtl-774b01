// tb_fme_qpel: drives the half-pel grid from the reference model and checks
// the 4x4 prediction for all 49 offsets in -3..+3 quarter pels against the
// H.264 quarter-pel reference sample.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_fme_qpel;
  import me_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  pix_t [10:0][10:0] hg;
  logic signed [2:0] fx, fy;
  pix_t [3:0][3:0] pred;

  fme_qpel dut (.hg, .fx, .fy, .pred);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10; n++) begin
      int x0, y0;
      x0 = $urandom_range(0, 500) - 250; y0 = $urandom_range(0, 500) - 250;
      for (int y = 0; y < 11; y++) for (int x = 0; x < 11; x++)
        hg[y][x] = 8'(hsample(2*x0 + x - 2, 2*y0 + y - 2));
      for (int a = -3; a <= 3; a++) for (int b = -3; b <= 3; b++) begin
        fx = 3'(a); fy = 3'(b);
        #1;
        for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
          checks++;
          if (int'(pred[y][x]) != qsample(4*(x0 + x) + a, 4*(y0 + y) + b)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
