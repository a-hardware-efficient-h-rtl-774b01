// tb_fme_pu: random current/prediction blocks (and the extreme all-0 vs
// all-255 case); residuals and SATD are compared with a matrix-product
// Hadamard reference.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_fme_pu;
  import me_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  pix_t [3:0][3:0] cur, pred;
  logic [3:0][3:0][8:0] resid;
  logic [15:0] satd;

  fme_pu dut (.cur, .pred, .resid, .satd);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int d [16];
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        cur[r][c]  = (n == 0) ? 8'd255 : 8'($urandom);
        pred[r][c] = (n == 0) ? 8'd0 : (n % 3 == 0) ? 8'(int'(cur[r][c]) + $urandom_range(0, 6) - 3) : 8'($urandom);
        d[4*r + c] = int'(cur[r][c]) - int'(pred[r][c]);
      end
      #1;
      checks++;
      if (int'(satd) != satd4(d)) begin failures++; $display("n=%0d satd %0d exp %0d", n, satd, satd4(d)); end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(signed'(resid[i/4][i%4])) != d[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
