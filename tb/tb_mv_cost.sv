// tb_mv_cost: random and small MV differences; cost compared with lambda times
// the Exp-Golomb code lengths of both components.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_mv_cost;
  import me_pkg::*;
  import tb_pkg::*;
  int checks = 0, failures = 0;
  mv_t mv, mvp;
  logic [7:0] lambda;
  logic [15:0] cost;

  mv_cost dut (.mv, .mvp, .lambda, .cost);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ax, ay, px, py, e;
      px = $urandom_range(0, 1000) - 500; py = $urandom_range(0, 1000) - 500;
      if (n % 2 == 0) begin ax = px + $urandom_range(0, 8) - 4; ay = py + $urandom_range(0, 8) - 4; end
      else begin ax = $urandom_range(0, 1000) - 500; ay = $urandom_range(0, 1000) - 500; end
      mv.x = MV_W'(ax); mv.y = MV_W'(ay); mvp.x = MV_W'(px); mvp.y = MV_W'(py);
      lambda = 8'($urandom_range(0, 40));
      #1;
      e = int'(lambda) * (se_len(ax - px) + se_len(ay - py));
      checks++;
      if (int'(cost) != e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
