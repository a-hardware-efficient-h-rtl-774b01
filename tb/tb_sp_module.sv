// tb_sp_module: random candidates for the level-0 (16x16, 8-bit) and level-2
// (4x4, 6-bit) search point modules; checks every 4x4-sample block SAD one
// clock after the inputs (one candidate per cycle, back to back).
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_sp_module;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0][15:0][7:0] cur0, ref0;
  logic [3:0][3:0][13:0]  sad0;
  logic [3:0][3:0][5:0]   cur2, ref2;
  logic [0:0][0:0][11:0]  sad2;
  int exp0 [4][4];
  int exp2;

  sp_module #(.W(8), .BLK(16)) dut0 (.clk(clk), .cur(cur0), .ref_s(ref0), .blk_sad(sad0));
  sp_module #(.W(6), .BLK(4))  dut2 (.clk(clk), .cur(cur2), .ref_s(ref2), .blk_sad(sad2));

  function automatic int ad(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        cur0[r][c] = 8'($urandom); ref0[r][c] = (n % 7 == 0) ? cur0[r][c] : 8'($urandom);
      end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        cur2[r][c] = 6'($urandom); ref2[r][c] = 6'($urandom);
      end
      foreach (exp0[i, j]) begin
        exp0[i][j] = 0;
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
          exp0[i][j] += ad(cur0[4*i+r][4*j+c], ref0[4*i+r][4*j+c]);
      end
      exp2 = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) exp2 += ad(cur2[r][c], ref2[r][c]);
      @(posedge clk); #1;
      foreach (exp0[i, j]) begin
        checks++;
        if (int'(sad0[i][j]) != exp0[i][j]) failures++;
      end
      checks++;
      if (int'(sad2[0][0]) != exp2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
