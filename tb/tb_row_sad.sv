// tb_row_sad: random strips for the row SAD module (16 columns, 8-bit and
// 8 columns, 6-bit); every 4x4-block SAD is compared with a direct sum.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_row_sad;
  int checks = 0, failures = 0;
  logic [3:0][15:0][7:0] c16, r16;
  logic [3:0][13:0]      s16;
  logic [3:0][7:0][5:0]  c8, r8;
  logic [1:0][11:0]      s8;

  row_sad #(.W(8), .NCOL(16)) dut16 (.cur(c16), .ref_s(r16), .blk_sad(s16));
  row_sad #(.W(6), .NCOL(8))  dut8  (.cur(c8),  .ref_s(r8),  .blk_sad(s8));

  function automatic int ad(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int r = 0; r < 4; r++) begin
        for (int c = 0; c < 16; c++) begin c16[r][c] = 8'($urandom); r16[r][c] = 8'($urandom); end
        for (int c = 0; c < 8; c++)  begin c8[r][c]  = 6'($urandom); r8[r][c]  = 6'($urandom); end
      end
      #1;
      for (int g = 0; g < 4; g++) begin
        int e;
        e = 0;
        for (int r = 0; r < 4; r++) for (int c = 4*g; c < 4*g+4; c++) e += ad(c16[r][c], r16[r][c]);
        checks++;
        if (int'(s16[g]) != e) failures++;
      end
      for (int g = 0; g < 2; g++) begin
        int e;
        e = 0;
        for (int r = 0; r < 4; r++) for (int c = 4*g; c < 4*g+4; c++) e += ad(c8[r][c], r8[r][c]);
        checks++;
        if (int'(s8[g]) != e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
