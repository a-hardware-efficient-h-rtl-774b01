// tb_sad4p: random and corner vectors for the four-pixel SAD unit, checked
// against a direct sum of absolute differences.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_sad4p;
  int checks = 0, failures = 0;
  logic [3:0][7:0] cur, ref_s;
  logic [9:0] sad;

  sad4p #(.W(8)) dut (.cur(cur), .ref_s(ref_s), .sad(sad));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int exp_sad;
      for (int i = 0; i < 4; i++) begin
        cur[i]   = (n == 0) ? 8'd255 : (n == 1) ? 8'd0 : 8'($urandom);
        ref_s[i] = (n == 0) ? 8'd0   : (n == 1) ? 8'd255 : 8'($urandom);
      end
      #1;
      exp_sad = 0;
      for (int i = 0; i < 4; i++)
        exp_sad += (int'(cur[i]) > int'(ref_s[i])) ? int'(cur[i]) - int'(ref_s[i]) : int'(ref_s[i]) - int'(cur[i]);
      checks++;
      if (int'(sad) != exp_sad) begin
        failures++;
        if (failures < 5) $display("mismatch: got %0d exp %0d", sad, exp_sad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
