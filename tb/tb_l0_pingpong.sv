// tb_l0_pingpong: loads a distinct pattern into the load bank before each of
// several swaps and checks that the pattern loaded before swap k is read on the
// IME port after swap k and on the FME port after swap k+1 (three-bank
// rotation), with reads on both ports in the same cycle.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_l0_pingpong;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic swap = 0, ld_we = 0, ime_re = 0, fme_re = 0;
  logic [1:0] ime_bank;
  logic [5:0] ld_row, ld_col, ime_row, fme_row;
  logic [15:0] ld_mask;
  pix_t [15:0] ld_data;
  pix_t [36:0] ime_rdata, fme_rdata;

  l0_pingpong #(.N(37)) dut (.*);

  function automatic int pat(input int k, input int r, input int c);
    return (k * 53 + r * 7 + c * 3) & 255;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      // load pattern k
      for (int r = 0; r < 37; r++)
        for (int c = 0; c < 37; c += 16) begin
          @(negedge clk);
          ld_we = 1; ld_row = 6'(r); ld_col = 6'(c);
          for (int i = 0; i < 16; i++) ld_mask[i] = (c + i < 37);
          for (int i = 0; i < 16; i++) ld_data[i] = 8'(pat(k, r, c + i));
        end
      @(negedge clk); ld_we = 0; swap = 1;
      @(negedge clk); swap = 0;
      checks++;
      if (int'(ime_bank) != (k + 1) % 3) failures++;
      // read both ports
      for (int r = 0; r < 37; r++) begin
        @(negedge clk);
        ime_re = 1; fme_re = (k > 0); ime_row = 6'(r); fme_row = 6'(36 - r);
        @(negedge clk);
        ime_re = 0; fme_re = 0;
        for (int c = 0; c < 37; c++) begin
          checks++;
          if (int'(ime_rdata[c]) != pat(k, r, c)) failures++;
          if (k > 0) begin
            checks++;
            if (int'(fme_rdata[c]) != pat(k - 1, 36 - r, c)) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
