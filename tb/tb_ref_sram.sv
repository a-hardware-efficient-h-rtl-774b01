// tb_ref_sram: masked, wrapping 16-sample writes and rotated row reads of a
// 6-bit, 39x40 circular buffer (level-1 shape), compared with a model array;
// checks the truncation to the sample's upper bits and the one-cycle read
// latency.
//
// Expected values are computed in the testbench from first principles (brute
// force or the reference functions in tb_pkg), not taken from the design; the
// stimulus and the check set are this testbench's own.
module tb_ref_sram;
  import me_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int ROWS = 39, COLS = 40, W = 6;
  logic we = 0, re = 0;
  logic [5:0] wrow, rrow, wcol, rbase;
  logic [15:0] wmask;
  pix_t [15:0] wdata;
  logic [COLS-1:0][W-1:0] rdata;
  int model [ROWS][COLS];

  ref_sram #(.ROWS(ROWS), .COLS(COLS), .W(W)) dut (
    .clk, .we, .wrow, .wcol, .wmask, .wdata, .re, .rrow, .rbase, .rdata);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything with full-mask writes
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c += 16) begin
        @(negedge clk);
        we = 1; wrow = 6'(r); wcol = 6'(c);
        for (int i = 0; i < 16; i++) wmask[i] = (c + i < COLS);
        for (int i = 0; i < 16; i++) begin
          wdata[i] = 8'($urandom);
          if (c + i < COLS) model[r][c + i] = int'(wdata[i]) >> 2;
        end
      end
    // random masked writes that may wrap
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1; wrow = 6'($urandom_range(0, ROWS-1)); wcol = 6'($urandom_range(0, COLS-1));
      wmask = 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        wdata[i] = 8'($urandom);
        if (wmask[i]) model[wrow][(int'(wcol) + i) % COLS] = int'(wdata[i]) >> 2;
      end
    end
    @(negedge clk); we = 0;
    // rotated reads
    for (int n = 0; n < 300; n++) begin
      int r, b;
      @(negedge clk);
      r = $urandom_range(0, ROWS-1); b = $urandom_range(0, COLS-1);
      re = 1; rrow = 6'(r); rbase = 6'(b);
      @(negedge clk);
      re = 0;
      for (int j = 0; j < COLS; j++) begin
        checks++;
        if (int'(rdata[j]) != model[r][(b + j) % COLS]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
