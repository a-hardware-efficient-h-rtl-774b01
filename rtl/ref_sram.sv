// ref_sram: reference sample buffer with one row write port and one row read
// port. Used for the level-0, level-1 and level-2 reference SRAMs and for the
// second reference luma SRAM of the FME stage.
//
// Storage is ROWS x COLS samples of W bits. External data arrive as 8-bit
// samples in 16-sample beats (one 128-bit bus word); a write stores the W most
// significant bits of each sample whose mask bit is set, at physical columns
// (wcol + i) mod COLS of row wrow, so a beat may wrap around the row end. This
// is how levels 1 and 2 keep bit-truncated samples and how a circular column
// buffer receives the new column strip of the next macroblock.
// A read returns the whole row, rotated so that rdata[j] is the sample at
// physical column (rbase + j) mod COLS; rbase is the current window start of a
// circular buffer (0 for non-circular use). The read data are registered: the
// row addressed in cycle t is on rdata in cycle t+1. Contents are not reset.
//
// Buffer sizes (37x37 level 0, 39x40 and 67x68 for levels 1 and 2), truncated
// coarse samples and the 128-bit write width follow the published design; the
// circular column addressing, the rotated row read and the 22x22 size of the
// second reference SRAM are choices made here.
module ref_sram
  import me_pkg::*;
#(
  parameter int unsigned ROWS = 37,
  parameter int unsigned COLS = 37,
  parameter int unsigned W    = 8
) (
  input  logic                          clk,
  // write port (one bus beat)
  input  logic                          we,
  input  logic [$clog2(ROWS)-1:0]       wrow,
  input  logic [$clog2(COLS)-1:0]       wcol,
  input  logic [15:0]                   wmask,
  input  pix_t [15:0]                   wdata,
  // read port
  input  logic                          re,
  input  logic [$clog2(ROWS)-1:0]       rrow,
  input  logic [$clog2(COLS)-1:0]       rbase,
  output logic [COLS-1:0][W-1:0]        rdata
);
  logic [COLS-1:0][W-1:0] mem [ROWS];

  // index (a + b) mod COLS for a, b < COLS
  function automatic int unsigned wrap(input int unsigned a, input int unsigned b);
    int unsigned s;
    s = a + b;
    return (s >= COLS) ? s - COLS : s;
  endfunction

  always_ff @(posedge clk) begin
    if (we)
      for (int i = 0; i < 16; i++)
        if (wmask[i] && i < COLS)
          mem[wrow][wrap(int'(wcol), i)] <= wdata[i][PIX_W-1 -: W];
    if (re)
      for (int j = 0; j < COLS; j++)
        rdata[j] <= mem[rrow][wrap(int'(rbase), j)];
  end
endmodule
