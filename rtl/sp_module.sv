// sp_module: search point module. Evaluates one candidate position of one IME
// level in a single cycle.
//
// The current block and the candidate reference block are BLK x BLK samples
// (16 at level 0, 8 at level 1, 4 at level 2 after subsampling). They are
// split into BLK/4 strips of four rows, each handled by one row SAD module of
// BLK 4p-SAD units, so a module holds (BLK/4)*BLK units: 64, 16 and 4 for the
// three levels, as in the design. The output is the grid of 4x4-sample block
// SADs, registered once (one-cycle latency, one candidate per cycle).
//
// The unit counts per level (64, 16 and 4 four-pair units) and the one-
// candidate-per-cycle rate follow the published design; the output register is
// a pipeline choice made here.
module sp_module #(
  parameter int unsigned W   = 8,
  parameter int unsigned BLK = 16   // 16, 8 or 4
) (
  input  logic                                 clk,
  input  logic [BLK-1:0][BLK-1:0][W-1:0]       cur,    // [row][col]
  input  logic [BLK-1:0][BLK-1:0][W-1:0]       ref_s,  // [row][col]
  output logic [BLK/4-1:0][BLK/4-1:0][W+5:0]   blk_sad // [block row][block col], registered
);
  localparam int unsigned NR = BLK / 4;

  logic [NR-1:0][NR-1:0][W+5:0] blk_sad_c;

  for (genvar r = 0; r < NR; r++) begin : g_row
    row_sad #(.W(W), .NCOL(BLK)) u_row (
      .cur    (cur[4*r+3 -: 4]),
      .ref_s  (ref_s[4*r+3 -: 4]),
      .blk_sad(blk_sad_c[r])
    );
  end

  always_ff @(posedge clk) blk_sad <= blk_sad_c;
endmodule
