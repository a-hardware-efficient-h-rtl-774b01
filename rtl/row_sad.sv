// row_sad: row SAD module of a search point module.
//
// A row SAD module covers a strip four samples high and NCOL samples wide. It
// holds NCOL 4p-SAD units; unit c takes the four samples of column c (rows
// 0..3) of the current block and of the candidate reference block. The unit
// outputs are accumulated in groups of four adjacent columns, so each group
// yields the SAD of one 4x4-sample block. This matches the row SAD module of
// the design (16 units at level 0, 8 at level 1, 4 at level 2, grouped in
// fours). Combinational.
//
// A row of 16 four-pair units per level-0 row module is the published
// arrangement; pairing each unit with one 4-sample column, so that four
// neighbouring units give one 4x4 block, is this implementation's reading.
module row_sad #(
  parameter int unsigned W    = 8,
  parameter int unsigned NCOL = 16   // multiple of 4
) (
  input  logic [3:0][NCOL-1:0][W-1:0] cur,    // [row][col]
  input  logic [3:0][NCOL-1:0][W-1:0] ref_s,  // [row][col]
  output logic [NCOL/4-1:0][W+5:0]    blk_sad // SAD of each 4x4-sample block
);
  logic [NCOL-1:0][W+1:0] col_sad;

  for (genvar c = 0; c < NCOL; c++) begin : g_unit
    sad4p #(.W(W)) u_sad (
      .cur  ({cur[3][c], cur[2][c], cur[1][c], cur[0][c]}),
      .ref_s({ref_s[3][c], ref_s[2][c], ref_s[1][c], ref_s[0][c]}),
      .sad  (col_sad[c])
    );
  end

  always_comb begin
    for (int g = 0; g < NCOL / 4; g++) begin
      blk_sad[g] = '0;
      for (int k = 0; k < 4; k++)
        blk_sad[g] = blk_sad[g] + (W+6)'(col_sad[4*g+k]);
    end
  end
endmodule
