// sad_tree: summation tree for variable block sizes.
//
// Takes the grid of SADs of the smallest partitions a level supports and sums
// them into the SADs of the larger ones, in the flat partition order of me_pkg.
//   G = 4: input is the 4x4 grid of 4x4-pixel SADs (level 0); all 41 outputs
//          are produced.
//   G = 2: input is the 2x2 grid of 8x8-pixel SADs (level 1, whose 4x4-sample
//          blocks cover 8x8 pixels); outputs 0..8 (modes 1 to 4) are produced
//          and the sub-8x8 entries are zero.
// Combinational. Output width OW holds the largest sum. The 4x4 entries
// (25..40) are the inputs themselves, zero-extended to OW bits.
//
// The published design names a 4x4 and an 8x8 SAD tree; how they add up the
// partitions, and the flat partition order, are choices made here.
module sad_tree
  import me_pkg::*;
#(
  parameter int unsigned G  = 4,
  parameter int unsigned IW = 14,
  parameter int unsigned OW = 18
) (
  input  logic [G-1:0][G-1:0][IW-1:0] in_sad,   // [row][col]
  output logic [NPART-1:0][OW-1:0]    part_sad
);
  logic [1:0][1:0][OW-1:0]   q8;    // 8x8 quadrant SADs [row][col]
  logic [NPART-1:0][OW-1:0]  sub_sad; // sub-8x8 entries (level 0 only)

  if (G == 4) begin : g_l0
    always_comb begin
      sub_sad = '0;
      for (int qr = 0; qr < 2; qr++)
        for (int qc = 0; qc < 2; qc++) begin
          // 4x4
          for (int s = 0; s < 4; s++)
            sub_sad[25 + 4*(2*qr+qc) + s] = OW'(in_sad[2*qr + s/2][2*qc + s%2]);
          // 8x4 (top, bottom)
          for (int s = 0; s < 2; s++)
            sub_sad[9 + 2*(2*qr+qc) + s] = OW'(in_sad[2*qr + s][2*qc]) + OW'(in_sad[2*qr + s][2*qc + 1]);
          // 4x8 (left, right)
          for (int s = 0; s < 2; s++)
            sub_sad[17 + 2*(2*qr+qc) + s] = OW'(in_sad[2*qr][2*qc + s]) + OW'(in_sad[2*qr + 1][2*qc + s]);
          q8[qr][qc] = sub_sad[9 + 2*(2*qr+qc)] + sub_sad[9 + 2*(2*qr+qc) + 1];
        end
    end
  end else begin : g_l1
    always_comb begin
      sub_sad = '0;
      for (int qr = 0; qr < 2; qr++)
        for (int qc = 0; qc < 2; qc++)
          q8[qr][qc] = OW'(in_sad[qr][qc]);
    end
  end

  always_comb begin
    part_sad = sub_sad;
    for (int q = 0; q < 4; q++) part_sad[5 + q] = q8[q/2][q%2];
    part_sad[1] = q8[0][0] + q8[0][1];
    part_sad[2] = q8[1][0] + q8[1][1];
    part_sad[3] = q8[0][0] + q8[1][0];
    part_sad[4] = q8[0][1] + q8[1][1];
    part_sad[0] = q8[0][0] + q8[0][1] + q8[1][0] + q8[1][1];
  end
endmodule
