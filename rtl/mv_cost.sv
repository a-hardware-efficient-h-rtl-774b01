// mv_cost: motion-vector rate cost of the fractional ME stage.
//
// cost = lambda * (bits(mvd.x) + bits(mvd.y)), where mvd = mv - mvp in quarter
// pels and bits() is the length of the signed Exp-Golomb code that H.264 uses
// for MV differences. lambda is an 8-bit run-time input. Combinational.
//
// The published design shows an MV cost unit feeding the compare step without
// detail; the lambda times Exp-Golomb length cost is the usual H.264 encoder
// rule, chosen here.
module mv_cost
  import me_pkg::*;
(
  input  mv_t          mv,      // quarter-pel
  input  mv_t          mvp,     // quarter-pel
  input  logic [7:0]   lambda,
  output logic [15:0]  cost
);
  logic signed [MV_W:0] dx, dy;
  int unsigned bits;

  always_comb begin
    dx   = (MV_W+1)'(mv.x) - (MV_W+1)'(mvp.x);
    dy   = (MV_W+1)'(mv.y) - (MV_W+1)'(mvp.y);
    bits = se_bits(dx) + se_bits(dy);
    cost = 16'(lambda * bits);
  end
endmodule
