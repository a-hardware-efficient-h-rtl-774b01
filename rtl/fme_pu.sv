// fme_pu: 4x4 block processing unit of the fractional ME stage.
//
// Forms the residual between the current 4x4 block and one candidate
// prediction, applies the 4x4 Hadamard transform (rows, then columns, as
// butterflies) and returns the SATD, the sum of the absolute transform
// coefficients (not halved). The residual is also brought out. Combinational;
// the FME controller registers the result.
//
// Residual generation and a 4x4 Hadamard transform per processing unit follow
// the published design; summing the absolute coefficients without halving is a
// choice made here.
module fme_pu
  import me_pkg::*;
(
  input  pix_t [3:0][3:0]              cur,
  input  pix_t [3:0][3:0]              pred,
  output logic [3:0][3:0][8:0]         resid,   // two's complement
  output logic [15:0]                  satd
);
  typedef logic signed [13:0] s14_t;
  s14_t [3:0][3:0] t, u;
  s14_t [3:0][3:0] rs;

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
      begin
        rs[r][c]    = s14_t'({6'b0, cur[r][c]}) - s14_t'({6'b0, pred[r][c]});
        resid[r][c] = rs[r][c][8:0];
      end
    // horizontal
    for (int r = 0; r < 4; r++) begin
      s14_t s0, s1, d0, d1;
      s0 = (rs[r][0]) + (rs[r][3]);
      s1 = (rs[r][1]) + (rs[r][2]);
      d0 = (rs[r][0]) - (rs[r][3]);
      d1 = (rs[r][1]) - (rs[r][2]);
      t[r][0] = s0 + s1;
      t[r][1] = d0 + d1;
      t[r][2] = s0 - s1;
      t[r][3] = d0 - d1;
    end
    // vertical
    for (int c = 0; c < 4; c++) begin
      s14_t s0, s1, d0, d1;
      s0 = t[0][c] + t[3][c];
      s1 = t[1][c] + t[2][c];
      d0 = t[0][c] - t[3][c];
      d1 = t[1][c] - t[2][c];
      u[0][c] = s0 + s1;
      u[1][c] = d0 + d1;
      u[2][c] = s0 - s1;
      u[3][c] = d0 - d1;
    end
    satd = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        satd = satd + 16'(unsigned'((u[r][c] < 0) ? -u[r][c] : u[r][c]));
  end
endmodule
