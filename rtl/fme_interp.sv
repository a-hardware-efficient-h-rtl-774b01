// fme_interp: half-pel interpolation unit of the fractional ME stage.
//
// Input is the 10x10 integer-pel patch around one 4x4 block: patch[r][c] is the
// reference pixel at offset (c-3, r-3) from the block's top-left pixel after
// the integer MV is applied. Output is the half-pel-resolution grid hg[Y][X],
// X, Y = 0..10, where grid point (X, Y) lies at pixel offset ((X-2)/2, (Y-2)/2):
// it spans -1 .. +4 pixels, enough for every quarter-pel position within
// +/-3/4 pel of the block. Grid points with both coordinates even are copies of
// integer pixels; the others are the H.264 half-pel samples: the 6-tap filter
// (1, -5, 20, 20, -5, 1) applied horizontally or vertically with rounding
// (+16) >> 5 and clipping to 0..255, and, for the centre positions, the
// vertical filter applied to the unrounded horizontal results with rounding
// (+512) >> 10. Purely combinational.
// The 36 integer grid points are wired straight from the patch.
//
// The published design names an interpolation unit for one 4x4 block; the
// H.264 six-tap filter and the 10x10 patch to 11x11 half-pel grid arrangement
// are choices made here.
module fme_interp
  import me_pkg::*;
(
  input  pix_t [9:0][9:0]    patch,   // [row][col]
  output pix_t [10:0][10:0]  hg       // [Y][X]
);
  // 6-tap filter on integers
  function automatic logic signed [15:0] tap6(input logic signed [15:0] a, b, c, d, e, f);
    return a - 5 * b + 20 * c + 20 * d - 5 * e + f;
  endfunction

  function automatic pix_t clip8(input logic signed [23:0] v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  // unrounded horizontal half-pel value between patch columns c0+2 and c0+3,
  // on every patch row (c0 = 0..4)
  logic signed [15:0] h1 [10][5];

  always_comb begin
    for (int r = 0; r < 10; r++)
      for (int c0 = 0; c0 < 5; c0++)
        h1[r][c0] = tap6(16'(patch[r][c0]),   16'(patch[r][c0+1]), 16'(patch[r][c0+2]),
                         16'(patch[r][c0+3]), 16'(patch[r][c0+4]), 16'(patch[r][c0+5]));

    for (int y = 0; y < 11; y++)
      for (int x = 0; x < 11; x++) begin
        int c0, r0;
        logic signed [23:0] acc;
        c0 = (x - 1) / 2;
        r0 = (y - 1) / 2;
        acc = '0;
        if (x % 2 == 0 && y % 2 == 0) begin
          hg[y][x] = patch[y/2 + 2][x/2 + 2];
        end else if (y % 2 == 0) begin            // horizontal half-pel
          acc = 24'(h1[y/2 + 2][c0]) + 24'sd16;
          hg[y][x] = clip8(acc >>> 5);
        end else if (x % 2 == 0) begin            // vertical half-pel
          acc = 24'(tap6(16'(patch[r0][x/2+2]),   16'(patch[r0+1][x/2+2]), 16'(patch[r0+2][x/2+2]),
                         16'(patch[r0+3][x/2+2]), 16'(patch[r0+4][x/2+2]), 16'(patch[r0+5][x/2+2])))
                + 24'sd16;
          hg[y][x] = clip8(acc >>> 5);
        end else begin                            // centre half-pel
          acc = 24'(h1[r0][c0]) - 24'sd5 * 24'(h1[r0+1][c0]) + 24'sd20 * 24'(h1[r0+2][c0])
              + 24'sd20 * 24'(h1[r0+3][c0]) - 24'sd5 * 24'(h1[r0+4][c0]) + 24'(h1[r0+5][c0])
              + 24'sd512;
          hg[y][x] = clip8(acc >>> 10);
        end
      end
  end
endmodule
