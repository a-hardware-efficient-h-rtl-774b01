// fme_qpel: quarter-pel prediction of one 4x4 block for one search candidate.
//
// One instance per SIFME candidate; together the six instances form the search
// pattern selection stage that feeds the six processing units. The candidate
// offset (fx, fy) is in quarter pels relative to the integer MV, each in
// -3..+3. The prediction for pixel (x, y) lies at quarter position
// (4x+fx, 4y+fy). Positions on the half-pel grid are taken from hg directly;
// the others are the rounded average (a+b+1)>>1 of two neighbouring grid
// samples, chosen as in H.264: along the odd axis for positions with one odd
// coordinate, and for positions with both coordinates odd the two of the four
// surrounding grid samples that are horizontal or vertical half-pels (the pair
// on the diagonal whose coordinate sum is odd). Purely combinational.
//
// The published design forms half- and quarter-pel samples for six candidates;
// the H.264 averaging rules and the offset range are choices made here.
module fme_qpel
  import me_pkg::*;
(
  input  pix_t [10:0][10:0]   hg,     // half-pel grid from fme_interp
  input  logic signed [2:0]   fx,
  input  logic signed [2:0]   fy,
  output pix_t [3:0][3:0]     pred    // [row][col]
);
  function automatic pix_t avg(input pix_t a, input pix_t b);
    logic [8:0] s;
    s = 9'(a) + 9'(b) + 9'd1;
    return s[8:1];
  endfunction

  always_comb
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int ax, ay, x0, y0;
        ax = 4 * x + int'(fx) + 4;   // position in quarter pels from grid point 0
        ay = 4 * y + int'(fy) + 4;
        x0 = ax / 2;                 // ax, ay >= 1
        y0 = ay / 2;
        if (ax % 2 == 0 && ay % 2 == 0)
          pred[y][x] = hg[y0][x0];
        else if (ay % 2 == 0)
          pred[y][x] = avg(hg[y0][x0], hg[y0][x0+1]);
        else if (ax % 2 == 0)
          pred[y][x] = avg(hg[y0][x0], hg[y0+1][x0]);
        else if ((x0 + y0) % 2 == 1)
          pred[y][x] = avg(hg[y0][x0], hg[y0+1][x0+1]);
        else
          pred[y][x] = avg(hg[y0][x0+1], hg[y0+1][x0]);
      end
endmodule
