// me_pkg: types, constants and helper functions shared by the motion-estimation
// engine.
//
// The engine works on one 16x16 luma macroblock (MB) at a time. Integer motion
// estimation (IME) runs three independent search levels in parallel (level 0:
// full resolution, +/-8 around the MV predictor; level 1: 2:1 subsampled in each
// direction, [-32,31] around (0,0); level 2: 4:1 subsampled, [-128,127] around
// (0,0)). The H.264 block partitions of an MB are numbered here in one flat list
// of 41 entries, the order used by every module:
//    0        16x16
//    1..2     16x8   (top, bottom)
//    3..4     8x16   (left, right)
//    5..8     8x8    (quadrant 0..3, raster order)
//    9..16    8x4    (9 + 2*quadrant + sub)
//    17..24   4x8    (17 + 2*quadrant + sub)
//    25..40   4x4    (25 + 4*quadrant + sub)
// Modes follow the document's numbering: 1 = 16x16, 2 = 16x8, 3 = 8x16,
// 4..7 = 8x8, 8x4, 4x8, 4x4 inside an 8x8 quadrant. Mode 8 stands for the
// "8x8 with sub-partitions" macroblock mode, where each quadrant carries its own
// sub-mode 4..7.
//
// Mode numbers and partition sizes follow H.264 and the published design; the
// flat partition order and the field widths are choices made here.
package me_pkg;

  localparam int unsigned MB       = 16;   // macroblock size (pixels)
  localparam int unsigned PIX_W    = 8;    // luma sample width
  localparam int unsigned NPART    = 41;   // partitions checked by IME
  localparam int unsigned SAD_W    = 16;   // normalised SAD width (max 256*255)
  localparam int unsigned COST_W   = 24;   // FME cost width (SATD + MV cost)
  localparam int unsigned MV_W     = 12;   // signed MV component width (quarter-pel)

  typedef logic [PIX_W-1:0] pix_t;

  // Motion vector. IME produces integer-pel vectors, FME quarter-pel vectors;
  // the unit is stated where a port carries one.
  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // Best match of one partition
  typedef struct packed {
    logic [SAD_W-1:0] sad;
    mv_t              mv;     // integer-pel
  } part_best_t;

  // Geometry of a partition: origin and size in pixels inside the MB.
  typedef struct packed {
    logic [4:0] x0;
    logic [4:0] y0;
    logic [4:0] w;
    logic [4:0] h;
  } part_geom_t;

  function automatic part_geom_t part_geom(input int unsigned p);
    part_geom_t g;
    int unsigned q, s;
    g = '0;
    if (p == 0) begin
      g.x0 = 0; g.y0 = 0; g.w = 16; g.h = 16;
    end else if (p <= 2) begin
      g.x0 = 0; g.y0 = 5'((p - 1) * 8); g.w = 16; g.h = 8;
    end else if (p <= 4) begin
      g.x0 = 5'((p - 3) * 8); g.y0 = 0; g.w = 8; g.h = 16;
    end else if (p <= 8) begin
      q = p - 5;
      g.x0 = 5'((q % 2) * 8); g.y0 = 5'((q / 2) * 8); g.w = 8; g.h = 8;
    end else if (p <= 16) begin
      q = (p - 9) / 2; s = (p - 9) % 2;
      g.x0 = 5'((q % 2) * 8); g.y0 = 5'((q / 2) * 8 + s * 4); g.w = 8; g.h = 4;
    end else if (p <= 24) begin
      q = (p - 17) / 2; s = (p - 17) % 2;
      g.x0 = 5'((q % 2) * 8 + s * 4); g.y0 = 5'((q / 2) * 8); g.w = 4; g.h = 8;
    end else begin
      q = (p - 25) / 4; s = (p - 25) % 4;
      g.x0 = 5'((q % 2) * 8 + (s % 2) * 4); g.y0 = 5'((q / 2) * 8 + (s / 2) * 4);
      g.w = 4; g.h = 4;
    end
    return g;
  endfunction

  // First partition index and partition count of a macroblock mode 1..3, or of
  // sub-mode 4..7 inside quadrant q.
  function automatic int unsigned mode_first(input int unsigned mode, input int unsigned q);
    case (mode)
      1: return 0;
      2: return 1;
      3: return 3;
      4: return 5 + q;
      5: return 9 + 2 * q;
      6: return 17 + 2 * q;
      default: return 25 + 4 * q;
    endcase
  endfunction

  function automatic int unsigned mode_count(input int unsigned mode);
    case (mode)
      1: return 1;
      2, 3, 5, 6: return 2;
      4: return 1;
      default: return 4;
    endcase
  endfunction

  // Length in bits of the signed Exp-Golomb code se(v) of an MV difference.
  function automatic int unsigned se_bits(input logic signed [MV_W:0] v);
    logic [MV_W+1:0] code_num;
    int unsigned     len;
    code_num = (v > 0) ? (MV_W+2)'(2 * v - 1) : (MV_W+2)'(-2 * v);
    code_num = code_num + 1'b1;
    len = 0;
    for (int i = 0; i < MV_W + 2; i++)
      if (code_num[i]) len = i;
    return 2 * len + 1;
  endfunction

endpackage
