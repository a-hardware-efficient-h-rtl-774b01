// ime_stage: integer motion estimation kernel (parallel multiresolution search
// plus mode filtering).
//
// The three search levels run side by side on the same current macroblock and
// are started together; each reads its own reference buffer. When all three
// have finished, mode_select merges their results and picks the two modes for
// fractional ME. Level 0 is centred on the integer MV predictor (the quarter-pel
// predictor rounded down), levels 1 and 2 on (0,0).
//
// Timing: start (while idle) -> about 256 + 17 + 2 cycles (level 0 dominates
// with its 16-row window fill) -> done pulse with the results registered in
// mode_select; they are held until the next start.
//
// Three levels in parallel on one shared current block follow the published
// design; one predictor per macroblock and its rounding to integer-pel are
// choices made here.
module ime_stage
  import me_pkg::*;
#(
  parameter int unsigned TRUNC_W = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  pix_t [MB-1:0][MB-1:0]      cur,
  input  mv_t                        mvp_q,      // quarter-pel MV predictor
  // level buffers
  output logic                       l0_re,
  output logic [5:0]                 l0_row,
  input  pix_t [36:0]                l0_rdata,
  output logic                       l1_re,
  output logic [5:0]                 l1_row,
  input  logic [39:0][TRUNC_W-1:0]   l1_rdata,
  output logic                       l2_re,
  output logic [6:0]                 l2_row,
  input  logic [67:0][TRUNC_W-1:0]   l2_rdata,
  // result
  output logic                       busy,
  output logic                       done,
  output logic [3:0]                 mode_a,
  output logic [3:0]                 mode_b,
  output logic [3:0][1:0]            sub_mode,
  output part_best_t [NPART-1:0]     merged,
  output logic [1:0]                 src_lvl0
);
  part_best_t [NPART-1:0] b0, b1, b2;
  logic [2:0] busy_l, done_l, fin;
  mv_t center;
  logic all_done;

  assign center.x = mvp_q.x >>> 2;
  assign center.y = mvp_q.y >>> 2;

  ime_level #(.LEVEL(0), .TRUNC_W(TRUNC_W)) u_l0 (
    .clk, .rst_n, .start, .cur, .center,
    .rd_en(l0_re), .rd_row(l0_row), .rd_data(l0_rdata),
    .busy(busy_l[0]), .done(done_l[0]), .best(b0));
  ime_level #(.LEVEL(1), .TRUNC_W(TRUNC_W)) u_l1 (
    .clk, .rst_n, .start, .cur, .center,
    .rd_en(l1_re), .rd_row(l1_row), .rd_data(l1_rdata),
    .busy(busy_l[1]), .done(done_l[1]), .best(b1));
  ime_level #(.LEVEL(2), .TRUNC_W(TRUNC_W)) u_l2 (
    .clk, .rst_n, .start, .cur, .center,
    .rd_en(l2_re), .rd_row(l2_row), .rd_data(l2_rdata),
    .busy(busy_l[2]), .done(done_l[2]), .best(b2));

  // collect the three done pulses
  logic sel_valid;
  assign all_done = &(fin | done_l) && (|(done_l));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fin <= '0;
    else if (start) fin <= '0;
    else if (all_done) fin <= '0;
    else fin <= fin | done_l;
  end

  mode_select u_sel (
    .clk, .rst_n, .in_valid(all_done), .l0(b0), .l1(b1), .l2(b2),
    .out_valid(sel_valid), .mode_a, .mode_b, .sub_mode, .merged, .src_lvl0);

  logic sel_pend;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        sel_pend <= 1'b0;
    else if (start)    sel_pend <= 1'b1;
    else if (sel_valid) sel_pend <= 1'b0;

  assign busy = (|busy_l) || sel_pend;
  assign done = sel_valid;
endmodule
