// me_top: two-stage H.264 motion-estimation engine for 1080p-class video.
//
// Stage 1 (IME) runs the three-level parallel multiresolution integer search
// on macroblock n and keeps the two best modes with their MVs; stage 2 (FME)
// refines macroblock n-1 with the six-candidate single-iteration quarter-pel
// search and takes the final mode decision. Both stages advance together on
// mb_go. The level-0 reference windows are not copied between the stages:
// three level-0 SRAMs rotate between the roles IME reference, FME reference
// and loading (l0_pingpong). Levels 1 and 2 keep 6-bit truncated, subsampled
// samples in circular column buffers (39x40 and 67x68 samples) that only need
// a new strip of 8 or 4 sample columns per macroblock along an MB row; their
// current window start columns are l1_base and l2_base.
//
// The external memory controller is outside this module. It fills, through
// the 16-sample (128-bit) write ports:
//   cur_*  the next macroblock's 16x16 luma block (one row per write);
//   l0_*   the next macroblock's 37x37 level-0 window, whose pixel (0,0) is at
//          MB origin + (mvp_q >>> 2) - 10, into the bank being loaded;
//   l1_*, l2_* the new columns of the level-1/2 windows (2:1 / 4:1 subsampled
//          8-bit samples, stored truncated). On an MB-row start the whole
//          window goes to columns 0..38 / 0..66; otherwise the new strip goes
//          to physical columns (base + 39 + i) mod 40 / (base + 67 + i) mod 68.
//          These writes must happen while the IME stage is idle (after
//          ime_done), because the old columns are still read until then.
//   sec_*  on sec_req, the 22x22 patch whose origin is (sec_x, sec_y) pixels
//          from the FME macroblock's origin; then pulse sec_done.
// mb_go (accepted when ready) swaps the level-0 banks, moves the IME result
// and current block into the FME stage and starts it, and, if mb_valid, starts
// IME on the newly loaded macroblock with predictor mvp_q. mb_valid = 0 drains
// the pipeline. fme_done pulses with the decision for the macroblock that
// entered one mb_go earlier.
//
// Following the published design: the two-stage pipeline, the rotating level-0
// banks, the coarse-level buffers, the second reference SRAM and the 128-bit
// load width. Choices made here: the mb_go/ready/mb_valid handshake, the
// circular-base convention, copying the current block into the FME stage
// instead of loading it twice, and keeping the memory controller outside the
// module.
module me_top
  import me_pkg::*;
#(
  parameter int unsigned TRUNC_W = 6    // stored sample width of levels 1 and 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // current macroblock load
  input  logic                     cur_we,
  input  logic [3:0]               cur_row,
  input  pix_t [15:0]              cur_data,
  // reference loads
  input  logic                     l0_we,
  input  logic [5:0]               l0_row,
  input  logic [5:0]               l0_col,
  input  logic [15:0]              l0_mask,
  input  pix_t [15:0]              l0_data,
  input  logic                     l1_we,
  input  logic [5:0]               l1_row,
  input  logic [5:0]               l1_col,
  input  logic [15:0]              l1_mask,
  input  pix_t [15:0]              l1_data,
  input  logic                     l2_we,
  input  logic [6:0]               l2_row,
  input  logic [6:0]               l2_col,
  input  logic [15:0]              l2_mask,
  input  pix_t [15:0]              l2_data,
  input  logic                     sec_we,
  input  logic [4:0]               sec_wrow,
  input  logic [4:0]               sec_wcol,
  input  logic [15:0]              sec_mask,
  input  pix_t [15:0]              sec_data,
  output logic                     sec_req,
  output logic signed [MV_W-1:0]   sec_x,
  output logic signed [MV_W-1:0]   sec_y,
  input  logic                     sec_done,
  output logic [5:0]               l1_base,
  output logic [6:0]               l2_base,
  // pipeline control
  input  logic                     mb_go,
  input  logic                     mb_valid,
  input  logic                     mb_row_start,
  input  mv_t                      mvp_q,
  input  logic [7:0]               lambda,
  output logic                     ready,
  output logic                     ime_done,
  output logic [3:0]               ime_mode_a,
  output logic [3:0]               ime_mode_b,
  // decision
  output logic                     fme_done,
  output logic [3:0]               best_mode,
  output logic [3:0][1:0]          best_sub,
  output logic [4:0]               best_npart,
  output mv_t  [15:0]              best_mv,
  output logic [COST_W-1:0]        best_cost
);
  // ------------------------------------------------------------ registers
  pix_t [MB-1:0][MB-1:0] cur_load, cur_ime, cur_fme;
  mv_t                   mvp_ime, mvp_fme;
  logic                  ime_has;         // IME holds a valid macroblock result
  logic                  go_d, start_ime, start_fme;
  logic                  ime_busy, fme_busy;

  // IME -> FME hand-over register ("best two modes and their MVs")
  logic [3:0]             f_mode_a, f_mode_b;
  logic [3:0][1:0]        f_sub;
  part_best_t [NPART-1:0] f_merged;

  logic [3:0]             i_mode_a, i_mode_b;
  logic [3:0][1:0]        i_sub;
  part_best_t [NPART-1:0] i_merged;
  logic [1:0]             i_src0;

  assign ready      = !ime_busy && !fme_busy && !go_d;
  assign ime_mode_a = i_mode_a;
  assign ime_mode_b = i_mode_b;

  always_ff @(posedge clk) begin
    if (cur_we) cur_load[cur_row] <= cur_data;
    if (mb_go && ready) begin
      cur_fme  <= cur_ime;
      cur_ime  <= cur_load;
      mvp_fme  <= mvp_ime;
      mvp_ime  <= mvp_q;
      f_mode_a <= i_mode_a;
      f_mode_b <= i_mode_b;
      f_sub    <= i_sub;
      f_merged <= i_merged;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ime_has   <= 1'b0;
      go_d      <= 1'b0;
      start_ime <= 1'b0;
      start_fme <= 1'b0;
      l1_base   <= '0;
      l2_base   <= '0;
    end else begin
      go_d      <= mb_go && ready;
      start_ime <= 1'b0;
      start_fme <= 1'b0;
      if (mb_go && ready) begin
        ime_has   <= mb_valid;
        start_ime <= mb_valid;
        start_fme <= ime_has;
        if (mb_valid) begin
          if (mb_row_start) begin
            l1_base <= '0;
            l2_base <= '0;
          end else begin
            l1_base <= (l1_base >= 6'd32) ? l1_base - 6'd32 : l1_base + 6'd8;
            l2_base <= (l2_base >= 7'd64) ? l2_base - 7'd64 : l2_base + 7'd4;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ buffers
  logic        ime_l0_re, fme_l0_re, l1_re, l2_re, sec_re;
  logic [5:0]  ime_l0_row, fme_l0_row, l1_rrow;
  logic [6:0]  l2_rrow;
  logic [4:0]  sec_rrow;
  pix_t [36:0] ime_l0_rdata, fme_l0_rdata;
  logic [39:0][TRUNC_W-1:0] l1_rdata;
  logic [67:0][TRUNC_W-1:0] l2_rdata;
  pix_t [21:0] sec_rdata;
  logic [1:0]  l0_ime_bank;

  l0_pingpong #(.N(37)) u_l0 (
    .clk, .rst_n, .swap(mb_go && ready), .ime_bank(l0_ime_bank),
    .ld_we(l0_we), .ld_row(l0_row), .ld_col(l0_col), .ld_mask(l0_mask), .ld_data(l0_data),
    .ime_re(ime_l0_re), .ime_row(ime_l0_row), .ime_rdata(ime_l0_rdata),
    .fme_re(fme_l0_re), .fme_row(fme_l0_row), .fme_rdata(fme_l0_rdata));

  ref_sram #(.ROWS(39), .COLS(40), .W(TRUNC_W)) u_l1 (
    .clk, .we(l1_we), .wrow(l1_row), .wcol(l1_col), .wmask(l1_mask), .wdata(l1_data),
    .re(l1_re), .rrow(l1_rrow), .rbase(l1_base), .rdata(l1_rdata));

  ref_sram #(.ROWS(67), .COLS(68), .W(TRUNC_W)) u_l2 (
    .clk, .we(l2_we), .wrow(l2_row), .wcol(l2_col), .wmask(l2_mask), .wdata(l2_data),
    .re(l2_re), .rrow(l2_rrow), .rbase(l2_base), .rdata(l2_rdata));

  ref_sram #(.ROWS(22), .COLS(22), .W(PIX_W)) u_sec (
    .clk, .we(sec_we), .wrow(sec_wrow), .wcol(sec_wcol), .wmask(sec_mask), .wdata(sec_data),
    .re(sec_re), .rrow(sec_rrow), .rbase('0), .rdata(sec_rdata));

  // ------------------------------------------------------------ stages
  ime_stage #(.TRUNC_W(TRUNC_W)) u_ime (
    .clk, .rst_n, .start(start_ime), .cur(cur_ime), .mvp_q(mvp_ime),
    .l0_re(ime_l0_re), .l0_row(ime_l0_row), .l0_rdata(ime_l0_rdata),
    .l1_re, .l1_row(l1_rrow), .l1_rdata,
    .l2_re, .l2_row(l2_rrow), .l2_rdata,
    .busy(ime_busy), .done(ime_done),
    .mode_a(i_mode_a), .mode_b(i_mode_b), .sub_mode(i_sub), .merged(i_merged),
    .src_lvl0(i_src0));

  fme_stage u_fme (
    .clk, .rst_n, .start(start_fme),
    .mode_a(f_mode_a), .mode_b(f_mode_b), .sub_mode(f_sub), .merged(f_merged),
    .mvp_q(mvp_fme), .lambda, .cur(cur_fme),
    .l0_re(fme_l0_re), .l0_row(fme_l0_row), .l0_rdata(fme_l0_rdata),
    .sec_req, .sec_x, .sec_y, .sec_done,
    .sec_re, .sec_row(sec_rrow), .sec_rdata,
    .busy(fme_busy), .done(fme_done),
    .best_mode, .best_sub, .best_npart, .best_mv, .best_cost);
endmodule
