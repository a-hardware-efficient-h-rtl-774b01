// ime_level: one level of the parallel multiresolution integer search.
//
// LEVEL selects the configuration (SUB = subsampling per direction):
//   level 0: SUB=1, 16x16-sample block, 16x16 positions [-8,7] around the
//            integer MV predictor, 1 search point module, all 41 partitions
//   level 1: SUB=2, 8x8-sample block, 32x32 positions covering [-32,31]
//            around (0,0) in steps of 2, 4 modules, partitions of modes 1-4
//   level 2: SUB=4, 4x4-sample block, 64x64 positions covering [-128,127]
//            around (0,0) in steps of 4, 16 modules, the 16x16 partition only
// Each level checks NSP = SUB*SUB positions per cycle, so every level
// finishes its full search in 256 compute cycles.
//
// Data flow. The level's reference buffer delivers one window row per read
// (WIN = 31, 39, 67 samples). The engine keeps BLK window rows in registers.
// For a row offset ry it steps through NPOS/NSP column groups; a column mux
// takes NSP+BLK-1 samples (16, 11, 19) of every held row, from which the NSP
// candidate blocks of adjacent horizontal positions are cut. When a row offset
// is finished the rows move up by one and the next buffer row (prefetched
// during the row offset) enters at the bottom, so after an initial fill of
// BLK rows no cycle is lost. Each search point module yields 4x4-sample block
// SADs one cycle later; the summation tree builds the partition SADs, a
// minimum picks the best of the NSP positions and a running minimum keeps the
// best of the whole search per partition (first position in scan order wins
// ties). Stored SADs are normalised to full-pixel, full-precision scale by a
// left shift of 2*LEVEL (pixel count) plus the number of truncated bits.
//
// Timing: start (pulse, while idle) -> BLK+1 fill cycles -> 256 compute
// cycles -> 1 drain cycle -> done pulse; best[] is then valid and held until
// the next start. The current macroblock (cur) and center must stay stable
// while busy. Best MVs are integer-pel and absolute (center included).
//
// Following the published design: search ranges and centres, subsampling
// factors, module counts, the 256-cycle schedule, the window-row widths and
// column-mux widths (16, 11, 19), and the left shifts that bring coarse SADs
// to a common scale. Choices made here: decimation as the subsampling, the
// extra shift for truncated bits, the row-register window with prefetch, the
// fill and drain cycles, tie-breaking, and no MV cost in the integer search.
module ime_level
  import me_pkg::*;
#(
  parameter int unsigned LEVEL   = 0,
  parameter int unsigned TRUNC_W = 6,   // stored sample width of levels 1 and 2
  // derived
  localparam int unsigned SUB  = 1 << LEVEL,
  localparam int unsigned BLK  = 16 / SUB,
  localparam int unsigned NSP  = SUB * SUB,
  localparam int unsigned NPOS = 16 * SUB,
  localparam int unsigned WIN  = NPOS + BLK - 1,
  localparam int unsigned NCG  = NPOS / NSP,
  localparam int unsigned W    = (LEVEL == 0) ? PIX_W : TRUNC_W,
  localparam int unsigned COLS = (LEVEL == 0) ? 37 : WIN + 1,   // buffer row length
  localparam int unsigned COFF = (LEVEL == 0) ? 2 : 0,          // window start in a row
  localparam int unsigned ROFF = (LEVEL == 0) ? 2 : 0,
  localparam int unsigned NPL  = (LEVEL == 0) ? 41 : (LEVEL == 1) ? 9 : 1,
  localparam int unsigned MUXW = NSP + BLK - 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  pix_t [MB-1:0][MB-1:0]         cur,       // current MB [row][col]
  input  mv_t                           center,    // integer-pel search center (level 0)
  // buffer read port
  output logic                          rd_en,
  output logic [$clog2(COLS)-1:0]       rd_row,
  input  logic [COLS-1:0][W-1:0]        rd_data,   // one cycle after rd_en
  // result
  output logic                          busy,
  output logic                          done,
  output part_best_t [NPART-1:0]        best
);
  localparam int unsigned SHIFT = 2 * LEVEL + (PIX_W - W);
  localparam int unsigned BSW   = W + 6;       // 4x4-sample block SAD width
  localparam int unsigned TW    = BSW + 4;     // partition SAD width
  localparam int signed   OFF   = 8 * SUB * SUB;

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [BLK-1:0][WIN-1:0][W-1:0] win;        // held window rows [row][col]
  logic [WIN-1:0][W-1:0]          next_row;
  logic [$clog2(BLK+1)-1:0]       fill_cnt;
  logic [$clog2(NPOS)-1:0]        ry;
  logic [$clog2(NCG+1)-1:0]       cg;
  logic                           rd_pend;    // rd_data valid this cycle
  logic                           p1_valid;
  logic [$clog2(NPOS)-1:0]        p1_ry;
  logic [$clog2(NCG+1)-1:0]       p1_cg;

  // ---------------------------------------------------------------- subsample
  logic [BLK-1:0][BLK-1:0][W-1:0] cur_s;
  always_comb
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        cur_s[r][c] = cur[SUB*r][SUB*c][PIX_W-1 -: W];

  // ---------------------------------------------------------------- column mux
  logic [BLK-1:0][MUXW-1:0][W-1:0] mux_out;
  always_comb
    for (int r = 0; r < BLK; r++)
      for (int j = 0; j < MUXW; j++)
        mux_out[r][j] = win[r][int'(cg) * NSP + j];

  // ---------------------------------------------------------------- search points
  logic [NSP-1:0][BLK/4-1:0][BLK/4-1:0][BSW-1:0] blk_sad;
  logic [NSP-1:0][NPART-1:0][TW-1:0]             psad;

  for (genvar k = 0; k < NSP; k++) begin : g_sp
    logic [BLK-1:0][BLK-1:0][W-1:0] cand;
    always_comb
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++)
          cand[r][c] = mux_out[r][k + c];

    sp_module #(.W(W), .BLK(BLK)) u_sp (
      .clk    (clk),
      .cur    (cur_s),
      .ref_s  (cand),
      .blk_sad(blk_sad[k])
    );

    if (LEVEL == 2) begin : g_l2
      always_comb begin
        psad[k]    = '0;
        psad[k][0] = TW'(blk_sad[k][0][0]);
      end
    end else begin : g_tree
      sad_tree #(.G(BLK / 4), .IW(BSW), .OW(TW)) u_tree (
        .in_sad  (blk_sad[k]),
        .part_sad(psad[k])
      );
    end
  end

  // ---------------------------------------------------------------- minimum
  logic [NPL-1:0][TW-1:0]          min_sad;
  logic [NPL-1:0][$clog2(NSP+1)-1:0] min_k;
  always_comb
    for (int p = 0; p < NPL; p++) begin
      min_sad[p] = psad[0][p];
      min_k[p]   = '0;
      for (int k = 1; k < NSP; k++)
        if (psad[k][p] < min_sad[p]) begin
          min_sad[p] = psad[k][p];
          min_k[p]   = ($clog2(NSP+1))'(k);
        end
    end

  logic [NPL-1:0][TW-1:0] run_sad;
  logic [NPL-1:0][$clog2(NPOS)-1:0] run_dx, run_dy;

  // ---------------------------------------------------------------- control
  assign busy = (state != S_IDLE);

  always_comb begin
    rd_en  = 1'b0;
    rd_row = '0;
    if (state == S_FILL && fill_cnt < BLK) begin
      rd_en  = 1'b1;
      rd_row = ($clog2(COLS))'(ROFF + fill_cnt);
    end else if (state == S_RUN && cg == 0 && int'(ry) + BLK < WIN) begin
      rd_en  = 1'b1;
      rd_row = ($clog2(COLS))'(ROFF + int'(ry) + BLK);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      fill_cnt <= '0;
      ry       <= '0;
      cg       <= '0;
      rd_pend  <= 1'b0;
      p1_valid <= 1'b0;
      p1_ry    <= '0;
      p1_cg    <= '0;
      done     <= 1'b0;
      run_sad  <= '0;
      run_dx   <= '0;
      run_dy   <= '0;
    end else begin
      done     <= 1'b0;
      rd_pend  <= rd_en;
      p1_valid <= (state == S_RUN);
      p1_ry    <= ry;
      p1_cg    <= cg;
      case (state)
        S_IDLE: if (start) begin
          state    <= S_FILL;
          fill_cnt <= '0;
          ry       <= '0;
          cg       <= '0;
          run_sad  <= '1;
        end
        S_FILL: begin
          fill_cnt <= fill_cnt + 1'b1;
          if (fill_cnt == BLK) state <= S_RUN;
        end
        S_RUN: begin
          if (cg == NCG - 1) begin
            cg <= '0;
            if (ry == NPOS - 1) state <= S_DRAIN;
            else                ry    <= ry + 1'b1;
          end else begin
            cg <= cg + 1'b1;
          end
        end
        S_DRAIN: if (!p1_valid) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      // running minimum over the search (pipeline stage 2)
      if (p1_valid)
        for (int p = 0; p < NPL; p++)
          if (min_sad[p] < run_sad[p]) begin
            run_sad[p] <= min_sad[p];
            run_dx[p]  <= ($clog2(NPOS))'(int'(p1_cg) * NSP + int'(min_k[p]));
            run_dy[p]  <= p1_ry;
          end
    end
  end

  // window registers: shifted during the fill and at the end of each row offset
  always_ff @(posedge clk) begin
    if (state == S_FILL && rd_pend) begin
      for (int r = 0; r < BLK - 1; r++) win[r] <= win[r+1];
      win[BLK-1] <= rd_data[COFF +: WIN];
    end
    if (state == S_RUN && rd_pend)
      next_row <= rd_data[COFF +: WIN];
    if (state == S_RUN && cg == NCG - 1) begin
      for (int r = 0; r < BLK - 1; r++) win[r] <= win[r+1];
      win[BLK-1] <= next_row;
    end
  end

  // ---------------------------------------------------------------- result
  always_comb begin
    best = '0;
    for (int p = 0; p < NPL; p++) begin
      best[p].sad  = SAD_W'(run_sad[p] << SHIFT);
      best[p].mv.x = MV_W'(((LEVEL == 0) ? int'(center.x) : 0) + int'(run_dx[p]) * SUB - OFF);
      best[p].mv.y = MV_W'(((LEVEL == 0) ? int'(center.y) : 0) + int'(run_dy[p]) * SUB - OFF);
    end
  end
endmodule
