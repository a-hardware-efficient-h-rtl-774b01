// l0_pingpong: the three level-0 reference SRAMs and their role rotation.
//
// Level-0 data (a 37x37 full-precision window around the MV predictor: the
// +/-8 search range, the 16x16 block and the 2+3 extra pixels that the 6-tap
// interpolation filter needs) are used twice: by the IME stage for macroblock
// n and, one pipeline stage later, by the FME stage for the same macroblock.
// Instead of copying, three banks rotate. At any time one bank is the IME
// reference, one the FME reference and one is being loaded for the next
// macroblock. A swap pulse (issued when both stages have finished) rotates
// the roles: the freshly loaded bank becomes the IME bank, the IME bank
// becomes the FME bank and the old FME bank is free to be loaded.
// Each role has its own port; every port behaves like ref_sram (registered
// row read, masked 16-sample beat write). Swap must not be issued while a
// read is outstanding. After reset bank 0 is IME, bank 1 load, bank 2 FME.
//
// Three level-0 banks rotating between integer-search reference, fractional-
// search reference and loading follow the published design; the swap pulse is
// a choice made here.
module l0_pingpong
  import me_pkg::*;
#(
  parameter int unsigned N = 37   // window size (rows = columns)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        swap,
  output logic [1:0]                  ime_bank,   // current role assignment
  // load port (writes the bank being filled)
  input  logic                        ld_we,
  input  logic [$clog2(N)-1:0]        ld_row,
  input  logic [$clog2(N)-1:0]        ld_col,
  input  logic [15:0]                 ld_mask,
  input  pix_t [15:0]                 ld_data,
  // IME read port
  input  logic                        ime_re,
  input  logic [$clog2(N)-1:0]        ime_row,
  output pix_t [N-1:0]                ime_rdata,
  // FME read port
  input  logic                        fme_re,
  input  logic [$clog2(N)-1:0]        fme_row,
  output pix_t [N-1:0]                fme_rdata
);
  logic [1:0] ptr;           // bank serving IME
  logic [1:0] ld_bank, fme_bank;

  function automatic logic [1:0] inc3(input logic [1:0] v);
    return (v == 2'd2) ? 2'd0 : v + 2'd1;
  endfunction

  assign ld_bank  = inc3(ptr);
  assign fme_bank = inc3(inc3(ptr));
  assign ime_bank = ptr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    ptr <= 2'd0;
    else if (swap) ptr <= inc3(ptr);

  pix_t [N-1:0] rd [3];

  for (genvar b = 0; b < 3; b++) begin : g_bank
    logic                 re_b;
    logic [$clog2(N)-1:0] row_b;
    always_comb begin
      re_b  = 1'b0;
      row_b = '0;
      if (ptr == 2'(b)) begin
        re_b = ime_re; row_b = ime_row;
      end else if (fme_bank == 2'(b)) begin
        re_b = fme_re; row_b = fme_row;
      end
    end
    ref_sram #(.ROWS(N), .COLS(N), .W(PIX_W)) u_bank (
      .clk  (clk),
      .we   (ld_we && ld_bank == 2'(b)),
      .wrow (ld_row),
      .wcol (ld_col),
      .wmask(ld_mask),
      .wdata(ld_data),
      .re   (re_b),
      .rrow (row_b),
      .rbase('0),
      .rdata(rd[b])
    );
  end

  assign ime_rdata = rd[ptr];
  assign fme_rdata = rd[fme_bank];
endmodule
