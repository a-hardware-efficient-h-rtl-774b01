// sad4p: four-pixel SAD unit, the basic processing element of every IME level.
//
// Computes |C0-R0| + |C1-R1| + |C2-R2| + |C3-R3| for four current samples C and
// four reference samples R, following the 4p-SAD unit of the design: four
// absolute-difference cells whose results are chained through three adders.
// Purely combinational; the enclosing search point module registers the
// result. The sample width W is a parameter because levels 1 and 2 store
// bit-truncated samples (6 bits at the default configuration) while level 0
// keeps full 8-bit samples.
//
// The four-pair absolute-difference unit and its adder come from the published
// design; the output width and the purely combinational form are choices made
// here.
module sad4p #(
  parameter int unsigned W = 8
) (
  input  logic [3:0][W-1:0] cur,   // C0..C3
  input  logic [3:0][W-1:0] ref_s, // R0..R3
  output logic [W+1:0]      sad    // sum of the four absolute differences
);
  logic [3:0][W-1:0] ad;

  always_comb begin
    for (int i = 0; i < 4; i++)
      ad[i] = (cur[i] >= ref_s[i]) ? cur[i] - ref_s[i] : ref_s[i] - cur[i];
    sad = (W+2)'(ad[0]) + (W+2)'(ad[1]) + (W+2)'(ad[2]) + (W+2)'(ad[3]);
  end
endmodule
