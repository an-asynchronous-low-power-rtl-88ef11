// dcvs_and2: dual-rail two-input AND gate with an evaluate enable.
//
// The true rail rises when both inputs are valid ones, the false rail when both
// inputs are valid and at least one is zero. Waiting for both inputs (input
// completeness) is this design's choice so that a valid output always implies
// valid inputs, as a quasi-delay-insensitive pipeline needs. While en is low
// the output is the spacer. Purely combinational.
module dcvs_and2
  import vit_pkg::*;
(
  input  dr_t  a,
  input  dr_t  b,
  input  logic en,
  output dr_t  y
);
  always_comb begin
    y[1] = en & (a[1] & b[1]);
    y[0] = en & ((a[0] & b[0]) | (a[0] & b[1]) | (a[1] & b[0]));
  end
endmodule
