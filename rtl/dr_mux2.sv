// dr_mux2: dual-rail 2:1 multiplexer: y = s ? b : a.
//
// Each output rail is an OR of two AND terms (select rail AND data rail), the
// structure of a DCVS multiplexer with complementary select lines s and s bar.
// The output stays null while the select or the chosen input is null.
// The ports follow the multiplexer of the original design; which input a
// select of 1 picks (b here) is this design's choice. Combinational.
module dr_mux2
  import vit_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t s,
  output dr_t y
);
  always_comb begin
    y[1] = (s[0] & a[1]) | (s[1] & b[1]);
    y[0] = (s[0] & a[0]) | (s[1] & b[0]);
  end
endmodule
