// dcvs_xor2: dual-rail two-input XOR gate with an evaluate enable, the logic
// of the differential cascode voltage switch (DCVS) XOR used in the branch
// metric unit and the adders.
//
// While en is low both output rails sit at the spacer (the precharge phase).
// While en is high the gate evaluates: the true rail rises for a != b and the
// false rail for a == b, each only once both inputs carry valid codes, so a
// null input keeps the output null. Purely combinational; the precharge
// transistors and keepers of the transistor circuit are not modelled.
module dcvs_xor2
  import vit_pkg::*;
(
  input  dr_t  a,
  input  dr_t  b,
  input  logic en,
  output dr_t  y
);
  always_comb begin
    y[1] = en & ((a[1] & b[0]) | (a[0] & b[1]));
    y[0] = en & ((a[1] & b[1]) | (a[0] & b[0]));
  end
endmodule
