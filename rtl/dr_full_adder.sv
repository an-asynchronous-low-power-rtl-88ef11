// dr_full_adder: dual-rail one-bit full adder.
//
// The sum is a three-input XOR, built from two DCVS XOR gates; the carry is
// (a AND b) OR (c AND (a XOR b)), built from two DCVS AND gates and a
// dual-rail OR. The XOR/AND/OR composition follows the full adder drawn for the
// design; the exact carry factorisation is this design's choice. All outputs
// are null while en is low or while any input is null. Combinational.
module dr_full_adder
  import vit_pkg::*;
(
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  c,
  input  logic en,
  output dr_t  sum,
  output dr_t  carry
);
  dr_t ab_x, ab_a, c_a;

  dcvs_xor2 u_x1 (.a(a),    .b(b), .en(en), .y(ab_x));
  dcvs_xor2 u_x2 (.a(ab_x), .b(c), .en(en), .y(sum));
  dcvs_and2 u_a1 (.a(a),    .b(b), .en(en), .y(ab_a));
  dcvs_and2 u_a2 (.a(ab_x), .b(c), .en(en), .y(c_a));

  // dual-rail OR, complete in both inputs
  always_comb begin
    carry[1] = (ab_a[1] & c_a[1]) | (ab_a[1] & c_a[0]) | (ab_a[0] & c_a[1]);
    carry[0] = ab_a[0] & c_a[0];
  end
endmodule
