// dr_ripple_adder: dual-rail ripple carry adder of two W-bit words giving a
// (W+1)-bit sum, the adder of the add-compare-select unit.
//
// Bit 0 is a half adder (XOR and AND gate); bits 1..W-1 are full adders that
// ripple the carry; the last carry becomes the top sum bit. With the default
// W = 4 this is the 4-bit adder whose outputs s0..s3 and carry c0 form the
// 5-bit metric fed to the comparator. Operand a is the branch metric, b the
// previous path metric. The result is null until every operand bit is valid
// and the carry has rippled through; it is null while en is low.
module dr_ripple_adder
  import vit_pkg::*;
#(
  parameter int unsigned W = PM_W_DEF
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  input  logic        en,
  output dr_t [W:0]   s
);
  dr_t [W:1] cy;   // cy[i] = carry into bit i

  dcvs_xor2 u_h_sum (.a(a[0]), .b(b[0]), .en(en), .y(s[0]));
  dcvs_and2 u_h_cy  (.a(a[0]), .b(b[0]), .en(en), .y(cy[1]));

  for (genvar i = 1; i < W; i++) begin : g_fa
    dr_full_adder u_fa (.a(a[i]), .b(b[i]), .c(cy[i]), .en(en), .sum(s[i]), .carry(cy[i+1]));
  end

  assign s[W] = cy[W];
endmodule
