// acs_unit: add-compare-select for one trellis state.
//
// Two dual-rail ripple adders form the candidate metrics bm1+pm1 (upper
// branch) and bm2+pm2 (lower branch) as 5-bit words (four sum bits plus the
// carry). A 5-bit comparator decides whether the lower candidate is strictly
// smaller; that decision bit (1 = lower branch, 0 = upper) goes to the
// survivor memory and drives five dual-rail 2:1 selectors that pass the
// smaller candidate on as the new path metric f. On a tie the upper branch is
// kept (this design's choice). All outputs are null while en is low and become
// valid only after every input bit is valid. Combinational.
module acs_unit
  import vit_pkg::*;
#(
  parameter int unsigned PM_W = PM_W_DEF
) (
  input  dr_t [PM_W-1:0] bm1,
  input  dr_t [PM_W-1:0] pm1,
  input  dr_t [PM_W-1:0] bm2,
  input  dr_t [PM_W-1:0] pm2,
  input  logic           en,
  output dr_t [PM_W:0]   f,
  output dr_t            dec
);
  dr_t [PM_W:0] s1, s2;

  dr_ripple_adder #(.W(PM_W)) u_add1 (.a(bm1), .b(pm1), .en(en), .s(s1));
  dr_ripple_adder #(.W(PM_W)) u_add2 (.a(bm2), .b(pm2), .en(en), .s(s2));
  dr_comparator   #(.W(PM_W+1)) u_cmp (.a(s1), .b(s2), .lt(dec));

  for (genvar i = 0; i <= PM_W; i++) begin : g_sel
    dr_mux2 u_sel (.a(s1[i]), .b(s2[i]), .s(dec), .y(f[i]));
  end
endmodule
