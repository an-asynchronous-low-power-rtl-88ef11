// dr_comparator: dual-rail magnitude comparator of two W-bit words, the 5-bit
// comparator of the add-compare-select unit.
//
// lt is a valid 1 when b < a and a valid 0 otherwise (ties give 0, so the
// first operand wins). The result stays null until every bit of both words is
// valid. It is written behaviourally on the decoded words; the transistor
// structure of the comparator is not given. Combinational.
module dr_comparator
  import vit_pkg::*;
#(
  parameter int unsigned W = PM_W_DEF + 1
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  output dr_t         lt
);
  logic         ok;
  logic [W-1:0] av, bv;

  always_comb begin
    ok = 1'b1;
    for (int i = 0; i < W; i++) begin
      ok &= dr_valid(a[i]) & dr_valid(b[i]);
      av[i] = a[i][1];
      bv[i] = b[i][1];
    end
    lt = ok ? dr_enc(bv < av) : DR_NULL;
  end
endmodule
