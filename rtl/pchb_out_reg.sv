// pchb_out_reg: output keeper of a PCHB stage.
//
// The dual-rail output evaluates once: when pc (the next stage's enable) and
// en (this stage's enable) are both high, the output is still null and the
// combinational function f has become completely valid, f is captured and a
// one-cycle capture pulse is given. The output then holds, whatever f does,
// until pc and en are both low, which precharges it back to null. This mirrors
// the series pc/en pull-up and pull-down pairs of a PCHB gate: evaluate on
// pc AND en, precharge on NOT pc AND NOT en, hold otherwise.
module pchb_out_reg
  import vit_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pc,
  input  logic        en,
  input  dr_t [W-1:0] f,
  output dr_t [W-1:0] q,
  output logic        capture
);
  logic f_valid, q_null;

  always_comb begin
    f_valid = 1'b1;
    q_null  = 1'b1;
    for (int i = 0; i < W; i++) begin
      f_valid &= dr_valid(f[i]);
      q_null  &= dr_is_null(q[i]);
    end
    capture = pc & en & q_null & f_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              q <= '0;
    else if (!pc && !en)     q <= '0;
    else if (capture)        q <= f;
  end
endmodule
