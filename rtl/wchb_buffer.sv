// wchb_buffer: weak-conditioned half buffer (WCHB) for one dual-rail bit.
//
// Each output rail is a C-element of the matching input rail and the inverted
// right acknowledge, so a new value passes only after the right side has
// released the previous one, and the spacer passes only after the right side
// has acknowledged. The left acknowledge is the OR of the output rails
// (output valid). Four-phase, ack polarity: lack/rack high = acknowledged.
// Each transition takes one clk cycle.
module wchb_buffer
  import vit_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dr_t  l,
  output logic lack,
  output dr_t  r,
  input  logic rack
);
  c_element u_ct (.clk, .rst_n, .a(l[1]), .b(~rack), .y(r[1]));
  c_element u_cf (.clk, .rst_n, .a(l[0]), .b(~rack), .y(r[0]));

  assign lack = r[1] | r[0];

  a_rails: assert property (@(posedge clk) disable iff (!rst_n) r != 2'b11)
    else $error("wchb_buffer: both rails high");
endmodule
