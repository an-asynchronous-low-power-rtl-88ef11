// pchb_ctrl: control of one precharge-half-buffer (PCHB) pipeline stage.
//
// The left completion detector (LCD) watches the stage's dual-rail input, the
// right completion detector (RCD) its dual-rail output, and a C-element with an
// inverted output joins them: en falls once input and output are both valid
// and rises once both are null again. en is the stage's own evaluate enable and
// is also its acknowledge to the previous stage (the "Lack" line, active low:
// high means ready for a new token). Each detector and the C-element add one
// clk cycle of delay.
module pchb_ctrl
  import vit_pkg::*;
#(
  parameter int unsigned WL = 1,
  parameter int unsigned WR = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dr_t [WL-1:0] l_data,
  input  dr_t [WR-1:0] r_data,
  output logic         lcd,
  output logic         rcd,
  output logic         en
);
  logic c;

  completion_detector #(.W(WL)) u_lcd (.clk, .rst_n, .d(l_data), .done(lcd));
  completion_detector #(.W(WR)) u_rcd (.clk, .rst_n, .d(r_data), .done(rcd));
  c_element u_c (.clk, .rst_n, .a(lcd), .b(rcd), .y(c));

  assign en = ~c;
endmodule
