// smu_shift_register: serial-in serial-out shift register of decoded bits,
// built as a two-phase micropipeline of capture-pass latches and C-elements.
//
// Stage k has a C-element whose inputs are the request from the left (rin for
// stage 0, capture-done of latch k-1 otherwise) and the inverted pass-done of
// its own latch; its output is the capture line of latch k and the pass line
// of latch k-1. The pass line of the last latch is aout. ain is the
// capture-done of latch 0 and rout that of the last latch. Each transition on
// rin with a bit on din puts one bit in; each transition on rout offers one bit
// on dout, which stays until aout makes the same transition. It holds up to
// DEPTH bits. Bundled data: din must be stable when rin toggles. The latch
// chain with C-elements and the default of eight latches follow the original
// survivor memory drawing; the exact C-element wiring is the classic
// micropipeline one, chosen here.
module smu_shift_register #(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rin,
  output logic ain,
  input  logic din,
  output logic rout,
  input  logic aout,
  output logic dout
);
  logic [DEPTH-1:0] c, cd, pd, p;
  logic [DEPTH:0]   d;

  assign d[0] = din;

  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    c_element u_c (.clk, .rst_n,
                   .a((k == 0) ? rin : cd[(k == 0) ? 0 : k-1]),
                   .b(~pd[k]), .y(c[k]));
    assign p[k] = (k == DEPTH-1) ? aout : c[(k == DEPTH-1) ? k : k+1];
    capture_pass_latch #(.W(1)) u_l (.clk, .rst_n, .c(c[k]), .p(p[k]),
                                     .cd(cd[k]), .pd(pd[k]), .din(d[k]), .dout(d[k+1]));
  end

  assign ain  = cd[0];
  assign rout = cd[DEPTH-1];
  assign dout = d[DEPTH];
endmodule
