// c_element: Muller C-element, the state-holding join of the asynchronous
// handshakes (C1..C3 of the pipeline control and the C-elements of the
// survivor shift register).
//
// The output follows its inputs when they agree and holds its value when they
// differ. The original is a transistor-level gate with a keeper; here the held
// value is a flip-flop on the emulation clock clk, so the output follows an
// agreeing input pair one clk cycle later. Reset clears the output to 0
// (INIT parameter). Any inversion bubble of a drawn C-element is made by the
// instantiating module on the input or output net.
module c_element #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        y <= INIT;
    else if (a == b)   y <= a;
  end
endmodule
