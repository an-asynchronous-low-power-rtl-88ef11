// capture_pass_latch: Sutherland's capture-pass latch for two-phase
// (transition) signalling, the storage element of the survivor shift register.
//
// The latch is transparent while its capture line c and pass line p carry the
// same level (equal numbers of events). An event on c makes it hold the data
// present at that moment; the following event on p makes it transparent
// again. cd and pd are the capture-done and pass-done events, c and p delayed
// by one clk cycle. The latch data are sampled on the clk edge at which c
// changes (emulation of the transistor latch, this design's choice).
module capture_pass_latch #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         c,
  input  logic         p,
  output logic         cd,
  output logic         pd,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] held;
  logic         transparent;

  assign transparent = (c == p);
  assign dout        = transparent ? din : held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= '0;
      cd   <= 1'b0;
      pd   <= 1'b0;
    end else begin
      if (transparent) held <= din;
      cd <= c;
      pd <= p;
    end
  end
endmodule
