// tff_counter: ones counter built from W cascaded T flip-flops, used by the
// branch metric unit to count the code bits in which the received and the
// expected symbol differ.
//
// Stage 0 toggles when en and t_in are high; stage i toggles when en, t_in and
// all lower stages are 1, so q counts up by one per step with t_in high and
// does not switch at all on a step with t_in low. preset_n (active low) sets
// every stage to 1 and clr_n (active low) clears every stage to 0, both at
// once and without waiting for a step; clear wins if both are low. The T
// flip-flops are stepped by the emulation clock clk instead of the enable
// edge of the transistor circuit.
module tff_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         preset_n,
  input  logic         clr_n,
  input  logic         en,
  input  logic         t_in,
  output logic [W-1:0] q
);
  logic [W-1:0] t;   // toggle input of each T flip-flop

  assign t[0] = en & t_in;
  for (genvar i = 1; i < W; i++) begin : g_t
    assign t[i] = t[i-1] & q[i-1];
  end

  // one asynchronous load line; its value picks clear (0) or preset (1)
  logic load_n;
  assign load_n = clr_n & preset_n;

  for (genvar i = 0; i < W; i++) begin : g_tff
    always_ff @(posedge clk or negedge load_n) begin
      if (!load_n)   q[i] <= clr_n;
      else if (t[i]) q[i] <= ~q[i];
    end
  end
endmodule
