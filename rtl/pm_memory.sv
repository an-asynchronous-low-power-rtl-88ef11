// pm_memory: path metric memory, one PM_W-bit metric per trellis state.
//
// On a write (we high for one clk cycle) every state takes its new
// (PM_W+1)-bit metric from the add-compare-select units minus the smallest of
// them, so the stored metrics stay small and fit in PM_W bits (for K = 4 and
// rate 1/2 the spread between metrics never exceeds 2*(K-1) = 6). Reset loads
// metric 0 into state 0 and INIT_PM into every other state, since the encoder
// starts in state 0. A normalised metric that would still not fit (possible
// only for states not yet reachable from state 0 in the first K-1 symbols at
// larger K) is clamped to 2**PM_W-1. Normalisation, clamping and reset values
// are this design's choices.
module pm_memory #(
  parameter int unsigned K       = 4,
  parameter int unsigned PM_W    = 4,
  parameter int unsigned INIT_PM = 8
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                we,
  input  logic [2**(K-1)-1:0][PM_W:0]         f_in,
  output logic [2**(K-1)-1:0][PM_W-1:0]       pm
);
  localparam int unsigned NS = 2**(K-1);

  logic [PM_W:0]         min_val;

  // clamp a normalised metric to the largest PM_W-bit value
  function automatic logic [PM_W-1:0] sat(input logic [PM_W:0] v);
    return v[PM_W] ? '1 : v[PM_W-1:0];
  endfunction

  min_pm_pointer #(.N(NS), .W(PM_W+1)) u_min (.pm(f_in), .ptr(), .min(min_val));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) pm[s] <= (s == 0) ? '0 : PM_W'(INIT_PM);
    end else if (we) begin
      for (int s = 0; s < NS; s++) pm[s] <= sat(f_in[s] - min_val);
    end
  end

endmodule
