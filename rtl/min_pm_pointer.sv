// min_pm_pointer: pointer to the trellis state with the smallest path metric.
//
// The pointer itself is part of the original survivor scheme; the linear
// scan and its tie rule (the first, lowest-index state among equal minima)
// are this design's choices. Returns the index ptr and the minimum value. Used by the
// survivor memory (which decision bit to emit) and by the path metric memory
// (metric normalisation). Combinational.
module min_pm_pointer #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 5
) (
  input  logic [N-1:0][W-1:0]   pm,
  output logic [$clog2(N)-1:0]  ptr,
  output logic [W-1:0]          min
);
  always_comb begin
    ptr = '0;
    min = pm[0];
    for (int i = 1; i < N; i++)
      if (pm[i] < min) begin
        min = pm[i];
        ptr = ($clog2(N))'(i);
      end
  end
endmodule
