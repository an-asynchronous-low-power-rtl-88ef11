// completion_detector: dual-rail completion detection (the LCD and RCD blocks
// of the pipeline).
//
// Each bit is validity-checked with an OR of its two rails, and the W checks
// are joined by a C-element tree so the result rises only when every bit is
// valid and falls only when every bit has returned to the spacer. The join is
// written as one C-element over the all-valid and all-null conditions, so the
// output lags the data by one emulation clock. Widths are set by the user.
module completion_detector
  import vit_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dr_t [W-1:0] d,
  output logic        done
);
  logic all_valid, all_null;

  always_comb begin
    all_valid = 1'b1;
    all_null  = 1'b1;
    for (int i = 0; i < W; i++) begin
      all_valid &= dr_valid(d[i]);
      all_null  &= dr_is_null(d[i]);
    end
  end

  // rises when all valid, falls when all null, holds in between
  c_element u_join (.clk, .rst_n, .a(all_valid), .b(~all_null), .y(done));

  // a dual-rail bit never has both rails high
  for (genvar i = 0; i < W; i++) begin : g_chk
    a_code: assert property (@(posedge clk) disable iff (!rst_n) d[i] != 2'b11)
      else $error("completion_detector: illegal dual-rail code on bit %0d", i);
  end
endmodule
