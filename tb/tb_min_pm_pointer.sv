// tb_min_pm_pointer: random metric sets, many with ties; the pointer must name
// the lowest-index state holding the minimum.
module tb_min_pm_pointer;
  localparam int N = 8, W = 5;
  logic [N-1:0][W-1:0] pm;
  logic [2:0] ptr;
  logic [W-1:0] mn;
  int checks = 0, failures = 0;
  min_pm_pointer #(.N(N), .W(W)) dut (.pm, .ptr, .min(mn));
  initial begin
    for (int n = 0; n < 1000; n++) begin
      int em, ep;
      for (int s = 0; s < N; s++) pm[s] = W'($urandom_range(0, (n % 2) ? 31 : 3));
      #1;
      em = 1000; ep = -1;
      for (int s = N-1; s >= 0; s--) if (pm[s] <= em) begin em = pm[s]; ep = s; end
      checks++;
      if (ptr !== 3'(ep) || mn !== W'(em)) begin failures++; $display("pm=%p ptr=%0d min=%0d exp %0d %0d", pm, ptr, mn, ep, em); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
