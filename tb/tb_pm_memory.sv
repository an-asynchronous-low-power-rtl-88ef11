// tb_pm_memory: reset values, normalised writes (each metric minus the
// smallest, clamped to 15), and holding when not written.
module tb_pm_memory;
  localparam int K = 4, NS = 8, W = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [NS-1:0][W:0] f_in;
  logic [NS-1:0][W-1:0] pm, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pm_memory #(.K(K), .PM_W(W), .INIT_PM(8)) dut (.clk, .rst_n, .we, .f_in, .pm);
  initial begin
    f_in = '0;
    #12;
    checks++;
    if (pm[0] !== 0 || pm[5] !== 8) begin failures++; $display("reset values %p", pm); end
    rst_n = 1;
    for (int s = 0; s < NS; s++) model[s] = (s == 0) ? 0 : 8;
    for (int n = 0; n < 300; n++) begin
      int mn;
      @(negedge clk);
      we = $urandom_range(0, 1);
      mn = $urandom_range(0, 16);
      for (int s = 0; s < NS; s++) f_in[s] = (W+1)'(mn + $urandom_range(0, 15));
      if (n % 5 == 0) f_in[$urandom_range(0, NS-1)] = (W+1)'(mn + 16 + $urandom_range(0, 15 - mn));
      f_in[$urandom_range(0, NS-1)] = (W+1)'(mn);
      if (we) for (int s = 0; s < NS; s++) model[s] = (f_in[s] - mn > 15) ? 4'd15 : W'(f_in[s] - mn);
      @(posedge clk); #1;
      checks++;
      if (pm !== model) begin failures++; $display("n=%0d pm=%p exp %p", n, pm, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
