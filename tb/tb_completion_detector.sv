// tb_completion_detector: the detector must rise only when every dual-rail bit
// is valid, fall only when every bit is null, and hold for partial words.
module tb_completion_detector;
  import vit_pkg::*;
  localparam int W = 5;
  logic clk = 0, rst_n = 0, done;
  dr_t [W-1:0] d = '0;
  int checks = 0, failures = 0;
  logic model = 0;
  always #5 clk = ~clk;
  completion_detector #(.W(W)) dut (.clk, .rst_n, .d, .done);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      automatic bit allv = 1, alln = 1;
      @(negedge clk);
      for (int j = 0; j < W; j++) begin
        int r = $urandom_range(0, 3);
        d[j] = (r == 0) ? DR_NULL : (r == 1) ? DR_ZERO : (r == 2) ? DR_ONE : (i % 2 ? DR_ONE : DR_NULL);
      end
      if (i % 7 == 0) d = '0;
      if (i % 7 == 3) for (int j = 0; j < W; j++) d[j] = dr_enc(j[0]);
      for (int j = 0; j < W; j++) begin allv &= dr_valid(d[j]); alln &= (d[j] == DR_NULL); end
      if (allv) model = 1; else if (alln) model = 0;
      @(posedge clk); #1;
      checks++;
      if (done !== model) begin failures++; $display("i=%0d d=%b done=%0d exp %0d", i, d, done, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
