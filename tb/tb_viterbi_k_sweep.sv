// tb_viterbi_k_sweep: the decoder at the larger constraint lengths evaluated
// for this architecture, K = 5, 6 and 7 (16, 32 and 64 states), each with a
// common optimal rate-1/2 generator pair (23/35, 53/75, 171/133 octal). Every
// decoded bit is compared with a reference model; the default K = 4 is
// covered by tb_async_viterbi_decoder. The number of metric clamps in the
// path metric memory is reported (they are rare with random data; the unit
// test of the memory exercises the clamp).
module tb_viterbi_k_sweep;
  logic clk = 0, rst_n = 0;
  logic [2:0] done;
  int c5, f5, c6, f6, c7, f7, k5, k6, k7;
  int checks, failures;

  always #5 clk = ~clk;

  viterbi_k_run #(.K(5), .G0(5'o23),  .G1(5'o35),  .NSYM(300)) u_k5 (.clk, .rst_n, .done(done[0]), .checks(c5), .failures(f5), .clamps(k5));
  viterbi_k_run #(.K(6), .G0(6'o53),  .G1(6'o75),  .NSYM(300)) u_k6 (.clk, .rst_n, .done(done[1]), .checks(c6), .failures(f6), .clamps(k6));
  viterbi_k_run #(.K(7), .G0(7'o171), .G1(7'o133), .NSYM(300)) u_k7 (.clk, .rst_n, .done(done[2]), .checks(c7), .failures(f7), .clamps(k7));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    checks = c5 + c6 + c7;
    failures = f5 + f6 + f7;
    // informative: how often the metric clamp of the path metric memory acted
    $display("metric clamps: K=5 %0d, K=6 %0d, K=7 %0d", k5, k6, k7);
    $display("K=5 checks=%0d failures=%0d, K=6 checks=%0d failures=%0d, K=7 checks=%0d failures=%0d", c5, f5, c6, f6, c7, f7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * 300) @(posedge clk);
    $display("watchdog: done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c6 + c7, f5 + f6 + f7 + 1);
    $finish;
  end
endmodule
