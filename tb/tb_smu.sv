// tb_smu: the survivor memory unit gets random dual-rail tokens of new path
// metrics and decisions; the testbench plays the stage control (en) and a
// two-phase consumer with random delays. Every output bit must be the decision
// of the lowest-index state with the smallest metric, in order.
module tb_smu;
  import vit_pkg::*;
  localparam int K = 4, NS = 8, W = 4, NT = 200;
  logic clk = 0, rst_n = 0, en = 1, dout, rout, aout = 0;
  dr_t [NS-1:0][W:0] f = '0;
  dr_t [NS-1:0] dec = '0;
  dr_t sel_q;
  int checks = 0, failures = 0;
  logic q[$];
  always #5 clk = ~clk;
  smu #(.K(K), .PM_W(W), .SR_DEPTH(8)) dut (.clk, .rst_n, .f, .dec, .en, .sel_q, .dout, .rout, .aout);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      automatic int mv = 1000, mp = 0;
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        automatic int v = $urandom_range(0, (t % 3 == 0) ? 2 : 31);
        automatic logic d = $urandom_range(0, 1);
        for (int i = 0; i <= W; i++) f[s][i] = dr_enc(v[i]);
        dec[s] = dr_enc(d);
        if (v < mv) begin mv = v; mp = s; end
      end
      q.push_back(dec[mp][1]);
      while (sel_q == DR_NULL) @(negedge clk);
      en = 0;
      f = '0; dec = '0;
      while (sel_q != DR_NULL) @(negedge clk);
      en = 1;
    end
  end
  initial begin
    int got = 0;
    while (got < NT) begin
      @(posedge clk);
      if (rout != aout) begin
        checks++;
        if (dout !== q.pop_front()) begin failures++; $display("bit %0d wrong", got); end
        got++;
        repeat ($urandom_range(0, 20)) @(posedge clk);
        aout = rout;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
