// tb_example_sequence: the short worked example used to demonstrate this
// architecture: the received symbols 00 00 11 10 fed to the decoder at its
// default parameters. Because the example's generator polynomials are not
// known, the decoded bits are checked against the reference model of this
// design (generators 17/15 octal), not against a published output: with
// K = 4 the four decoded bits are the three start-state bits and the first
// message bit of the best path. Also checks that every symbol is accepted and
// every bit delivered through the full handshake.
module tb_example_sequence;
  import vit_pkg::*;
  localparam int NS = 8, N = 4;
  localparam logic [3:0] G0 = 4'o17, G1 = 4'o15;
  localparam logic [1:0] RX [N] = '{2'b00, 2'b00, 2'b11, 2'b10};  // first bit printed = code bit 0

  logic clk = 0, rst_n = 0;
  dr_t [1:0] rx = '0;
  logic lack, dout, rout, aout = 0;
  int checks = 0, failures = 0;
  logic exp_out [N];
  int unsigned rpm [NS];

  always #5 clk = ~clk;

  async_viterbi_decoder dut (.clk, .rst_n, .rx, .lack, .dout, .rout, .aout);

  initial begin
    for (int s = 0; s < NS; s++) rpm[s] = (s == 0) ? 0 : 8;
    for (int t = 0; t < N; t++) begin
      int unsigned f[NS];
      logic d[NS];
      int unsigned mn;
      int mp;
      logic [1:0] r;
      r = {RX[t][0], RX[t][1]};
      for (int s = 0; s < NS; s++) begin
        int unsigned c[2];
        for (int b = 0; b < 2; b++) begin
          logic [3:0] w;
          w = 4'((s << 1) | b);
          c[b] = rpm[((s << 1) & (NS-1)) | b] + $countones(r ^ {^(w & G1), ^(w & G0)});
        end
        d[s] = c[1] < c[0];
        f[s] = d[s] ? c[1] : c[0];
      end
      mn = f[0]; mp = 0;
      for (int s = 1; s < NS; s++) if (f[s] < mn) begin mn = f[s]; mp = s; end
      for (int s = 0; s < NS; s++) rpm[s] = (f[s] - mn > 15) ? 15 : f[s] - mn;
      exp_out[t] = d[mp];
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < N; t++) begin
      while (!lack) @(posedge clk);
      rx[0] = dr_enc(RX[t][1]);
      rx[1] = dr_enc(RX[t][0]);
      while (lack) @(posedge clk);
      rx = '0;
    end
  end

  initial begin
    int got;
    got = 0;
    while (got < N) begin
      @(posedge clk);
      if (rout != aout) begin
        checks++;
        if (dout !== exp_out[got]) begin failures++; $display("bit %0d: got %0d expected %0d", got, dout, exp_out[got]); end
        $display("decoded bit %0d = %0d", got, dout);
        got++;
        aout = rout;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
