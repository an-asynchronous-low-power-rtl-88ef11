// viterbi_k_run: test harness that runs one decoder instance of constraint
// length K on NSYM random symbols with injected channel errors and compares
// every decoded bit with a reference model written here (branch metrics,
// add-compare-select with upper branch kept on ties, minimum pointer with
// lowest index on ties, normalisation clamped to 15; clamps are counted). Over error-free
// stretches the decoded bit must also equal the message bit K-1 symbols
// earlier. Reports done, checks and failures to the enclosing testbench.
module viterbi_k_run
  import vit_pkg::*;
#(
  parameter int unsigned  K    = 5,
  parameter logic [K-1:0] G0   = '1,
  parameter logic [K-1:0] G1   = '1,
  parameter int unsigned  NSYM = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   clamps
);
  localparam int NS = 2**(K-1);

  dr_t [1:0] rx;
  logic lack, dout, rout, aout;

  async_viterbi_decoder #(.K(K), .G0(G0), .G1(G1)) dut (.clk, .rst_n, .rx, .lack, .dout, .rout, .aout);

  int unsigned rpm [NS];
  logic [1:0]  rx_sym [NSYM];
  logic        msg    [NSYM];
  logic        exp_out[NSYM];
  bit          clean  [NSYM];

  task automatic ref_step(input logic [1:0] r, output logic o);
    int unsigned f[NS];
    logic d[NS];
    int unsigned mn;
    int mp;
    for (int s = 0; s < NS; s++) begin
      int unsigned c[2];
      for (int b = 0; b < 2; b++) begin
        logic [K-1:0] w;
        logic [1:0]   e;
        int           pr;
        w  = K'((s << 1) | b);
        e  = {^(w & G1), ^(w & G0)};
        pr = ((s << 1) & (NS-1)) | b;
        c[b] = rpm[pr] + $countones(r ^ e);
      end
      d[s] = c[1] < c[0];
      f[s] = d[s] ? c[1] : c[0];
    end
    mn = f[0]; mp = 0;
    for (int s = 1; s < NS; s++) if (f[s] < mn) begin mn = f[s]; mp = s; end
    for (int s = 0; s < NS; s++) begin
      if (f[s] - mn > 15) clamps++;
      rpm[s] = (f[s] - mn > 15) ? 15 : f[s] - mn;
    end
    o = d[mp];
  endtask

  initial begin
    logic [K-2:0] st;
    int last_err;
    st = '0;
    last_err = -100;
    checks = 0;
    failures = 0;
    clamps = 0;
    done = 0;
    for (int s = 0; s < NS; s++) rpm[s] = (s == 0) ? 0 : 8;
    for (int t = 0; t < NSYM; t++) begin
      logic [K-1:0] w;
      logic [1:0]   c;
      msg[t] = 1'($urandom_range(0, 1));
      w = {msg[t], st};
      c = {^(w & G1), ^(w & G0)};
      st = w[K-1:1];
      if (t > 30 && $urandom_range(0, 14) == 0) begin
        c ^= 2'($urandom_range(1, 3));
        last_err = t;
      end
      rx_sym[t] = c;
      clean[t] = (t - last_err) > 4 * K && t >= K - 1;
      ref_step(c, exp_out[t]);
    end
  end

  // producer: four-phase
  initial begin
    rx = '0;
    wait (rst_n);
    for (int t = 0; t < NSYM; t++) begin
      @(posedge clk);
      while (!lack) @(posedge clk);
      rx[0] = dr_enc(rx_sym[t][0]);
      rx[1] = dr_enc(rx_sym[t][1]);
      while (lack) @(posedge clk);
      rx = '0;
    end
  end

  // consumer: two-phase with random delays
  initial begin
    int got;
    got = 0;
    aout = 0;
    while (got < NSYM) begin
      @(posedge clk);
      if (rout != aout) begin
        checks++;
        if (dout !== exp_out[got]) begin
          failures++;
          if (failures < 5) $display("K=%0d bit %0d: got %0d expected %0d", K, got, dout, exp_out[got]);
        end
        if (clean[got]) begin
          checks++;
          if (dout !== msg[got - (K-1)]) failures++;
        end
        got++;
        repeat ($urandom_range(0, 30)) @(posedge clk);
        aout = rout;
      end
    end
    done = 1;
  end
endmodule
