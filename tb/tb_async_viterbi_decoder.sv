// tb_async_viterbi_decoder: end-to-end test of the asynchronous Viterbi
// decoder at its default parameters (K = 4, rate 1/2, generators 17/15).
//
// A behavioural convolutional encoder produces code symbols from random
// message bits; some symbols get one or two bits flipped. A four-phase
// producer feeds them to the decoder, and a two-phase consumer takes decoded
// bits with random delays so the survivor shift register fills and the
// pipeline stalls. Every decoded bit is compared with a reference model of the
// same algorithm written here from scratch (metrics, decisions, minimum
// pointer, normalisation). Over error-free stretches the decoded bit must also
// equal the message bit K-1 symbols earlier. Mechanisms counted: nonzero
// branch metrics, lower- and upper-branch survivors, metric normalisation,
// pipeline stall from a full shift register, tied metrics. Also checks the
// cycle count of one symbol through an idle pipeline (22) and the steady-state
// symbol period with a consumer that answers at once (9).
module tb_async_viterbi_decoder;
  import vit_pkg::*;

  localparam int K = 4, NS = 8, NSYM = 400;
  localparam int PERIOD = 9;   // clk cycles per symbol, steady state
  localparam logic [3:0] G0 = 4'o17, G1 = 4'o15;

  logic clk = 0, rst_n = 0;
  dr_t [1:0] rx;
  logic lack, dout, rout, aout;

  always #5 clk = ~clk;

  async_viterbi_decoder dut (.clk, .rst_n, .rx, .lack, .dout, .rout, .aout);

  int checks = 0, failures = 0;
  int n_residual = 0, n_chan_err = 0;
  int n_bm_nonzero = 0, n_lower = 0, n_upper = 0, n_norm = 0, n_stall = 0, n_tie = 0;

  // ---------------- reference model ----------------
  int unsigned rpm [NS];
  logic [1:0] rx_sym [NSYM];
  logic       msg    [NSYM];
  logic       exp_out[NSYM];
  bit         clean  [NSYM];   // no channel error in the last 8 symbols

  function automatic logic par(logic [3:0] v);
    return ^v;
  endfunction

  task automatic ref_step(input logic [1:0] r, output logic o);
    int unsigned f[NS];
    logic d[NS];
    int unsigned mn; int mp;
    for (int s = 0; s < NS; s++) begin
      int unsigned c[2];
      for (int b = 0; b < 2; b++) begin
        logic [3:0] w = {s[2:0], b[0]};
        logic [1:0] e = {par(w & G1), par(w & G0)};
        int unsigned bmv = $countones(r ^ e);
        int p = ((s << 1) & (NS-1)) | b;
        if (bmv != 0) n_bm_nonzero++;
        c[b] = rpm[p] + bmv;
      end
      d[s] = c[1] < c[0];
      if (c[1] == c[0]) n_tie++;
      if (d[s]) n_lower++; else n_upper++;
      f[s] = d[s] ? c[1] : c[0];
    end
    mn = f[0]; mp = 0;
    for (int s = 1; s < NS; s++) if (f[s] < mn) begin mn = f[s]; mp = s; end
    if (mn != 0) n_norm++;
    for (int s = 0; s < NS; s++) rpm[s] = (f[s] - mn > 15) ? 15 : f[s] - mn;
    o = d[mp];
  endtask

  // ---------------- stimulus ----------------
  initial begin
    logic [2:0] st = 0;
    int last_err = -100;
    for (int s = 0; s < NS; s++) rpm[s] = (s == 0) ? 0 : 8;
    for (int t = 0; t < NSYM; t++) begin
      logic [3:0] w;
      logic [1:0] c;
      msg[t] = $urandom_range(0, 1);
      w = {msg[t], st};
      c = {par(w & G1), par(w & G0)};
      st = w[3:1];
      if (t > 20 && $urandom_range(0, 9) == 0) begin
        c ^= 2'($urandom_range(1, 3));
        n_chan_err++;
        last_err = t;
      end
      rx_sym[t] = c;
      clean[t] = (t - last_err) > 8 && t >= K-1;
      ref_step(c, exp_out[t]);
    end
  end

  // producer: four-phase return-to-zero
  int sent = 0;
  int first_in_cyc = -1;
  initial begin
    rx = '0;
    aout = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NSYM; t++) begin
      while (!lack) @(posedge clk);
      if (t == 0) first_in_cyc = cyc;
      rx[0] = dr_enc(rx_sym[t][0]);
      rx[1] = dr_enc(rx_sym[t][1]);
      while (lack) @(posedge clk);
      rx = '0;
      sent++;
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // symbol period while the consumer answers at once: cycles between the
  // acceptances (lack falling) of symbols 5 and 15
  int acc_cyc[NSYM];
  int n_acc = 0;
  logic lack_d = 1;
  always @(posedge clk) begin
    lack_d <= lack;
    if (rst_n && lack_d && !lack) begin
      acc_cyc[n_acc] <= cyc;
      n_acc <= n_acc + 1;
    end
  end

  // consumer: two-phase; first 20 bits taken at once, then random delays
  int got = 0;
  int first_out_cyc = -1;
  initial begin
    while (got < NSYM) begin
      @(posedge clk);
      if (rout != aout) begin
        if (got == 0) first_out_cyc = cyc;
        checks++;
        if (dout !== exp_out[got]) begin
          failures++;
          if (failures < 10) $display("mismatch bit %0d: got %0d expected %0d", got, dout, exp_out[got]);
        end
        if (got >= K-1 && dout !== msg[got-(K-1)]) n_residual++;
        if (clean[got]) begin
          checks++;
          if (dout !== msg[got-(K-1)]) begin
            failures++;
            $display("clean stretch: bit %0d got %0d message %0d", got, dout, msg[got-(K-1)]);
          end
        end
        got++;
        if (got > 20) repeat ($urandom_range(0, 60)) @(posedge clk);
        aout = rout;
      end
    end
  end

  // stall: producer offered a symbol but the pipeline is held by a full shift register
  always @(posedge clk)
    if (rst_n && dut.u_smu.u_sr.c[0] != dut.u_smu.u_sr.pd[0] && dut.u_smu.sel_q != DR_NULL
        && dut.u_smu.pc == 1'b0 && (rout != aout))
      n_stall++;

  initial begin
    wait (got == NSYM);
    repeat (5) @(posedge clk);
    // idle-pipeline latency: first symbol offered to first decoded bit offered
    checks++;
    if (first_out_cyc - first_in_cyc != 22) begin
      failures++;
      $display("latency %0d cycles, expected 22", first_out_cyc - first_in_cyc);
    end
    checks++;
    if (acc_cyc[15] - acc_cyc[5] != 10 * PERIOD) begin
      failures++;
      $display("symbol period %0d/10 cycles, expected %0d", acc_cyc[15] - acc_cyc[5], PERIOD);
    end
    $display("period=%0d/10", acc_cyc[15] - acc_cyc[5]);
    $display("symbols with channel errors=%0d, decoded bits differing from the message=%0d of %0d",
             n_chan_err, n_residual, NSYM-(K-1));
    $display("latency=%0d bm_nonzero=%0d lower=%0d upper=%0d norm=%0d stall=%0d tie=%0d",
             first_out_cyc - first_in_cyc, n_bm_nonzero, n_lower, n_upper, n_norm, n_stall, n_tie);
    checks += 6;
    if (n_bm_nonzero == 0) failures++;
    if (n_lower == 0) failures++;
    if (n_upper == 0) failures++;
    if (n_norm == 0) failures++;
    if (n_stall == 0) begin failures++; $display("no stall seen"); end
    if (n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSYM * 200) @(posedge clk);
    failures++;
    $display("watchdog: %0d symbols sent, %0d bits decoded", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
