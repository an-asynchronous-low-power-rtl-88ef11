// tb_acs_unit: random metrics in dual rail; checks the selected 5-bit metric
// and the decision (1 only when the lower sum is strictly smaller), and that
// the outputs stay null while disabled or while an input bit is null.
module tb_acs_unit;
  import vit_pkg::*;
  localparam int W = 4;
  dr_t [W-1:0] bm1, pm1, bm2, pm2;
  dr_t [W:0] f;
  dr_t dec;
  logic en;
  int checks = 0, failures = 0, n_lower = 0, n_tie = 0;
  acs_unit #(.PM_W(W)) dut (.bm1, .pm1, .bm2, .pm2, .en, .f, .dec);
  function automatic dr_t [W-1:0] enc(int v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_enc(v[i]);
    return r;
  endfunction
  initial begin
    en = 1;
    for (int n = 0; n < 2000; n++) begin
      automatic int x1 = $urandom_range(0, 15), y1 = $urandom_range(0, 15);
      automatic int x2 = $urandom_range(0, 15), y2 = $urandom_range(0, 15);
      int c1, c2, ef; logic ed; logic [W:0] got;
      if (n % 10 == 0) begin x2 = x1; y2 = y1; end
      bm1 = enc(x1); pm1 = enc(y1); bm2 = enc(x2); pm2 = enc(y2);
      #1;
      c1 = x1 + y1; c2 = x2 + y2;
      ed = c2 < c1; ef = ed ? c2 : c1;
      if (ed) n_lower++;
      if (c1 == c2) n_tie++;
      for (int i = 0; i <= W; i++) got[i] = f[i][1];
      checks++;
      if (dec !== dr_enc(ed) || got !== (W+1)'(ef) || !dr_valid(f[W]) || !dr_valid(f[0])) begin
        failures++; $display("%0d+%0d vs %0d+%0d: f=%0d dec=%b", x1, y1, x2, y2, got, dec);
      end
    end
    bm2[2] = DR_NULL; #1; checks++;
    if (dec !== DR_NULL || f[0] !== DR_NULL) begin failures++; $display("null input leaked"); end
    bm2[2] = DR_ONE; en = 0; #1; checks++;
    if (dec !== DR_NULL || f !== '0) begin failures++; $display("not null while disabled"); end
    checks++;
    if (n_lower == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
