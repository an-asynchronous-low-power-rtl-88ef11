// tb_bmu: every received symbol value, repeated, through full PCHB cycles.
// Each of the 16 branch metrics must equal the Hamming distance between the
// received symbol and the branch's code symbol (generators 17 and 15 octal,
// window {state, oldest bit}), appear R = 2 cycles after evaluation starts,
// and return to null in precharge.
module tb_bmu;
  import vit_pkg::*;
  localparam int K = 4, NS = 8, BW = 4;
  localparam logic [3:0] G0 = 4'o17, G1 = 4'o15;
  logic clk = 0, rst_n = 0, pc = 1, en = 1;
  dr_t [1:0] rx = '0;
  dr_t [NS-1:0][1:0][BW-1:0] bm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bmu #(.K(K), .R(2), .BM_W(BW), .G0(G0), .G1(G1)) dut (.clk, .rst_n, .rx, .pc, .en, .bm);
  function automatic bit all_valid();
    for (int s = 0; s < NS; s++) for (int b = 0; b < 2; b++) for (int i = 0; i < BW; i++)
      if (!dr_valid(bm[s][b][i])) return 0;
    return 1;
  endfunction
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      automatic logic [1:0] r = 2'(n);
      automatic int cyc = 0;
      @(negedge clk);
      rx[0] = dr_enc(r[0]); rx[1] = dr_enc(r[1]);
      while (!all_valid()) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 2) begin failures++; $display("metrics took %0d cycles", cyc); end
      for (int s = 0; s < NS; s++)
        for (int b = 0; b < 2; b++) begin
          automatic logic [3:0] w = {s[2:0], b[0]};
          automatic logic [1:0] e = {^(w & G1), ^(w & G0)};
          logic [BW-1:0] got;
          for (int i = 0; i < BW; i++) got[i] = bm[s][b][i][1];
          checks++;
          if (got !== BW'($countones(r ^ e))) begin
            failures++; $display("r=%b s=%0d b=%0d bm=%0d exp %0d", r, s, b, got, $countones(r ^ e));
          end
        end
      // hold: changing nothing for a while keeps the metrics
      repeat (3) @(negedge clk);
      checks++;
      if (!all_valid()) begin failures++; $display("metrics not held"); end
      // precharge
      en = 0; pc = 0; rx = '0;
      @(negedge clk);
      checks++;
      if (bm !== '0) begin failures++; $display("metrics not null in precharge"); end
      en = 1; pc = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
