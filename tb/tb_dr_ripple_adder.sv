// tb_dr_ripple_adder: exhaustive 4-bit + 4-bit additions in dual rail give the
// 5-bit sum; a single null operand bit keeps the top of the sum null.
module tb_dr_ripple_adder;
  import vit_pkg::*;
  localparam int W = 4;
  dr_t [W-1:0] a, b;
  dr_t [W:0] s;
  logic en;
  int checks = 0, failures = 0;
  dr_ripple_adder #(.W(W)) dut (.a, .b, .en, .s);
  function automatic logic [W:0] dec(dr_t [W:0] x);
    logic [W:0] r;
    for (int i = 0; i <= W; i++) r[i] = x[i][1];
    return r;
  endfunction
  initial begin
    en = 1;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        bit ok = 1;
        for (int i = 0; i < W; i++) begin a[i] = dr_enc(x[i]); b[i] = dr_enc(y[i]); end
        #1;
        for (int i = 0; i <= W; i++) ok &= dr_valid(s[i]);
        checks++;
        if (!ok || dec(s) !== (W+1)'(x + y)) begin failures++; $display("%0d+%0d gave %0d", x, y, dec(s)); end
      end
    // incomplete operand: carry chain must not complete
    for (int i = 0; i < W; i++) begin a[i] = DR_ONE; b[i] = DR_ONE; end
    a[0] = DR_NULL;
    #1; checks++;
    if (s[W] !== DR_NULL || s[0] !== DR_NULL) begin failures++; $display("null operand leaked"); end
    a[0] = DR_ONE; en = 0;
    #1; checks++;
    if (s !== '0) begin failures++; $display("output not null while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
