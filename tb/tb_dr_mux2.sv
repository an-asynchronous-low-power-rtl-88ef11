// tb_dr_mux2: every combination of null/0/1 on a, b and s.
module tb_dr_mux2;
  import vit_pkg::*;
  dr_t a, b, s, y;
  int checks = 0, failures = 0;
  dr_mux2 dut (.a, .b, .s, .y);
  initial begin
    dr_t v[3] = '{DR_NULL, DR_ZERO, DR_ONE};
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 3; k++) begin
          dr_t exp;
          a = v[i]; b = v[j]; s = v[k];
          #1;
          exp = (k == 0) ? DR_NULL : (k == 2) ? b : a;
          checks++;
          if (y !== exp) begin failures++; $display("a=%b b=%b s=%b y=%b exp %b", a, b, s, y, exp); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
