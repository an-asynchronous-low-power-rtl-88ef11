// tb_dr_full_adder: all valid input combinations give the right sum and
// carry; any null input or a low enable keeps both outputs null.
module tb_dr_full_adder;
  import vit_pkg::*;
  dr_t a, b, c, sum, carry;
  logic en;
  int checks = 0, failures = 0;
  dr_full_adder dut (.a, .b, .c, .en, .sum, .carry);
  initial begin
    dr_t v[3] = '{DR_NULL, DR_ZERO, DR_ONE};
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          for (int k = 0; k < 3; k++) begin
            dr_t es, ec;
            int tot;
            a = v[i]; b = v[j]; c = v[k]; en = e[0];
            #1;
            tot = (i == 2) + (j == 2) + (k == 2);
            if (en && i > 0 && j > 0 && k > 0) begin
              es = dr_enc(tot[0]); ec = dr_enc(tot >= 2);
            end else begin
              es = DR_NULL; ec = DR_NULL;
            end
            checks++;
            if (sum !== es || carry !== ec) begin
              failures++;
              $display("en=%0d a=%b b=%b c=%b sum=%b carry=%b exp %b %b", en, a, b, c, sum, carry, es, ec);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
