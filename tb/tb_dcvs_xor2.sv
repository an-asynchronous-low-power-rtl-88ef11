// tb_dcvs_xor2: all combinations of null/0/1 inputs and enable; the output
// must be the spacer unless enabled with both inputs valid, then a XOR b.
module tb_dcvs_xor2;
  import vit_pkg::*;
  dr_t a, b, y;
  logic en;
  int checks = 0, failures = 0;
  dcvs_xor2 dut (.a, .b, .en, .y);
  initial begin
    dr_t v[3] = '{DR_NULL, DR_ZERO, DR_ONE};
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          dr_t exp;
          a = v[i]; b = v[j]; en = e[0];
          #1;
          exp = (en && i > 0 && j > 0) ? dr_enc((i == 2) ^ (j == 2)) : DR_NULL;
          checks++;
          if (y !== exp) begin failures++; $display("en=%0d a=%b b=%b y=%b exp %b", en, a, b, y, exp); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
