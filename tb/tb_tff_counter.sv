// tb_tff_counter: random enable/count pulses against an up-counter model,
// with asynchronous clear and preset.
module tb_tff_counter;
  localparam int W = 4;
  logic clk = 0, preset_n = 1, clr_n = 0, en = 0, t_in = 0;
  logic [W-1:0] q, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tff_counter #(.W(W)) dut (.clk, .preset_n, .clr_n, .en, .t_in, .q);
  initial begin
    #12 clr_n = 1;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0;
      t_in = $urandom_range(0, 1);
      if (i % 50 == 25) begin
        preset_n = 0; #1; model = '1; checks++;
        if (q !== model) begin failures++; $display("preset failed q=%0d", q); end
        #1 preset_n = 1;
      end
      if (i % 50 == 49) begin
        clr_n = 0; #1; model = '0; checks++;
        if (q !== model) begin failures++; $display("clear failed q=%0d", q); end
        #1 clr_n = 1;
      end
      if (en && t_in) model = model + 1'b1;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin failures++; $display("i=%0d q=%0d exp %0d", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
