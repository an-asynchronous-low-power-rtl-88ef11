// tb_c_element: exhaustive check of the Muller C-element: the output follows
// agreeing inputs one clock later and holds when the inputs differ.
module tb_c_element;
  logic clk = 0, rst_n = 0, a = 0, b = 0, y;
  int checks = 0, failures = 0;
  logic model;
  always #5 clk = ~clk;
  c_element dut (.clk, .rst_n, .a, .b, .y);
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a = $urandom_range(0, 1);
      b = $urandom_range(0, 1);
      if (a == b) model = a;
      @(posedge clk); #1;
      checks++;
      if (y !== model) begin failures++; $display("a=%0d b=%0d y=%0d exp %0d", a, b, y, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
