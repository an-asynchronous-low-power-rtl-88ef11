// tb_capture_pass_latch: transparent while capture and pass levels agree;
// holds the captured word across input changes after a capture event until
// the pass event; done outputs follow one clock later.
module tb_capture_pass_latch;
  localparam int W = 4;
  logic clk = 0, rst_n = 0, c = 0, p = 0, cd, pd;
  logic [W-1:0] din = 0, dout, held;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  capture_pass_latch #(.W(W)) dut (.clk, .rst_n, .c, .p, .cd, .pd, .din, .dout);
  task automatic chk(logic [W-1:0] e, string what);
    checks++;
    if (dout !== e) begin failures++; $display("%s: dout=%0h exp %0h", what, dout, e); end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk); din = W'($urandom); #1 chk(din, "transparent");
      held = din;
      @(posedge clk); #1 c = ~c;                   // capture event just after an edge
      checks++; if (cd === c) begin failures++; $display("cd early"); end
      @(posedge clk); #1;
      checks++; if (cd !== c) begin failures++; $display("cd late"); end
      @(negedge clk); din = ~held; #1 chk(held, "holding");
      @(negedge clk); din = W'($urandom); #1 chk(held, "holding");
      p = ~p;                                      // pass event
      #1 chk(din, "passed");
      @(posedge clk); #1;
      checks++; if (pd !== p) begin failures++; $display("pd late"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
