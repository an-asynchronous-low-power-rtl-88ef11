// tb_smu_shift_register: two-phase producer and a slow, bursty consumer push
// random bits through the micropipeline; bits must come out in order, none
// lost or repeated, and the register must accept DEPTH bits while the
// consumer holds back.
module tb_smu_shift_register;
  localparam int DEPTH = 8, NB = 300;
  logic clk = 0, rst_n = 0, rin = 0, ain, din = 0, rout, aout = 0, dout;
  int checks = 0, failures = 0, sent = 0, got = 0, max_fill = 0;
  logic q[$];
  always #5 clk = ~clk;
  smu_shift_register #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .rin, .ain, .din, .rout, .aout, .dout);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    while (sent < NB) begin
      @(negedge clk);
      if (ain == rin) begin
        din = $urandom_range(0, 1);
        q.push_back(din);
        rin = ~rin;
        sent++;
      end
    end
  end
  initial begin
    wait (rst_n);
    repeat (200) @(posedge clk);          // consumer holds back: register fills
    checks++;
    if (rin == ain) begin failures++; $display("producer not held back"); end
    max_fill = sent - ((rin != ain) ? 1 : 0) - got;
    while (got < NB) begin
      @(posedge clk);
      if (rout != aout) begin
        checks++;
        if (dout !== q.pop_front()) begin failures++; $display("bit %0d wrong", got); end
        got++;
        repeat ($urandom_range(0, 8)) @(posedge clk);
        aout = rout;
      end
    end
    checks++;
    if (max_fill != DEPTH) begin failures++; $display("held %0d bits, expected %0d", max_fill, DEPTH); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
