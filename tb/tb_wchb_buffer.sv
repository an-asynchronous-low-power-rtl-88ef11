// tb_wchb_buffer: a four-phase producer and a consumer with random delays
// pass random bits through the buffer; every bit must arrive in order, and
// the buffer must never pass a new value before the consumer has released
// the old one.
module tb_wchb_buffer;
  import vit_pkg::*;
  logic clk = 0, rst_n = 0, lack, rack = 0;
  dr_t l = DR_NULL, r;
  int checks = 0, failures = 0;
  logic q[$];
  always #5 clk = ~clk;
  wchb_buffer dut (.clk, .rst_n, .l, .lack, .r, .rack);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      automatic logic b = $urandom_range(0, 1);
      while (lack) @(posedge clk);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      l = dr_enc(b); q.push_back(b);
      while (!lack) @(posedge clk);
      l = DR_NULL;
    end
  end
  initial begin
    int got = 0;
    while (got < 200) begin
      @(posedge clk);
      if (dr_valid(r) && !rack) begin
        checks++;
        if (r[1] !== q.pop_front()) begin failures++; $display("bit %0d wrong", got); end
        got++;
        repeat ($urandom_range(0, 4)) @(posedge clk);
        rack = 1;
        while (r != DR_NULL) @(posedge clk);
        rack = 0;
      end else if (r != DR_NULL && rack) begin
        failures++; $display("value passed before release");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
