// vit_pkg: types, constants and helper functions shared by the dual-rail
// Viterbi decoder.
//
// Every data bit between pipeline stages travels on two rails, {t, f}:
// 2'b00 is the spacer (null, precharged), 2'b10 is a valid 1, 2'b01 a valid 0
// and 2'b11 is illegal. A word is valid when all of its bits are valid and
// null when all of them are null; anything in between is a word in transit.
//
// The code is rate 1/2 with constraint length K = 4 (the configuration the
// design is explained with). The generator polynomials are this design's own
// choice: the common optimal pair 17 and 15 (octal) for K = 4.
package vit_pkg;

  // one dual-rail bit: [1] = true rail, [0] = false rail
  typedef logic [1:0] dr_t;

  localparam dr_t DR_NULL = 2'b00;
  localparam dr_t DR_ZERO = 2'b01;
  localparam dr_t DR_ONE  = 2'b10;

  localparam int unsigned K_DEF    = 4;      // constraint length
  localparam int unsigned R_DEF    = 2;      // code bits per symbol (rate 1/2)
  localparam int unsigned PM_W_DEF = 4;      // path metric / adder operand width
  localparam int unsigned BM_W_DEF = 4;      // branch metric counter width (four TFFs)
  localparam logic [K_DEF-1:0] G0_DEF = 4'o17;  // generator of code bit 0
  localparam logic [K_DEF-1:0] G1_DEF = 4'o15;  // generator of code bit 1

  function automatic dr_t dr_enc(input logic b);
    return b ? DR_ONE : DR_ZERO;
  endfunction

  function automatic logic dr_valid(input dr_t d);
    return d[1] ^ d[0];
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return d == DR_NULL;
  endfunction

  // Expected code bit for the K-bit encoder window w (w[K-1] = newest input)
  // and generator g whose most significant tap is the newest input.
  function automatic logic code_bit(input logic [31:0] w, input logic [31:0] g);
    return ^(w & g);
  endfunction

endpackage
