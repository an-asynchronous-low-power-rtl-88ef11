// bmu: branch metric unit, the first stage of the decoder pipeline.
//
// For every trellis state s there are two branch metric computations, one
// for the upper branch (predecessor with oldest bit 0) and one for the lower
// branch (oldest bit 1). Each compares the received R-bit code symbol rx with
// the branch's expected symbol using dual-rail XOR gates and counts the
// differing bits with a T flip-flop counter, so the branch metric is the
// Hamming distance. The counters step once per code bit, so evaluating takes
// R clk cycles after the token is seen.
//
// Trellis convention (this design's): the state holds the last K-1 inputs,
// newest in the most significant bit; the branch from predecessor
// {s[K-3:0], b} into s carries the encoder window {s, b}, and expected code
// bit j is the parity of that window masked with generator Gj.
//
// Handshake (PCHB): evaluate when pc and en are high and rx is valid; hold;
// return bm to null and clear the counters when pc and en are both low.
// bm[s][0] is the upper branch metric of state s, bm[s][1] the lower.
module bmu
  import vit_pkg::*;
#(
  parameter int unsigned K    = K_DEF,
  parameter int unsigned R    = R_DEF,
  parameter int unsigned BM_W = BM_W_DEF,
  parameter logic [K-1:0] G0  = G0_DEF,
  parameter logic [K-1:0] G1  = G1_DEF
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  dr_t [R-1:0]                         rx,
  input  logic                                pc,
  input  logic                                en,
  output dr_t [2**(K-1)-1:0][1:0][BM_W-1:0]   bm
);
  localparam int unsigned NS  = 2**(K-1);
  localparam int unsigned IDX_W = $clog2(R+1);

  logic             rx_valid;
  logic [IDX_W-1:0] idx;        // code bit being counted; R = done
  logic             counting, done;
  logic             clr_n;

  always_comb begin
    rx_valid = 1'b1;
    for (int j = 0; j < R; j++) rx_valid &= dr_valid(rx[j]);
  end

  assign done     = (idx == IDX_W'(R));
  assign counting = pc & en & rx_valid & ~done;
  assign clr_n    = rst_n & ~(~pc & ~en);   // precharge clears the counters

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          idx <= '0;
    else if (!pc && !en) idx <= '0;
    else if (counting)   idx <= idx + 1'b1;
  end

  for (genvar s = 0; s < NS; s++) begin : g_state
    for (genvar b = 0; b < 2; b++) begin : g_branch
      localparam logic [K-1:0] WIN = K'((s << 1) | b);
      localparam logic [1:0]   EXP = {code_bit(32'(WIN), 32'(G1)), code_bit(32'(WIN), 32'(G0))};
      dr_t  [R-1:0] x;
      logic [BM_W-1:0] q;

      for (genvar j = 0; j < R; j++) begin : g_xor
        dcvs_xor2 u_xor (.a(rx[j]), .b(dr_enc(EXP[j])), .en(pc & en), .y(x[j]));
      end

      tff_counter #(.W(BM_W)) u_cnt (
        .clk, .preset_n(1'b1), .clr_n(clr_n), .en(counting),
        .t_in(x[idx[$clog2(R)-1:0]][1]), .q(q));

      always_comb
        for (int i = 0; i < BM_W; i++) bm[s][b][i] = done ? dr_enc(q[i]) : DR_NULL;
    end
  end
endmodule
