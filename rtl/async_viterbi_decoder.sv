// async_viterbi_decoder: rate 1/2, constraint length K hard-decision Viterbi
// decoder organised as a three-stage asynchronous pipeline of PCHB stages:
// branch metric unit (BMU) -> add-compare-select (ACS) -> survivor memory
// (SMU), with a path metric memory (PMM) closing the loop around the ACS.
//
// Every stage has a left and a right completion detector and a C-element
// (C1..C3) whose inverted output is the stage enable and the acknowledge to
// the stage before; a stage's precharge control pc is the enable of the stage
// after it. There are no pipeline registers: each stage holds its dual-rail
// output until the next stage has taken it. When the ACS output becomes valid,
// the new metrics are written, normalised, into the PMM.
//
// Interface
//   rx    : received code symbol, two dual-rail bits (rx[0] = code bit of G0).
//   lack  : left enable, high = ready. Four-phase return-to-zero protocol:
//           drive a valid rx while lack is high, return rx to null once lack
//           is low, then wait for lack high again.
//   dout/rout/aout : two-phase bundled-data output. Each toggle of rout
//           offers one decoded bit on dout; toggle aout to the same level to
//           take it. The decoded bit of symbol t is the input bit of symbol
//           t-(K-1) on the best path.
// All asynchronous state elements are emulated by flip-flops on clk; a
// symbol takes a fixed number of clk cycles when the environment answers
// immediately (about 15, see the testbench).
module async_viterbi_decoder
  import vit_pkg::*;
#(
  parameter int unsigned  K        = K_DEF,
  parameter int unsigned  PM_W     = PM_W_DEF,
  parameter int unsigned  SR_DEPTH = 8,
  parameter logic [K-1:0] G0       = G0_DEF,
  parameter logic [K-1:0] G1       = G1_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dr_t [1:0]   rx,
  output logic        lack,
  output logic        dout,
  output logic        rout,
  input  logic        aout
);
  localparam int unsigned NS   = 2**(K-1);
  localparam int unsigned BM_W = PM_W;

  logic en1, en2, en3;
  logic lcd1, rcd1, lcd2, rcd2, lcd3, rcd3;

  // ---------------- stage 1: BMU ----------------
  dr_t [NS-1:0][1:0][BM_W-1:0] bm;

  bmu #(.K(K), .R(2), .BM_W(BM_W), .G0(G0), .G1(G1)) u_bmu (
    .clk, .rst_n, .rx(rx), .pc(en2), .en(en1), .bm(bm));

  pchb_ctrl #(.WL(2), .WR(NS*2*BM_W)) u_ctl1 (
    .clk, .rst_n, .l_data(rx), .r_data(bm), .lcd(lcd1), .rcd(rcd1), .en(en1));

  assign lack = en1;

  // ---------------- stage 2: ACS + PMM ----------------
  logic [NS-1:0][PM_W-1:0] pm;
  dr_t  [NS-1:0][PM_W:0]   f_c, f_q;
  dr_t  [NS-1:0]           dec_c, dec_q;
  dr_t  [NS-1:0][PM_W+1:0] acs_c, acs_q;   // {dec, f} per state
  logic                    acs_capture;
  logic [NS-1:0][PM_W:0]   f_val;

  for (genvar s = 0; s < NS; s++) begin : g_acs
    // predecessors of s: {s[K-3:0], b}; b = 0 upper branch, b = 1 lower
    localparam int unsigned P0 = (s << 1) & (NS - 1);
    localparam int unsigned P1 = P0 | 1;
    dr_t [PM_W-1:0] pm1_dr, pm2_dr;

    always_comb
      for (int i = 0; i < PM_W; i++) begin
        pm1_dr[i] = dr_enc(pm[P0][i]);
        pm2_dr[i] = dr_enc(pm[P1][i]);
      end

    acs_unit #(.PM_W(PM_W)) u_acs (
      .bm1(bm[s][0]), .pm1(pm1_dr), .bm2(bm[s][1]), .pm2(pm2_dr),
      .en(en2 & en3), .f(f_c[s]), .dec(dec_c[s]));

    assign acs_c[s] = {dec_c[s], f_c[s]};
    assign f_q[s]   = acs_q[s][PM_W:0];
    assign dec_q[s] = acs_q[s][PM_W+1];

    always_comb
      for (int i = 0; i <= PM_W; i++) f_val[s][i] = f_c[s][i][1];
  end

  pchb_out_reg #(.W(NS*(PM_W+2))) u_keep2 (
    .clk, .rst_n, .pc(en3), .en(en2), .f(acs_c), .q(acs_q), .capture(acs_capture));

  pchb_ctrl #(.WL(NS*2*BM_W), .WR(NS*(PM_W+2))) u_ctl2 (
    .clk, .rst_n, .l_data(bm), .r_data(acs_q), .lcd(lcd2), .rcd(rcd2), .en(en2));

  pm_memory #(.K(K), .PM_W(PM_W)) u_pmm (
    .clk, .rst_n, .we(acs_capture), .f_in(f_val), .pm(pm));

  // ---------------- stage 3: SMU ----------------
  dr_t sel_q;

  smu #(.K(K), .PM_W(PM_W), .SR_DEPTH(SR_DEPTH)) u_smu (
    .clk, .rst_n, .f(f_q), .dec(dec_q), .en(en3), .sel_q(sel_q),
    .dout(dout), .rout(rout), .aout(aout));

  pchb_ctrl #(.WL(NS*(PM_W+2)), .WR(1)) u_ctl3 (
    .clk, .rst_n, .l_data(acs_q), .r_data(sel_q), .lcd(lcd3), .rcd(rcd3), .en(en3));
endmodule
