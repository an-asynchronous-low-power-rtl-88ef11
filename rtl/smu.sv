// smu: survivor memory unit, modified register exchange, the third pipeline
// stage.
//
// Instead of keeping a survivor register per state, a pointer tracks the
// state with the smallest new path metric, and the decision bit of that state
// (1 = its lower branch survived, 0 = the upper one) is the decoded bit. With
// the trellis convention of this design the decision of a state is the
// oldest input bit of its window, so the output is the input bit of K-1
// symbols earlier on the best path. A tree of dual-rail 2:1 multiplexers,
// steered by the pointer bits, picks that decision; the result is held by the
// stage's PCHB output keeper, passes through a WCHB buffer and a four- to
// two-phase bridge, and is shifted into a capture-pass latch shift register
// whose far end (dout, rout, aout) is the decoder output.
//
// Handshake: en is this stage's PCHB enable from its control; sel_q is the
// held multiplexer output (watched by the stage's right completion detector).
module smu
  import vit_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned PM_W     = PM_W_DEF,
  parameter int unsigned SR_DEPTH = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  dr_t [2**(K-1)-1:0][PM_W:0]      f,
  input  dr_t [2**(K-1)-1:0]              dec,
  input  logic                            en,
  output dr_t                             sel_q,
  output logic                            dout,
  output logic                            rout,
  input  logic                            aout
);
  localparam int unsigned NS = 2**(K-1);
  localparam int unsigned L  = K-1;      // pointer bits = tree levels

  logic                      f_valid, pc;
  logic [NS-1:0][PM_W:0]     fv;
  logic [L-1:0]              ptr;
  dr_t  [L-1:0]              ptr_dr;
  dr_t                       sel_f;

  always_comb begin
    f_valid = 1'b1;
    for (int s = 0; s < NS; s++)
      for (int i = 0; i <= PM_W; i++) begin
        f_valid &= dr_valid(f[s][i]);
        fv[s][i] = f[s][i][1];
      end
    for (int l = 0; l < L; l++)
      ptr_dr[l] = (f_valid && pc && en) ? dr_enc(ptr[l]) : DR_NULL;
  end

  min_pm_pointer #(.N(NS), .W(PM_W+1)) u_ptr (.pm(fv), .ptr(ptr), .min());

  // multiplexer tree: level l halves the candidates using pointer bit l
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    dr_t [(NS >> l)-1:0] node;
    if (l == 0) begin : g_leaf
      assign node = dec;
    end else begin : g_mux
      for (genvar i = 0; i < (NS >> l); i++) begin : g_m
        dr_mux2 u_mux (.a(g_lvl[l-1].node[2*i]), .b(g_lvl[l-1].node[2*i+1]),
                       .s(ptr_dr[l-1]), .y(node[i]));
      end
    end
  end
  assign sel_f = g_lvl[L].node[0];

  // PCHB keeper of the selected bit; its right neighbour is the WCHB buffer
  logic wchb_lack, br_rack, sr_rin, sr_ain, sr_din;
  dr_t  wchb_r;

  pchb_out_reg #(.W(1)) u_keep (.clk, .rst_n, .pc(pc), .en(en), .f(sel_f), .q(sel_q), .capture());
  assign pc = ~wchb_lack;

  wchb_buffer u_wchb (.clk, .rst_n, .l(sel_q), .lack(wchb_lack), .r(wchb_r), .rack(br_rack));

  dr_to_bundled u_br (.clk, .rst_n, .r(wchb_r), .rack(br_rack), .rout(sr_rin), .aout(sr_ain), .dout(sr_din));

  smu_shift_register #(.DEPTH(SR_DEPTH)) u_sr (.clk, .rst_n, .rin(sr_rin), .ain(sr_ain), .din(sr_din),
                                               .rout(rout), .aout(aout), .dout(dout));
endmodule
