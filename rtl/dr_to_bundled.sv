// dr_to_bundled: bridge from a four-phase dual-rail bit channel to a
// two-phase bundled-data channel.
//
// When the dual-rail input r becomes valid its true rail is put on dout and
// rout toggles in the same cycle. Once aout has made the same transition the
// input is acknowledged (rack high); when r returns to null, rack is lowered
// and the next bit is accepted. This design's own glue between the
// four-phase WCHB buffer and the two-phase latch shift register.
module dr_to_bundled
  import vit_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  dr_t  r,
  output logic rack,
  output logic rout,
  input  logic aout,
  output logic dout
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_ACK, S_WAIT_NULL} state_t;
  state_t st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      rack <= 1'b0;
      rout <= 1'b0;
      dout <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE:      if (dr_valid(r)) begin
                       dout <= r[1];
                       rout <= ~rout;
                       st   <= S_WAIT_ACK;
                     end
        S_WAIT_ACK:  if (aout == rout) begin
                       rack <= 1'b1;
                       st   <= S_WAIT_NULL;
                     end
        S_WAIT_NULL: if (dr_is_null(r)) begin
                       rack <= 1'b0;
                       st   <= S_IDLE;
                     end
        default:     st <= S_IDLE;
      endcase
    end
  end
endmodule
