// diff_quantifier: behavioural model of the converter's difference quantifier.
//
// The analog front end of the level-crossing converter compares the input
// i(t) with the DAC output V_ref. If i(t) - V_ref exceeds half a quantum q it
// raises +LS (ls_up), if it is below -q/2 it raises -LS (ls_dn); otherwise both
// stay low and nothing happens. A 4-phase handshake with the up/down counter
// bundles the decision: req is high while a decision is pending and the
// counter has not acknowledged; after the counter's ack rises, req (and the LS
// lines) return to zero and are re-evaluated once ack has fallen, against the
// new V_ref. The comparator responds DELAY time units after its inputs move.
// q = 2^FRAC in the fixed-point analog model used here.
//
// The +/-q/2 decision rule is the converter's; the return-to-zero handshake
// and the delay value are this design's choices.
module diff_quantifier
  import fir_pkg::*;
#(
  parameter int DELAY = 1
) (
  input  ain_t vin,
  input  ain_t vref,
  input  logic ack,
  output logic req,
  output logic ls_up,
  output logic ls_dn
);
  localparam logic signed [AIN_W:0] HALF_Q = (AIN_W+1)'(2 ** (FRAC - 1));

  logic signed [AIN_W:0] diff;
  logic up_now, dn_now;

  assign diff   = (AIN_W+1)'(vin) - (AIN_W+1)'(vref);
  assign up_now = !ack && (diff >  HALF_Q);
  assign dn_now = !ack && (diff < -HALF_Q);

  assign #(DELAY) ls_up = up_now;
  assign #(DELAY) ls_dn = dn_now;
  assign #(DELAY) req   = up_now | dn_now;
endmodule
