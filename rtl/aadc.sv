// aadc: asynchronous level-crossing analog-to-digital converter.
//
// Levels are spread evenly, one quantum q apart, over the input range. The
// converter keeps its current level V_num in an up/down counter; a DAC turns it
// into V_ref and a difference quantifier compares it with the input i(t). When
// the input has moved more than q/2 away, the counter steps one level towards
// it, which produces a sample; while the input stays within +/-q/2 of V_ref,
// nothing happens at all. Each sample is the couple (i_n, dt_in): the new level
// and the number of timer periods T_C since the previous sample. The loop can
// follow the input only if its slope stays below q per loop delay.
//
// Interface: clk is the timer clock (period T_C); vin is i(t) as a signed
// fixed-point value with FRAC bits below q; samples leave on a 2-phase
// bundled-data channel (out_req/out_ack/out_data). The DAC and the quantifier
// are behavioural models of analog parts; the counter and timer are RTL.
//
// The loop of DAC, difference quantifier, up/down counter and timer is the
// converter's architecture; the fixed-point analog model, the clocked counter
// and the handshake encodings are this design's choices.
module aadc
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  ain_t    vin,
  output logic    out_req,
  input  logic    out_ack,
  output sample_t out_data,
  output amp_t    vnum,
  output logic    stalled
);
  ain_t vref;
  logic req, ack, ls_up, ls_dn, sample_evt;
  dt_t  dt_now;

  dac u_dac (.vnum(vnum), .vref(vref));

  diff_quantifier u_dq (
    .vin(vin), .vref(vref), .ack(ack), .req(req), .ls_up(ls_up), .ls_dn(ls_dn)
  );

  adc_timer u_timer (.clk(clk), .rst_n(rst_n), .sample_evt(sample_evt), .dt(dt_now));

  updown_counter u_cnt (
    .clk(clk), .rst_n(rst_n),
    .req(req), .ls_up(ls_up), .ls_dn(ls_dn), .ack(ack),
    .vnum(vnum), .dt_now(dt_now), .sample_evt(sample_evt),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data), .stalled(stalled)
  );
endmodule
