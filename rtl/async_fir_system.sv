// async_fir_system: level-crossing converter, micropipeline channel and
// irregular-sampling FIR filter, as one event-driven processing chain.
//
// The converter (aadc) produces a sample only when the input crosses a
// quantization level, as the couple (level, time since the previous sample).
// The couples travel through a clockless micropipeline FIFO (C-elements and
// latches) to the filter (fir_filter), which convolves the irregular input
// with its irregularly sampled impulse response and emits one output couple
// (o_n, dto_n) per input sample. A constant input therefore costs no samples
// and no filter activity.
//
// clk is the converter's timer clock (period T_C), which also sequences the
// filter's inner loop. vin is the analog input as a fixed-point value; the
// coef_* port loads the impulse response; the output is a 2-phase
// bundled-data channel. The adc_* outputs expose the converter's sample
// channel for observation.
//
// The converter-to-filter chain is the architecture's; the micropipeline on
// that channel, the shared clock and all sizes are this design's choices.
module async_fir_system
  import fir_pkg::*;
#(
  parameter int NX       = 16,
  parameter int NH       = 16,
  parameter int T_SAMPLE = 4,
  parameter int N_STAGES = 3,
  localparam int JW = $clog2(NH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ain_t          vin,
  input  logic          coef_we,
  input  logic [JW-1:0] coef_addr,
  input  coef_t         coef_ah,
  input  dt_t           coef_dth,
  output logic          out_req,
  input  logic          out_ack,
  output out_sample_t   out_data,
  output logic          adc_req,
  output logic          adc_ack,
  output sample_t       adc_data,
  output amp_t          adc_level,
  output logic          adc_stalled,
  output logic          fir_busy
);
  logic    mp_req, mp_ack;
  sample_t mp_data;

  aadc u_adc (
    .clk(clk), .rst_n(rst_n), .vin(vin),
    .out_req(adc_req), .out_ack(adc_ack), .out_data(adc_data),
    .vnum(adc_level), .stalled(adc_stalled)
  );

  micropipeline #(.W($bits(sample_t)), .N_STAGES(N_STAGES)) u_mp (
    .rst_n(rst_n),
    .in_req(adc_req), .in_ack(adc_ack), .in_data(adc_data),
    .out_req(mp_req), .out_ack(mp_ack), .out_data(mp_data)
  );

  fir_filter #(.NX(NX), .NH(NH), .T_SAMPLE(T_SAMPLE)) u_fir (
    .clk(clk), .rst_n(rst_n),
    .in_req(mp_req), .in_ack(mp_ack), .in_data(mp_data),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_ah(coef_ah), .coef_dth(coef_dth),
    .busy(fir_busy)
  );
endmodule
