// fir_filter: FIR filter for irregularly (level-crossing) sampled signals.
//
// Each arriving sample (ax_n, dtx_n) starts one convolution. The input and the
// impulse response are both taken as piecewise-constant signals and the filter
// computes o_n as the area under their product over the length of the impulse
// response, by rectangles: the MIN block walks the merged breakpoints of the
// two signals, the multiplier forms each rectangle dt_min * ax_{n-k} * ah_j,
// the accumulator sums them, and the buffer publishes (o_n, dto_n) with
// dto_n = dtx_n, so the output is sampled at the input's sampling times.
//
// Blocks: delay_line (sample history + impulse response), min_unit,
// multiplier, accumulator, out_buffer, in the arrangement of the filter's
// block diagram. Input and output are 2-phase bundled-data channels, as the
// surrounding micropipeline uses. Inside, the iterative loop is sequenced by a
// local clock, one convolution step per cycle; this is this design's choice in
// place of self-timed control of the loop.
module fir_filter
  import fir_pkg::*;
#(
  parameter int NX       = 16,
  parameter int NH       = 16,
  parameter int T_SAMPLE = 4,
  localparam int JW = $clog2(NH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_req,
  output logic          in_ack,
  input  sample_t       in_data,
  output logic          out_req,
  input  logic          out_ack,
  output out_sample_t   out_data,
  input  logic          coef_we,
  input  logic [JW-1:0] coef_addr,
  input  coef_t         coef_ah,
  input  dt_t           coef_dth,
  output logic          busy
);
  localparam int KW = $clog2(NX);

  logic          start, step_valid, acc_reset, buf_enable, buf_ready, p_valid;
  logic [KW-1:0] k;
  logic [JW-1:0] j;
  amp_t          ax;
  coef_t         ah;
  dt_t           dtx, dth, dt_newest, dt_min;
  prod_t         product;
  acc_t          sum;

  delay_line #(.NX(NX), .NH(NH), .T_SAMPLE(T_SAMPLE)) u_dl (
    .clk(clk), .rst_n(rst_n),
    .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .busy(busy), .start(start),
    .k(k), .j(j), .ax(ax), .dtx(dtx), .ah(ah), .dth(dth), .dt_newest(dt_newest),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_ah(coef_ah), .coef_dth(coef_dth)
  );

  min_unit #(.NX(NX), .NH(NH)) u_min (
    .clk(clk), .rst_n(rst_n), .start(start), .dtx(dtx), .dth(dth),
    .buf_ready(buf_ready), .k(k), .j(j), .busy(busy), .step_valid(step_valid),
    .dt_min(dt_min), .acc_reset(acc_reset), .buf_enable(buf_enable)
  );

  multiplier u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(step_valid), .dt_min(dt_min),
    .ax(ax), .ah(ah), .out_valid(p_valid), .product(product)
  );

  accumulator u_acc (
    .clk(clk), .rst_n(rst_n), .clr(acc_reset), .in_valid(p_valid),
    .product(product), .sum(sum)
  );

  out_buffer u_buf (
    .clk(clk), .rst_n(rst_n), .enable(buf_enable), .o_in(sum), .dt_in(dt_newest),
    .ready(buf_ready), .out_req(out_req), .out_ack(out_ack), .out_data(out_data)
  );
endmodule
