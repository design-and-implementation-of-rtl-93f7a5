// delay_line: the memory of the irregular-sampling FIR filter.
//
// It holds the last NX input samples (ax_{n-k}, dtx_{n-k}), k = 0 being the
// newest, in a shift register, and the impulse response as NH couples
// (ah_j, dth_j). Both are read combinationally at the indices k and j chosen
// by the MIN block.
//
// Samples arrive from the converter on a 2-phase bundled-data channel. The
// request is synchronized; a sample is shifted in, acknowledged and announced
// with a one-cycle start pulse only while the filter is idle, so a sample
// waits in the channel while a convolution is running.
//
// Reset fills the sample history with zero amplitude and the longest elapsed
// time (a long quiet past), and the impulse response with zero amplitudes
// spaced T_SAMPLE timer periods apart, i.e. a regularly sampled response as a
// classical FIR design would give. The response is loaded through the coef_*
// write port; it should be written only while busy is low.
//
// The shift register of samples is the architecture's; the response table
// inside this block, its load port and the reset contents are this design's.
module delay_line
  import fir_pkg::*;
#(
  parameter int NX       = 16,
  parameter int NH       = 16,
  parameter int T_SAMPLE = 4,
  localparam int KW = $clog2(NX),
  localparam int JW = $clog2(NH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // 2-phase input channel
  input  logic          in_req,
  output logic          in_ack,
  input  sample_t       in_data,
  // control
  input  logic          busy,
  output logic          start,
  // read ports
  input  logic [KW-1:0] k,
  input  logic [JW-1:0] j,
  output amp_t          ax,
  output dt_t           dtx,
  output coef_t         ah,
  output dt_t           dth,
  output dt_t           dt_newest,
  // impulse-response load port
  input  logic          coef_we,
  input  logic [JW-1:0] coef_addr,
  input  coef_t         coef_ah,
  input  dt_t           coef_dth
);
  sample_t    x_mem [NX];
  coef_t      h_amp [NH];
  dt_t        h_dt  [NH];
  logic [1:0] req_s;
  logic       accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_s <= '0;
    else        req_s <= {req_s[0], in_req};
  end

  assign accept = (req_s[1] != in_ack) && !busy && !start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ack <= 1'b0;
      start  <= 1'b0;
      for (int i = 0; i < NX; i++) x_mem[i] <= '{a: '0, dt: DT_MAX};
    end else begin
      start <= accept;
      if (accept) begin
        in_ack   <= ~in_ack;
        x_mem[0] <= in_data;
        for (int i = 1; i < NX; i++) x_mem[i] <= x_mem[i-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NH; i++) begin
        h_amp[i] <= '0;
        h_dt[i]  <= dt_t'(T_SAMPLE);
      end
    end else if (coef_we) begin
      h_amp[coef_addr] <= coef_ah;
      h_dt[coef_addr]  <= coef_dth;
    end
  end

  // Bundled data: a word stays stable while its request is pending.
  a_bundled: assert property (@(posedge clk) disable iff (!rst_n)
    (req_s[1] != in_ack) && !accept |=> $stable(in_data));

  assign ax        = x_mem[k].a;
  assign dtx       = x_mem[k].dt;
  assign ah        = h_amp[j];
  assign dth       = h_dt[j];
  assign dt_newest = x_mem[0].dt;
endmodule
