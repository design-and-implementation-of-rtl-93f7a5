// fir_pkg: widths and types shared by the level-crossing converter and the
// irregular-sampling FIR filter.
//
// A sample travels as a couple (amplitude, elapsed time): the amplitude is the
// converter's up/down counter value, a signed M-bit code, and the time is the
// number of timer periods T_C since the previous sample. The impulse response
// is stored the same way, as couples (ah_j, dth_j). None of these widths is
// fixed by the filter's description; they are this design's choice.
package fir_pkg;
  // Converter resolution M: 2^M - 1 levels, codes -(2^(M-1)-1) .. 2^(M-1)-1.
  localparam int M      = 8;
  // Fractional bits of the analog input model below one quantum q.
  localparam int FRAC   = 4;
  localparam int AIN_W  = M + FRAC + 1;
  // Elapsed-time width (timer periods T_C), saturating.
  localparam int DT_W   = 16;
  // Impulse-response amplitude width.
  localparam int H_W    = 8;
  // Sub-area dt * ax * ah, signed: unsigned DT_W times two signed words.
  localparam int PROD_W = DT_W + M + H_W + 1;
  // Accumulator width: room for a few hundred full-scale sub-areas.
  localparam int ACC_W  = PROD_W + 8;

  localparam logic [DT_W-1:0] DT_MAX = '1;

  typedef logic signed [M-1:0]     amp_t;
  typedef logic        [DT_W-1:0]  dt_t;
  typedef logic signed [H_W-1:0]   coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [AIN_W-1:0] ain_t;

  // One irregular sample: amplitude and time since the previous sample.
  typedef struct packed {
    amp_t a;
    dt_t  dt;
  } sample_t;

  // One output sample of the filter.
  typedef struct packed {
    acc_t o;
    dt_t  dt;
  } out_sample_t;
endpackage
