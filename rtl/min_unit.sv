// min_unit: the MIN block, controller of the irregular convolution.
//
// Both the input history and the impulse response are held at order 0: input
// segment k lasts dtx_{n-k} with amplitude ax_{n-k}, response segment j lasts
// dth_j with amplitude ah_j, both measured backwards from the newest sample.
// Merging the two sets of breakpoints resamples each signal at the other's
// sampling times. Each step the block takes the shorter of what is left of
// segment k and of segment j, dt_min, and issues (dt_min, k, j) to the
// multiplier; it then advances k, j or both, whichever segment is used up.
// The convolution ends when the impulse response (j = NH-1) or the stored
// history (k = NX-1) is used up.
//
// Timing: one step per clock cycle from the cycle after start. After the last
// step it waits one cycle for the multiplier and accumulator, then, once the
// output buffer is free, raises buf_enable (buffer takes the sum) and
// acc_reset (accumulator clears) together for one cycle. A convolution of S
// steps thus takes S + 2 cycles from the first step to the enable when the
// buffer is free. busy is high from the first step to the enable.
//
// The division of work (indices, minimum interval, reset and enable at the
// end) is the architecture's; keeping the used time of both segments, the
// stopping rule and the cycle timing are this design's choices.
module min_unit
  import fir_pkg::*;
#(
  parameter int NX = 16,
  parameter int NH = 16,
  localparam int KW = $clog2(NX),
  localparam int JW = $clog2(NH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  dt_t           dtx,
  input  dt_t           dth,
  input  logic          buf_ready,
  output logic [KW-1:0] k,
  output logic [JW-1:0] j,
  output logic          busy,
  output logic          step_valid,
  output dt_t           dt_min,
  output logic          acc_reset,
  output logic          buf_enable
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_t;

  state_t state;
  dt_t    used_x, used_h;
  dt_t    rem_x, rem_h;
  logic   end_x, end_h, last;

  assign rem_x  = dtx - used_x;
  assign rem_h  = dth - used_h;
  assign dt_min = (rem_x < rem_h) ? rem_x : rem_h;
  assign end_x  = (rem_x == dt_min);
  assign end_h  = (rem_h == dt_min);
  assign last   = (end_h && j == JW'(NH - 1)) || (end_x && k == KW'(NX - 1));

  assign step_valid = (state == S_RUN);
  assign busy       = (state != S_IDLE);
  assign buf_enable = (state == S_DONE) && buf_ready;
  assign acc_reset  = buf_enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      k      <= '0;
      j      <= '0;
      used_x <= '0;
      used_h <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state  <= S_RUN;
          k      <= '0;
          j      <= '0;
          used_x <= '0;
          used_h <= '0;
        end
        S_RUN: begin
          if (last) state <= S_DRAIN;
          if (end_x) begin
            k      <= k + KW'(1);
            used_x <= '0;
          end else begin
            used_x <= used_x + dt_min;
          end
          if (end_h) begin
            j      <= j + JW'(1);
            used_h <= '0;
          end else begin
            used_h <= used_h + dt_min;
          end
        end
        S_DRAIN: state <= S_DONE;
        S_DONE:  if (buf_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // An index never runs past its table within one convolution.
  a_k_range: assert property (@(posedge clk) disable iff (!rst_n)
    step_valid && end_x && !last |-> k != KW'(NX - 1));
endmodule
