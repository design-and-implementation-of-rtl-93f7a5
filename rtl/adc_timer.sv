// adc_timer: local timer of the level-crossing converter.
//
// It counts periods T_C of its clock since the previous sample. dt is the
// elapsed count, read by the counter in the cycle of a sample event; that
// cycle restarts the count so that the next dt is the number of clock cycles
// between the two events. The count saturates at the all-ones value, which
// therefore means "at least that long". Reset starts the count at 0.
//
// The timer of period T_C is the converter's; the restart on each sample and
// the saturation are this design's choices.
module adc_timer
  import fir_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sample_evt,
  output dt_t  dt
);
  dt_t cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (sample_evt) cnt <= dt_t'(1);
    else if (cnt != DT_MAX) cnt <= cnt + dt_t'(1);
  end

  assign dt = cnt;
endmodule
