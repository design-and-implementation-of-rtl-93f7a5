// accumulator: sums the sub-areas of one convolution.
//
// Every valid product is added to the running sum; the MIN block's reset
// clears it at the end of each convolution, in the same cycle as the buffer
// takes the sum. The sum is registered and wraps at ACC_W bits, wide enough
// for NX + NH full-scale sub-areas at the default sizes.
//
// Summing and the reset from MIN are the architecture's; the width is this
// design's choice.
module accumulator
  import fir_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  logic  in_valid,
  input  prod_t product,
  output acc_t  sum
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sum <= '0;
    else if (clr)      sum <= '0;
    else if (in_valid) sum <= sum + acc_t'(product);
  end
endmodule
