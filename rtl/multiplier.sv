// multiplier: computes the sub-area of one convolution step.
//
// The sub-area is the rectangle dt_min * ax_{n-k} * ah_j: an unsigned elapsed
// time times a signed input amplitude times a signed response amplitude. The
// product is registered, so it appears with out_valid one clock after the step
// that produced it; the width PROD_W holds it exactly.
//
// The sub-area is the architecture's; the one-cycle register is this design's.
module multiplier
  import fir_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  dt_t   dt_min,
  input  amp_t  ax,
  input  coef_t ah,
  output logic  out_valid,
  output prod_t product
);
  prod_t p;
  assign p = prod_t'($signed({1'b0, dt_min})) * prod_t'(ax) * prod_t'(ah);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      product   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) product <= p;
    end
  end
endmodule
