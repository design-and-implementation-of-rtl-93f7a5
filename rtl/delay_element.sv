// delay_element: behavioural model of a matched delay on a request wire.
//
// Bundled-data micropipelines rely on timing assumptions: a request must reach
// the next stage only after the data it goes with has settled. In silicon this
// is a chain of buffers sized to the data path; here it is a transport delay
// of DELAY time units, for simulation only. Every transition of d appears on q
// DELAY units later. The output starts at 0.
module delay_element #(
  parameter int DELAY = 3
) (
  input  logic d,
  output logic q
);
  initial q = 1'b0;
  always @(d) q <= #(DELAY) d;
endmodule
