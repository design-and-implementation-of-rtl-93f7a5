// c_element: Muller C-element, the rendezvous gate of the micropipeline.
//
// The output copies the inputs when both agree and keeps its value while they
// differ, so it is a state-holding gate: a level-sensitive latch whose enable
// is (a == b). This is the behaviour the filter's handshake control relies on.
// The active-low reset clears the state, this design's choice so that every
// handshake wire starts at 0.
//
// Synthesis infers a latch from this description on purpose; a tool's latch
// warning for q is expected.
module c_element (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);
  always_latch begin
    if (!rst_n)      q = 1'b0;
    else if (a == b) q = a;
  end
endmodule
