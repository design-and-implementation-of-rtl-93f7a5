// mp_stage: one stage of a 2-phase bundled-data micropipeline.
//
// The stage's control is a Muller C-element whose inputs are the (delayed)
// request from the left and the inverted acknowledge from the right. Its
// output c is at once the request to the right and, after the latch has
// captured, the acknowledge to the left. The data latch has capture and pass
// controls: it holds while c differs from ack_in (the stage holds a token that
// the right side has not taken) and is transparent while they are equal.
// Signalling is by transitions: every edge of req_in announces a new word on
// data_in, every edge of ack_out says it has been captured.
//
// The request from the left passes through a matched delay (REQ_DELAY) so that
// the data it bundles has settled before the C-element fires, and the
// acknowledge to the left leaves through a capture delay (CAP_DELAY) standing
// for the latch's capture-done time. Likewise the acknowledge from the right
// reaches the C-element only after a pass delay (PASS_DELAY, the latch's
// pass-done time), so that the latch has opened and taken the next word before
// the C-element can close it again. All three are behavioural delay elements.
// Latch behaviour of the data register is intended.
//
// The stage structure (C-element on Req and inverted Ack, capture/pass latch)
// is the classic micropipeline the architecture names; the 2-phase encoding
// and the three delays are this design's choices.
module mp_stage #(
  parameter int W         = 8,
  parameter int REQ_DELAY = 3,
  parameter int CAP_DELAY = 2,
  parameter int PASS_DELAY = 1
) (
  input  logic         rst_n,
  input  logic         req_in,
  output logic         ack_out,
  input  logic [W-1:0] data_in,
  output logic         req_out,
  input  logic         ack_in,
  output logic [W-1:0] data_out
);
  logic req_d;
  logic ack_pd;
  logic c;
  logic pass;

  delay_element #(.DELAY(REQ_DELAY)) u_req_delay (.d(req_in), .q(req_d));

  delay_element #(.DELAY(PASS_DELAY)) u_pass_delay (.d(ack_in), .q(ack_pd));

  c_element u_c (.rst_n(rst_n), .a(req_d), .b(~ack_pd), .q(c));

  // Capture/pass latch: transparent while c == ack_in (stage empty).
  assign pass = (c == ack_in);

  always_latch begin
    if (!rst_n)    data_out = '0;
    else if (pass) data_out = data_in;
  end

  assign req_out = c;

  delay_element #(.DELAY(CAP_DELAY)) u_cap_delay (.d(c), .q(ack_out));
endmodule
