// micropipeline: a clockless FIFO of N_STAGES micropipeline stages.
//
// Each stage is a C-element controlling a capture/pass latch (mp_stage). A word
// enters with a transition on in_req while in_data is stable, ripples forward
// as far as empty stages allow, and is offered at the far end with a
// transition on out_req; a transition on out_ack frees the last stage. Up to
// N_STAGES words can be in flight, so the channel absorbs bursts from the
// sender while the receiver is busy. The protocol is 2-phase bundled data on
// both sides: in_data must be stable from the in_req edge until the matching
// in_ack edge; out_data is stable while out_req differs from out_ack.
// Propagation time per stage is set by the behavioural delays in mp_stage.
//
// The stage chain is the architecture's; its depth of three follows the
// usual three-stage drawing and is a parameter here.
module micropipeline #(
  parameter int W         = 8,
  parameter int N_STAGES  = 3,
  parameter int REQ_DELAY = 3,
  parameter int CAP_DELAY = 2
) (
  input  logic         rst_n,
  input  logic         in_req,
  output logic         in_ack,
  input  logic [W-1:0] in_data,
  output logic         out_req,
  input  logic         out_ack,
  output logic [W-1:0] out_data
);
  logic [N_STAGES:0]        req;
  logic [N_STAGES:0]        ack;
  logic [N_STAGES:0][W-1:0] dat;

  assign req[0] = in_req;
  assign dat[0] = in_data;
  assign in_ack = ack[0];
  assign out_req  = req[N_STAGES];
  assign out_data = dat[N_STAGES];
  assign ack[N_STAGES] = out_ack;

  for (genvar s = 0; s < N_STAGES; s++) begin : g_stage
    mp_stage #(.W(W), .REQ_DELAY(REQ_DELAY), .CAP_DELAY(CAP_DELAY)) u_stage (
      .rst_n   (rst_n),
      .req_in  (req[s]),
      .ack_out (ack[s]),
      .data_in (dat[s]),
      .req_out (req[s+1]),
      .ack_in  (ack[s+1]),
      .data_out(dat[s+1])
    );
  end
endmodule
