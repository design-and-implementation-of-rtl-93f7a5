// updown_counter: the converter's up/down counter and sample emitter.
//
// The counter holds V_num, the current quantization level. It answers the
// difference quantifier's 4-phase handshake: when a request arrives it moves
// one level up (+LS) or down (-LS), raises ack, and emits the new level as a
// sample i_n together with the timer's elapsed time dt_in. It lowers ack once
// the request has returned to zero. Samples leave on a 2-phase bundled-data
// channel (out_req toggles per sample, out_ack toggles back); while the
// previous sample has not been acknowledged the counter withholds its ack, so
// the converter stalls rather than lose a sample.
//
// The quantifier and the receiver of samples run without this clock, so req
// and out_ack pass through two-flop synchronizers. The count saturates at
// +/-(2^(M-1)-1), giving 2^M - 1 levels; a request beyond the range is
// acknowledged without a sample.
//
// Counting on +LS/-LS is the converter's; saturation, the stall rule and the
// synchronizers are this design's choices.
module updown_counter
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // 4-phase link with the difference quantifier
  input  logic    req,
  input  logic    ls_up,
  input  logic    ls_dn,
  output logic    ack,
  // level to the DAC
  output amp_t    vnum,
  // timer
  input  dt_t     dt_now,
  output logic    sample_evt,
  // 2-phase sample channel
  output logic    out_req,
  input  logic    out_ack,
  output sample_t out_data,
  output logic    stalled
);
  localparam amp_t AMP_MAX = amp_t'(2 ** (M - 1) - 1);
  localparam amp_t AMP_MIN = -AMP_MAX;

  logic [1:0] req_s, ack_s, up_s, dn_s;
  logic       chan_free, take, at_limit;
  amp_t       next_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_s <= '0; ack_s <= '0; up_s <= '0; dn_s <= '0;
    end else begin
      req_s <= {req_s[0], req};
      up_s  <= {up_s[0], ls_up};
      dn_s  <= {dn_s[0], ls_dn};
      ack_s <= {ack_s[0], out_ack};
    end
  end

  assign chan_free = (out_req == ack_s[1]);
  assign take      = req_s[1] && !ack && chan_free;
  assign stalled   = req_s[1] && !ack && !chan_free;
  assign at_limit  = up_s[1] ? (vnum == AMP_MAX) : (vnum == AMP_MIN);
  assign next_v    = up_s[1] ? vnum + amp_t'(1) : vnum - amp_t'(1);
  assign sample_evt = take && !at_limit && (up_s[1] || dn_s[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack      <= 1'b0;
      vnum     <= '0;
      out_req  <= 1'b0;
      out_data <= '0;
    end else begin
      if (take) begin
        ack <= 1'b1;
        if (sample_evt) begin
          vnum     <= next_v;
          out_data <= '{a: next_v, dt: dt_now};
          out_req  <= ~out_req;
        end
      end else if (!req_s[1] && ack) begin
        ack <= 1'b0;
      end
    end
  end
  // 4-phase rule: the direction lines are one-hot while a request is up.
  a_one_dir: assert property (@(posedge clk) disable iff (!rst_n)
    req_s[1] |-> (up_s[1] ^ dn_s[1]));
endmodule
