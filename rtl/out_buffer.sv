// out_buffer: output register of the filter.
//
// When the MIN block enables it, the buffer takes the finished convolution
// sum o_n and the elapsed time dto_n (equal to that of the input sample that
// triggered the convolution) and offers the couple on a 2-phase bundled-data
// channel by toggling out_req. The receiver toggles out_ack when it has taken
// the couple; out_ack is synchronized, and ready is high once the two are
// equal again. An enable while ready is low is a protocol error.
//
// The enable from MIN is the architecture's; the 2-phase output channel is
// this design's choice.
module out_buffer
  import fir_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  acc_t        o_in,
  input  dt_t         dt_in,
  output logic        ready,
  output logic        out_req,
  input  logic        out_ack,
  output out_sample_t out_data
);
  logic [1:0] ack_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_s    <= '0;
      out_req  <= 1'b0;
      out_data <= '0;
    end else begin
      ack_s <= {ack_s[0], out_ack};
      if (enable) begin
        out_data <= '{o: o_in, dt: dt_in};
        out_req  <= ~out_req;
      end
    end
  end

  assign ready = (out_req == ack_s[1]);

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) enable |-> ready);
endmodule
