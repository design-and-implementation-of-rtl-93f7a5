// tb_mp_stage: one micropipeline stage between a hand-driven sender and
// receiver.
//
// Checks that a request edge is passed on after the request delay, that the
// latch captures the word and then holds it while the receiver has not
// acknowledged (even when the input data changes), that the acknowledge to the
// sender follows the capture, and that the latch turns transparent again
// after the receiver's acknowledge.
module tb_mp_stage;
  localparam int W = 8;
  logic rst_n, req_in, ack_out, req_out, ack_in;
  logic [W-1:0] data_in, data_out;
  int checks = 0, failures = 0;

  mp_stage #(.W(W), .REQ_DELAY(3), .CAP_DELAY(2)) dut (
    .rst_n(rst_n), .req_in(req_in), .ack_out(ack_out), .data_in(data_in),
    .req_out(req_out), .ack_in(ack_in), .data_out(data_out)
  );

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word;
    logic         ph;
    rst_n = 0; req_in = 0; ack_in = 0; data_in = 0;
    #10 rst_n = 1;
    #10;
    ph = 0;
    for (int n = 0; n < 10; n++) begin
      word = W'($urandom);
      data_in = word;
      #1 req_in = ~ph;
      #1 check(req_out == ph, "request not passed before the delay");
      #4 check(req_out == ~ph, "request passed after the delay");
      check(data_out == word, "word captured");
      #3 check(ack_out == ~ph, "acknowledge to sender after capture");
      data_in = ~word;
      #2 check(data_out == word, "latch holds while receiver has not taken");
      ack_in = ~ph;
      #1 check(data_out == ~word, "latch transparent after receiver ack");
      ph = ~ph;
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
