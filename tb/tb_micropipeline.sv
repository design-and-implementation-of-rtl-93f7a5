// tb_micropipeline: random traffic through a 3-stage micropipeline FIFO.
//
// A sender writes random words with the 2-phase protocol as fast as the FIFO
// acknowledges (after random pauses); a receiver takes them after random
// delays. Every word must arrive once, in order, unchanged. The test also
// checks that the FIFO buffers: at some point the sender must be able to put
// N_STAGES words in while the receiver holds back.
module tb_micropipeline;
  localparam int W = 12;
  localparam int N = 3;
  localparam int WORDS = 200;
  logic rst_n, in_req, in_ack, out_req, out_ack;
  logic [W-1:0] in_data, out_data;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, received = 0, max_inflight = 0, nsent = 0;

  micropipeline #(.W(W), .N_STAGES(N)) dut (
    .rst_n(rst_n), .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data)
  );

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog: %0d words received", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sender
  initial begin
    rst_n = 0; in_req = 0; in_data = 0;
    #20 rst_n = 1;
    #10;
    for (int n = 0; n < WORDS; n++) begin
      wait (in_ack == in_req);
      #($urandom_range(0, 20));
      in_data = W'($urandom);
      sent.push_back(in_data);
      nsent++;
      #1 in_req = ~in_req;
    end
  end

  // Receiver
  initial begin
    logic [W-1:0] exp_w;
    out_ack = 0;
    #30;
    while (received < WORDS) begin
      wait (out_req != out_ack);
      // hold back long now and then so the FIFO fills up
      if (received % 40 == 5) #200;
      else #($urandom_range(1, 25));
      if (nsent - received > max_inflight) max_inflight = nsent - received;
      exp_w = sent.pop_front();
      checks++;
      if (out_data !== exp_w) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", received, out_data, exp_w);
      end
      received++;
      out_ack = ~out_ack;
      #1;
    end
    checks++;
    if (max_inflight < N) begin
      failures++;
      $display("FAIL FIFO never held %0d words (max %0d)", N, max_inflight);
    end
    $display("words=%0d max_inflight=%0d", received, max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
