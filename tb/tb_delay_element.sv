// tb_delay_element: checks that every edge reaches the output exactly DELAY
// time units later, and not before.
module tb_delay_element;
  localparam int D = 3;
  logic d, q;
  int checks = 0, failures = 0;

  delay_element #(.DELAY(D)) dut (.d(d), .q(q));

  task automatic expect_q(logic v, string what);
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, v, $time);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    #10 expect_q(0, "idle");
    for (int n = 0; n < 8; n++) begin
      d = ~d;
      #1 expect_q(~d, "before delay");
      #(D - 2) expect_q(~d, "just before the delay");
      #2 expect_q(d, "after the delay");
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
