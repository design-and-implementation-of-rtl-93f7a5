// tb_c_element: exhaustive check of the Muller C-element.
//
// Walks the inputs through every transition from every state and compares
// the output with the rule "follow when equal, hold when different".
module tb_c_element;
  logic rst_n, a, b, q, expq;
  int checks = 0, failures = 0;

  c_element dut (.rst_n(rst_n), .a(a), .b(b), .q(q));

  task automatic check(string what);
    checks++;
    if (q !== expq) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b q=%0b expected %0b", what, a, b, q, expq);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; rst_n = 0; expq = 0;
    #1 check("reset");
    rst_n = 1;
    #1 check("after reset");
    for (int n = 0; n < 64; n++) begin
      a = $urandom_range(0, 1);
      b = $urandom_range(0, 1);
      if (a == b) expq = a;
      #1 check("random step");
    end
    // Explicit rendezvous sequence
    a = 1; b = 0; #1 check("hold 0 on 10");
    b = 1; expq = 1; #1 check("rise on 11");
    a = 0; #1 check("hold 1 on 01");
    b = 0; expq = 0; #1 check("fall on 00");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
