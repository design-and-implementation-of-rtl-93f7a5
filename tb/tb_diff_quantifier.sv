// tb_diff_quantifier: the comparator window and its handshake gating.
//
// For random input/reference pairs, +LS must be high exactly when
// vin - vref > q/2, -LS exactly when vin - vref < -q/2, req when either is;
// while ack is high all three must be low.
module tb_diff_quantifier;
  import fir_pkg::*;
  ain_t vin, vref;
  logic ack, req, ls_up, ls_dn;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0, n_none = 0;

  diff_quantifier #(.DELAY(1)) dut (
    .vin(vin), .vref(vref), .ack(ack), .req(req), .ls_up(ls_up), .ls_dn(ls_dn)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, half;
    logic eu, ed;
    half = 2 ** (FRAC - 1);
    ack = 0; vin = 0; vref = 0;
    for (int n = 0; n < 400; n++) begin
      vref = ain_t'($urandom_range(0, 400) - 200);
      d    = $urandom_range(0, 4 * half) - 2 * half;
      vin  = ain_t'(int'(vref) + d);
      ack  = (n % 5 == 4);
      eu = !ack && (d > half);
      ed = !ack && (d < -half);
      #3;
      checks++;
      if (ls_up !== eu || ls_dn !== ed || req !== (eu | ed)) begin
        failures++;
        $display("FAIL d=%0d ack=%0b: up=%0b dn=%0b req=%0b", d, ack, ls_up, ls_dn, req);
      end
      if (eu) n_up++; else if (ed) n_dn++; else n_none++;
    end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_none == 0) begin
      failures++;
      $display("FAIL coverage up=%0d dn=%0d none=%0d", n_up, n_dn, n_none);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
