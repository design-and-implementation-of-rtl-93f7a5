// tb_dac: the feedback DAC must put level V_num at V_num * q, q = 2^FRAC,
// after its settling time, for random and extreme codes.
module tb_dac;
  import fir_pkg::*;
  amp_t vnum;
  ain_t vref;
  int checks = 0, failures = 0;

  dac #(.SETTLE(2)) dut (.vnum(vnum), .vref(vref));

  task automatic check_code(int code);
    int expv;
    vnum = amp_t'(code);
    expv = code * (2 ** FRAC);
    #5;
    checks++;
    if (int'(vref) != expv) begin
      failures++;
      $display("FAIL code %0d: vref=%0d expected %0d", code, vref, expv);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_code(0);
    check_code(2 ** (M - 1) - 1);
    check_code(-(2 ** (M - 1) - 1));
    for (int n = 0; n < 50; n++) check_code($urandom_range(0, 2 ** M - 2) - (2 ** (M - 1) - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
