// tb_delay_line: sample history, impulse-response table and input handshake.
//
// Checks the reset contents (zero amplitudes, saturated sample times, response
// intervals of T_SAMPLE), that each 2-phase input word is acknowledged once,
// announced by one start pulse and shifted in as k = 0 with the older words
// moving to k + 1, that no word is taken while busy is high, and that the
// impulse-response write port fills (ah_j, dth_j).
module tb_delay_line;
  import fir_pkg::*;
  localparam int NX = 8, NH = 4, TS = 4;
  logic          clk = 0, rst_n = 0, in_req = 0, in_ack, busy = 0, start, coef_we = 0;
  sample_t       in_data = '0;
  logic [2:0]    k = 0;
  logic [1:0]    j = 0, coef_addr = 0;
  amp_t          ax;
  dt_t           dtx, dth, dt_newest, coef_dth = 0;
  coef_t         ah, coef_ah = 0;
  sample_t       model [NX];
  int            checks = 0, failures = 0, starts = 0;

  delay_line #(.NX(NX), .NH(NH), .T_SAMPLE(TS)) dut (
    .clk(clk), .rst_n(rst_n), .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .busy(busy), .start(start), .k(k), .j(j), .ax(ax), .dtx(dtx), .ah(ah), .dth(dth),
    .dt_newest(dt_newest), .coef_we(coef_we), .coef_addr(coef_addr), .coef_ah(coef_ah),
    .coef_dth(coef_dth)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_history();
    for (int i = 0; i < NX; i++) begin
      k = 3'(i);
      #1 check(ax == model[i].a && dtx == model[i].dt, "history word");
    end
    check(dt_newest == model[0].dt, "newest interval");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0;
    for (int i = 0; i < NX; i++) model[i] = '{a: '0, dt: DT_MAX};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_history();
    for (int i = 0; i < NH; i++) begin
      j = 2'(i);
      #1 check(ah == 0 && dth == dt_t'(TS), "reset response");
    end
    for (int n = 0; n < 20; n++) begin
      in_data = '{a: amp_t'($urandom), dt: dt_t'($urandom_range(1, 1000))};
      busy = (n % 4 == 3);
      s0 = starts;
      @(negedge clk);
      in_req = ~in_req;
      repeat (6) @(negedge clk);
      if (busy) begin
        check(in_ack != in_req, "no word taken while busy");
        check(starts == s0, "no start while busy");
        busy = 0;
        repeat (4) @(negedge clk);
      end
      check(in_ack == in_req, "word acknowledged");
      check(starts == s0 + 1, "one start pulse");
      for (int i = NX - 1; i > 0; i--) model[i] = model[i-1];
      model[0] = in_data;
      check_history();
    end
    for (int i = 0; i < NH; i++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = 2'(i); coef_ah = coef_t'(i * 37 - 50); coef_dth = dt_t'(i + 9);
    end
    @(negedge clk);
    coef_we = 0;
    for (int i = 0; i < NH; i++) begin
      j = 2'(i);
      #1 check(ah == coef_t'(i * 37 - 50) && dth == dt_t'(i + 9), "loaded response");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
