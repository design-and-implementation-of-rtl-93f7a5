// tb_fir_filter: the filter end to end against a time-domain reference.
//
// The testbench loads a random irregular impulse response, then sends random
// irregular samples. The reference output is the integral, one timer period at
// a time, of h(tau) * x(t_n - tau), both held at order 0, over the length of
// the shorter of response and stored history: a model that shares nothing
// with the filter's breakpoint walk. Every output (o_n, dto_n) is compared.
// Phase 1 sends one sample at a time and checks that a convolution of S steps
// keeps the filter busy exactly S + 2 cycles. Phase 2 sends faster than the
// filter can work and acknowledges outputs late, so input waiting and output
// back-pressure both occur; both must be seen, and both ways a convolution
// ends (response used up, history used up).
module tb_fir_filter;
  import fir_pkg::*;
  localparam int NX = 16, NH = 16, TS = 4;
  logic        clk = 0, rst_n = 0, in_req = 0, in_ack, out_req, out_ack = 0, coef_we = 0, busy;
  sample_t     in_data = '0;
  out_sample_t out_data;
  logic [3:0]  coef_addr = 0;
  coef_t       coef_ah = 0;
  dt_t         coef_dth = 0;
  int          hamp [NH], hdt [NH];
  int          xa [$], xdt [$];
  longint      exp_o [$];
  int          exp_dt [$], exp_steps [$];
  int          checks = 0, failures = 0, received = 0;
  int          n_end_h = 0, n_end_x = 0, n_in_wait = 0, n_out_wait = 0;

  fir_filter #(.NX(NX), .NH(NH), .T_SAMPLE(TS)) dut (
    .clk(clk), .rst_n(rst_n), .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_ah(coef_ah), .coef_dth(coef_dth), .busy(busy)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (busy && in_req != in_ack) n_in_wait++;
    if (busy && out_req != out_ack) n_out_wait++;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog: %0d outputs", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference for the newest sample just pushed onto xa/xdt.
  task automatic reference();
    longint o;
    int     sh, sx, tend, kk, jj, cx, ch, steps, last_k, last_j;
    sh = 0;
    for (int i = 0; i < NH; i++) sh += hdt[i];
    sx = 0;
    for (int i = 0; i < NX; i++) sx += (i < xa.size()) ? xdt[xdt.size()-1-i] : int'(DT_MAX);
    tend = (sx < sh) ? sx : sh;
    if (sh <= sx) n_end_h++; else n_end_x++;
    o = 0; kk = 0; jj = 0; cx = 0; ch = 0; steps = 0; last_k = -1; last_j = -1;
    for (int t = 0; t < tend; t++) begin
      int ax, xdur;
      ax   = (kk < xa.size()) ? xa[xa.size()-1-kk] : 0;
      xdur = (kk < xa.size()) ? xdt[xdt.size()-1-kk] : int'(DT_MAX);
      if (kk != last_k || jj != last_j) steps++;
      last_k = kk; last_j = jj;
      o += longint'(ax) * longint'(hamp[jj]);
      cx++; ch++;
      if (cx == xdur)    begin kk++; cx = 0; end
      if (ch == hdt[jj]) begin jj++; ch = 0; end
    end
    exp_o.push_back(o);
    exp_dt.push_back(xdt[xdt.size()-1]);
    exp_steps.push_back(steps);
  endtask

  task automatic send(int a, int d);
    wait (in_req == in_ack);
    @(negedge clk);
    in_data = '{a: amp_t'(a), dt: dt_t'(d)};
    xa.push_back(a);
    xdt.push_back(d);
    reference();
    in_req = ~in_req;
  endtask

  // Output receiver
  bit slow_rx = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (out_req != out_ack) begin
        if (slow_rx) repeat ($urandom_range(5, 60)) @(negedge clk);
        check(longint'(out_data.o) == exp_o[0], "output value");
        check(int'(out_data.dt) == exp_dt[0], "output interval");
        if (longint'(out_data.o) != exp_o[0])
          $display("  output %0d: got %0d expected %0d", received, out_data.o, exp_o[0]);
        void'(exp_o.pop_front());
        void'(exp_dt.pop_front());
        received++;
        out_ack = out_req;
      end
    end
  end

  initial begin
    int busy_len, nsent;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NH; i++) begin
      hamp[i] = $urandom_range(0, 255) - 128;
      hdt[i]  = (i < 4) ? TS : $urandom_range(1, 12);
      @(negedge clk);
      coef_we = 1; coef_addr = 4'(i); coef_ah = coef_t'(hamp[i]); coef_dth = dt_t'(hdt[i]);
    end
    @(negedge clk);
    coef_we = 0;
    // Phase 1: one at a time, check the cycle count.
    nsent = 0;
    for (int n = 0; n < 40; n++) begin
      send($urandom_range(0, 254) - 127, $urandom_range(1, 10));
      nsent++;
      wait (busy);
      busy_len = 0;
      while (busy) begin @(posedge clk); #1; busy_len++; end
      check(busy_len == exp_steps[exp_steps.size()-1] + 2, "S + 2 cycles per convolution");
      wait (received == nsent);
      repeat (4) @(negedge clk);
    end
    // Phase 2: fast input, slow output.
    slow_rx = 1;
    for (int n = 0; n < 120; n++) begin
      send($urandom_range(0, 254) - 127, $urandom_range(1, (n % 30 < 15) ? 4 : 40));
      nsent++;
      if (n == 60) slow_rx = 0;
    end
    wait (received == nsent);
    check(n_end_h > 0 && n_end_x > 0, "both ways of ending");
    check(n_in_wait > 0, "input waited for a running convolution");
    check(n_out_wait > 0, "output back-pressure");
    $display("outputs=%0d end_response=%0d end_history=%0d in_wait=%0d out_wait=%0d",
             received, n_end_h, n_end_x, n_in_wait, n_out_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
