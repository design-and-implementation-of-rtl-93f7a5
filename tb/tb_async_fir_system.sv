// tb_async_fir_system: the whole chain, at its default sizes, on an analog
// input made of ramps and rests.
//
// The testbench loads an irregular impulse response, drives the input, and
// records every sample the converter emits. From those samples an independent
// time-domain model (one timer period at a time, both signals held at order 0)
// predicts each filter output, which is compared in order, value and
// interval. It also checks the converter's samples (one level per sample, dt
// equal to the cycles between samples) and counts the mechanisms of the
// design, each of which must occur: crossings up and down, silence while the
// input rests, words queued in the micropipeline, the converter stalling on a
// full channel, output back-pressure, and convolutions ending on the response
// and on the history.
module tb_async_fir_system;
  import fir_pkg::*;
  localparam int NX = 16, NH = 16;
  localparam int Q = 2 ** FRAC;
  logic        clk = 0, rst_n = 0, coef_we = 0, out_ack = 0;
  ain_t        vin = 0;
  logic [3:0]  coef_addr = 0;
  coef_t       coef_ah = 0;
  dt_t         coef_dth = 0;
  logic        out_req, adc_req, adc_ack, adc_stalled, fir_busy;
  out_sample_t out_data;
  sample_t     adc_data;
  amp_t        adc_level;

  int     hamp [NH], hdt [NH];
  int     xa [$], xdt [$];
  longint exp_o [$];
  int     exp_dt [$];
  int     checks = 0, failures = 0, cycle = 0, received = 0, nsamples = 0, nacked = 0;
  int     n_up = 0, n_dn = 0, n_quiet_ok = 0, quiet_samples = 0, n_stall = 0, max_queued = 0;
  int     n_backpressure = 0, n_end_h = 0, n_end_x = 0, last_cycle = -1;
  bit     quiet = 0, slow_rx = 0;

  async_fir_system dut (
    .clk(clk), .rst_n(rst_n), .vin(vin),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_ah(coef_ah), .coef_dth(coef_dth),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data),
    .adc_req(adc_req), .adc_ack(adc_ack), .adc_data(adc_data), .adc_level(adc_level),
    .adc_stalled(adc_stalled), .fir_busy(fir_busy)
  );

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL watchdog: %0d outputs of %0d samples", received, nsamples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference output for the newest recorded sample.
  task automatic reference();
    longint o;
    int     sh, sx, tend, kk, jj, cx, ch;
    sh = 0;
    for (int i = 0; i < NH; i++) sh += hdt[i];
    sx = 0;
    for (int i = 0; i < NX; i++) sx += (i < xa.size()) ? xdt[xdt.size()-1-i] : int'(DT_MAX);
    tend = (sx < sh) ? sx : sh;
    if (sh <= sx) n_end_h++; else n_end_x++;
    o = 0; kk = 0; jj = 0; cx = 0; ch = 0;
    for (int t = 0; t < tend; t++) begin
      int ax, xdur;
      ax   = (kk < xa.size()) ? xa[xa.size()-1-kk] : 0;
      xdur = (kk < xa.size()) ? xdt[xdt.size()-1-kk] : int'(DT_MAX);
      o += longint'(ax) * longint'(hamp[jj]);
      cx++; ch++;
      if (cx == xdur)    begin kk++; cx = 0; end
      if (ch == hdt[jj]) begin jj++; ch = 0; end
    end
    exp_o.push_back(o);
    exp_dt.push_back(xdt[xdt.size()-1]);
  endtask

  // Observe the converter's sample channel.
  logic adc_req_q = 0, adc_ack_q = 0;
  always @(posedge clk) begin
    cycle++;
    if (adc_stalled) n_stall++;
    if (adc_req != adc_req_q) begin
      int prev;
      prev = (xa.size() > 0) ? xa[xa.size()-1] : 0;
      check(int'(adc_data.a) - prev == 1 || prev - int'(adc_data.a) == 1, "one level per sample");
      if (int'(adc_data.a) > prev) n_up++; else n_dn++;
      if (last_cycle >= 0) check(int'(adc_data.dt) == cycle - last_cycle, "sample interval");
      last_cycle = cycle;
      if (quiet) quiet_samples++;
      xa.push_back(int'(adc_data.a));
      xdt.push_back(int'(adc_data.dt));
      reference();
      nsamples++;
    end
    if (adc_ack != adc_ack_q) nacked++;
    if (nacked - received - 1 > max_queued) max_queued = nacked - received - 1;
    if (out_req != out_ack && fir_busy) n_backpressure++;
    adc_req_q <= adc_req;
    adc_ack_q <= adc_ack;
  end

  // Output receiver
  initial begin
    forever begin
      @(negedge clk);
      if (out_req != out_ack) begin
        if (slow_rx) repeat ($urandom_range(20, 80)) @(negedge clk);
        check(exp_o.size() > 0, "output has a sample behind it");
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

  task automatic ramp_to(int target, int step);
    while (int'(vin) != target) begin
      @(negedge clk);
      if (int'(vin) < target) vin = ain_t'((int'(vin) + step > target) ? target : int'(vin) + step);
      else                    vin = ain_t'((int'(vin) - step < target) ? target : int'(vin) - step);
    end
  endtask

  task automatic rest(int cycles);
    int s0;
    repeat (30) @(negedge clk);
    wait (!fir_busy && exp_o.size() == 0);
    s0 = nsamples;
    quiet = 1;
    repeat (cycles) @(negedge clk);
    quiet = 0;
    check(nsamples == s0, "no samples while the input rests");
    if (nsamples == s0) n_quiet_ok++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NH; i++) begin
      hamp[i] = $urandom_range(0, 255) - 128;
      hdt[i]  = $urandom_range(30, 60);
      @(negedge clk);
      coef_we = 1; coef_addr = 4'(i); coef_ah = coef_t'(hamp[i]); coef_dth = dt_t'(hdt[i]);
    end
    @(negedge clk);
    coef_we = 0;
    rest(100);
    ramp_to(12 * Q + 5, 1);   rest(200);     // slow rise
    ramp_to(-20 * Q, 3);      rest(200);     // fast fall: channel fills, converter stalls
    slow_rx = 1;
    ramp_to(4 * Q - 3, 2);                   // rise with a slow output receiver
    slow_rx = 0;
    rest(300);
    for (int n = 0; n < 6; n++) begin
      ramp_to(($urandom_range(0, 80) - 40) * Q + $urandom_range(0, Q - 1) - Q / 2, $urandom_range(1, 3));
      rest($urandom_range(50, 300));
    end
    wait (received == nsamples);
    check(n_up > 0, "crossings upwards");
    check(n_dn > 0, "crossings downwards");
    check(n_quiet_ok > 0 && quiet_samples == 0, "silence while resting");
    check(max_queued >= 2, "words queued in the micropipeline");
    check(n_stall > 0, "converter stalled on a full channel");
    check(n_backpressure > 0, "output back-pressure");
    check(n_end_h > 0, "convolution ended on the response");
    check(n_end_x > 0, "convolution ended on the history");
    $display("samples=%0d outputs=%0d up=%0d down=%0d quiet=%0d max_queued=%0d stall=%0d backpressure=%0d end_resp=%0d end_hist=%0d",
             nsamples, received, n_up, n_dn, n_quiet_ok, max_queued, n_stall, n_backpressure, n_end_h, n_end_x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
