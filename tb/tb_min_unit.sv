// tb_min_unit: the convolution walk against an independent breakpoint model.
//
// The testbench holds the input intervals dtx_k and response intervals dth_j
// and answers the block's reads. The expected steps are computed from the
// merged set of cumulative breakpoints of both signals up to the end of the
// shorter one: each gap between neighbouring breakpoints is one step with
// dt_min = the gap, and k, j the segments it falls in. Checks every step,
// that the walk takes exactly one step per cycle, that enable and reset come
// together two cycles after the last step, and that they wait for the buffer.
// Both ways of ending (response used up, history used up) must occur.
module tb_min_unit;
  import fir_pkg::*;
  localparam int NX = 6, NH = 5;
  logic       clk = 0, rst_n = 0, start = 0, buf_ready = 1;
  logic [2:0] k, j;
  logic       busy, step_valid, acc_reset, buf_enable;
  dt_t        dt_min, dtx, dth;
  int         xd [NX], hd [NH];
  int         checks = 0, failures = 0, end_h = 0, end_x = 0;

  min_unit #(.NX(NX), .NH(NH)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .dtx(dtx), .dth(dth), .buf_ready(buf_ready),
    .k(k), .j(j), .busy(busy), .step_valid(step_valid), .dt_min(dt_min),
    .acc_reset(acc_reset), .buf_enable(buf_enable)
  );

  assign dtx = (int'(k) < NX) ? dt_t'(xd[k]) : '0;
  assign dth = (int'(j) < NH) ? dt_t'(hd[j]) : '0;

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int wait_ready);
    int bp [$];
    int sx, sh, tend, kk, jj, nsteps, cyc;
    sx = 0; sh = 0;
    bp = {};
    for (int i = 0; i < NX; i++) begin sx += xd[i]; bp.push_back(sx); end
    for (int i = 0; i < NH; i++) begin sh += hd[i]; bp.push_back(sh); end
    tend = (sx < sh) ? sx : sh;
    if (sh <= sx) end_h++; else end_x++;
    bp.push_back(0);
    bp.sort();
    bp = bp.unique();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    nsteps = 0;
    for (int b = 0; b + 1 < bp.size() && bp[b] < tend; b++) begin
      int a0, acc;
      a0 = bp[b];
      kk = 0; acc = 0;
      for (int i = 0; i < NX; i++) begin acc += xd[i]; if (acc <= a0) kk = i + 1; end
      jj = 0; acc = 0;
      for (int i = 0; i < NH; i++) begin acc += hd[i]; if (acc <= a0) jj = i + 1; end
      check(step_valid, "one step per cycle");
      check(int'(dt_min) == bp[b+1] - a0 && int'(k) == kk && int'(j) == jj, "step k, j, dt_min");
      nsteps++;
      @(negedge clk);
    end
    check(!step_valid && !buf_enable, "drain cycle");
    buf_ready = (wait_ready == 0);
    @(negedge clk);
    cyc = 0;
    while (!buf_enable && cyc < 50) begin
      if (cyc == wait_ready) buf_ready = 1;
      #1;
      if (buf_enable) break;
      check(!acc_reset, "no reset before enable");
      @(negedge clk);
      cyc++;
    end
    check(buf_enable && acc_reset, "enable and reset together");
    check(cyc == wait_ready, "enable two cycles after the last step, when ready");
    @(negedge clk);
    check(!busy && !buf_enable, "idle after enable");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      for (int i = 0; i < NX; i++) xd[i] = $urandom_range(1, (r % 2 == 0) ? 6 : 12);
      for (int i = 0; i < NH; i++) hd[i] = $urandom_range(1, (r % 2 == 0) ? 12 : 6);
      if (r % 10 == 3) for (int i = 0; i < NH; i++) hd[i] = xd[i];   // coincident breakpoints
      run((r % 5 == 4) ? 3 : 0);
    end
    check(end_h > 0 && end_x > 0, "both ways of ending");
    $display("ends: response=%0d history=%0d", end_h, end_x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
