// tb_aadc: the level-crossing converter on a piecewise-linear input.
//
// The input ramps up and down with slopes inside the tracking condition and
// rests on flat stretches. Checks: consecutive samples differ by exactly one
// level; each sample's dt equals the number of clock cycles since the previous
// sample; at the end of every flat stretch the level is the one nearest to the
// input (within q/2); and a flat stretch, once reached, produces no samples.
module tb_aadc;
  import fir_pkg::*;
  localparam int Q = 2 ** FRAC;
  logic    clk = 0, rst_n = 0, out_req, out_ack = 0, stalled;
  ain_t    vin = 0;
  sample_t out_data;
  amp_t    vnum;
  int      checks = 0, failures = 0, cycle = 0, last_cycle = -1, prev_level = 0;
  int      n_up = 0, n_dn = 0, n_samples = 0, quiet_samples = 0;
  bit      quiet = 0;

  aadc dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .out_req(out_req), .out_ack(out_ack),
    .out_data(out_data), .vnum(vnum), .stalled(stalled)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample receiver
  initial begin
    forever begin
      @(negedge clk);
      if (out_req != out_ack) begin
        n_samples++;
        check(int'(out_data.a) - prev_level == 1 || int'(out_data.a) - prev_level == -1,
              "one level per sample");
        if (int'(out_data.a) > prev_level) n_up++; else n_dn++;
        if (last_cycle >= 0) check(int'(out_data.dt) == cycle - last_cycle, "dt is the cycle count");
        if (quiet) quiet_samples++;
        prev_level = int'(out_data.a);
        last_cycle = cycle;
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

  task automatic hold(int cycles);
    repeat (20) @(negedge clk);      // let the loop settle
    quiet = 1;
    repeat (cycles) @(negedge clk);
    quiet = 0;
    check(int'(vin) - int'(vnum) * Q <= Q / 2 && int'(vnum) * Q - int'(vin) <= Q / 2,
          "level nearest to the input");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    hold(50);
    ramp_to(20 * Q + 3, 1);  hold(300);
    ramp_to(-35 * Q, 2);     hold(100);
    ramp_to(-30 * Q + 7, 1); hold(500);
    for (int n = 0; n < 10; n++) begin
      ramp_to(($urandom_range(0, 200) - 100) * Q + $urandom_range(0, Q - 1) - Q / 2, $urandom_range(1, 2));
      hold($urandom_range(10, 200));
    end
    check(quiet_samples == 0, "no samples while the input rests");
    check(n_up > 0 && n_dn > 0, "crossings in both directions");
    $display("samples=%0d up=%0d down=%0d", n_samples, n_up, n_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
