// tb_updown_counter: the counter against a scripted quantifier and receiver.
//
// The testbench plays the difference quantifier (4-phase: raise req with +LS
// or -LS, wait for ack, drop req, wait for ack to fall) and the sample
// receiver (2-phase). It checks that each request moves V_num one level in
// the right direction, that each move emits one sample carrying the new level
// and the timer value of that cycle, that the counter stalls (withholds ack)
// while the previous sample is unacknowledged, and that it saturates at
// +/-(2^(M-1)-1) without emitting samples.
module tb_updown_counter;
  import fir_pkg::*;
  localparam int LMAX = 2 ** (M - 1) - 1;
  logic    clk = 0, rst_n = 0;
  logic    req = 0, ls_up = 0, ls_dn = 0, ack, sample_evt, out_req, out_ack = 0, stalled;
  amp_t    vnum;
  dt_t     dt_now = 0;
  sample_t out_data;
  int      checks = 0, failures = 0, level = 0, n_samples = 0, n_stall = 0;

  updown_counter dut (
    .clk(clk), .rst_n(rst_n), .req(req), .ls_up(ls_up), .ls_dn(ls_dn), .ack(ack),
    .vnum(vnum), .dt_now(dt_now), .sample_evt(sample_evt),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data), .stalled(stalled)
  );

  always #5 clk = ~clk;
  always @(posedge clk) dt_now <= dt_now + 1;
  always @(posedge clk) if (stalled) n_stall++;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (vnum=%0d level=%0d)", what, $time, vnum, level);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record the sample produced in an event cycle and compare at the next edge.
  dt_t evt_dt;
  always @(posedge clk) begin
    if (sample_evt) begin
      evt_dt = dt_now;
      #1;
      check(out_data.dt == evt_dt, "sample carries the timer value");
      check(int'(out_data.a) == int'(vnum), "sample carries the new level");
      n_samples++;
    end
  end

  // One quantifier request; up=1 for +LS. Receiver acks only if auto_ack.
  task automatic request(bit up, bit auto_ack);
    int  lvl0;
    bit  moves;
    logic ph;
    lvl0 = int'(vnum);
    moves  = up ? (lvl0 < LMAX) : (lvl0 > -LMAX);
    ph     = out_req;
    @(negedge clk);
    ls_up = up; ls_dn = !up; req = 1;
    wait (ack == 1);
    @(negedge clk);
    req = 0; ls_up = 0; ls_dn = 0;
    wait (ack == 0);
    if (moves) level = lvl0 + (up ? 1 : -1);
    check(int'(vnum) == level, "level after request");
    check((out_req != ph) == moves, "one sample per move");
    if (auto_ack && out_req != out_ack) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      out_ack = out_req;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 60; n++) request($urandom_range(0, 1), 1);
    // Stall: leave a sample unacknowledged, then request again.
    request(1, 0);
    fork
      request(0, 1);
      begin
        repeat (20) @(negedge clk);
        check(stalled == 1, "counter stalls while sample pending");
        check(ack == 0, "no ack while stalled");
        out_ack = out_req;
      end
    join
    // Saturation at the top
    while (int'(vnum) < LMAX) request(1, 1);
    request(1, 1);
    request(1, 1);
    check(int'(vnum) == LMAX, "saturated at top");
    while (int'(vnum) > -LMAX) request(0, 1);
    request(0, 1);
    check(int'(vnum) == -LMAX, "saturated at bottom");
    check(n_stall > 0, "stall observed");
    $display("samples=%0d stall_cycles=%0d", n_samples, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
