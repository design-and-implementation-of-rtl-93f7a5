// tb_adc_timer: the timer must report, in each sample-event cycle, the number
// of clock cycles since the previous event, and saturate on long gaps.
module tb_adc_timer;
  import fir_pkg::*;
  logic clk = 0, rst_n = 0, evt = 0;
  dt_t  dt;
  int   checks = 0, failures = 0, since = 0;
  bit   seen_event = 0;

  adc_timer dut (.clk(clk), .rst_n(rst_n), .sample_evt(evt), .dt(dt));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic gap(int cycles);
    evt = 0;
    repeat (cycles) @(negedge clk);
    evt = 1;
    checks++;
    if (seen_event && int'(dt) != ((cycles + 1 > int'(DT_MAX)) ? int'(DT_MAX) : cycles + 1)) begin
      failures++;
      $display("FAIL gap %0d: dt=%0d", cycles, dt);
    end
    @(negedge clk);
    evt = 0;
    seen_event = 1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    gap(3);
    for (int n = 0; n < 100; n++) gap($urandom_range(0, 40));
    gap(70000);   // longer than the counter: saturates
    gap(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
