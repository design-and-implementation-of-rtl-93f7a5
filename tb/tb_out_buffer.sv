// tb_out_buffer: each enable must publish (o, dt) with one out_req toggle;
// ready must drop until the receiver's acknowledge has come back, and the
// published word must hold while unacknowledged.
module tb_out_buffer;
  import fir_pkg::*;
  logic        clk = 0, rst_n = 0, enable = 0, ready, out_req, out_ack = 0;
  acc_t        o_in = 0;
  dt_t         dt_in = 0;
  out_sample_t out_data;
  int          checks = 0, failures = 0;

  out_buffer dut (.clk(clk), .rst_n(rst_n), .enable(enable), .o_in(o_in), .dt_in(dt_in),
                  .ready(ready), .out_req(out_req), .out_ack(out_ack), .out_data(out_data));

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_t eo;
    dt_t  ed;
    logic ph;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 50; n++) begin
      check(ready, "ready before enable");
      eo = acc_t'({$urandom, $urandom});
      ed = dt_t'($urandom);
      ph = out_req;
      o_in = eo; dt_in = ed; enable = 1;
      @(negedge clk);
      enable = 0;
      o_in = ~eo;
      check(out_req != ph, "request toggled");
      check(out_data.o == eo && out_data.dt == ed, "word published");
      check(!ready, "not ready while unacknowledged");
      repeat ($urandom_range(0, 6)) @(negedge clk);
      check(out_data.o == eo, "word held");
      out_ack = out_req;
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
