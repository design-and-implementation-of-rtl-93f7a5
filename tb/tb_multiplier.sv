// tb_multiplier: random and extreme operands; the registered sub-area must
// equal dt * ax * ah one cycle after a valid step, and out_valid must follow
// in_valid by one cycle.
module tb_multiplier;
  import fir_pkg::*;
  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  dt_t   dt;
  amp_t  ax;
  coef_t ah;
  prod_t product;
  int    checks = 0, failures = 0;
  longint expv;

  multiplier dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .dt_min(dt), .ax(ax), .ah(ah),
                  .out_valid(out_valid), .product(product));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(longint d, longint a, longint h);
    @(negedge clk);
    dt = dt_t'(d); ax = amp_t'(a); ah = coef_t'(h); in_valid = 1;
    expv = d * a * h;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || longint'(product) != expv) begin
      failures++;
      $display("FAIL %0d*%0d*%0d: got %0d valid=%0b", d, a, h, product, out_valid);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid held");
    end
  endtask

  initial begin
    dt = 0; ax = 0; ah = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    apply(65535, -128, -128);
    apply(65535, 127, -128);
    apply(1, -1, 1);
    for (int n = 0; n < 200; n++)
      apply($urandom_range(0, 65535), $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
