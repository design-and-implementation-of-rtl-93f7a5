// tb_accumulator: random runs of products with gaps, each closed by a clear;
// the sum must equal the total of the run, and a clear must zero it.
module tb_accumulator;
  import fir_pkg::*;
  logic  clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  prod_t product = 0;
  acc_t  sum;
  int    checks = 0, failures = 0;
  longint total;

  accumulator dut (.clk(clk), .rst_n(rst_n), .clr(clr), .in_valid(in_valid), .product(product), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      total = 0;
      for (int n = 0; n < $urandom_range(1, 32); n++) begin
        @(negedge clk);
        in_valid = $urandom_range(0, 3) != 0;
        product  = prod_t'(longint'($urandom) * (($urandom_range(0, 1) != 0) ? 1 : -1) * 64);
        if (in_valid) total += longint'(product);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (longint'(sum) != total) begin
        failures++;
        $display("FAIL run %0d: sum %0d expected %0d", r, sum, total);
      end
      clr = 1;
      @(negedge clk);
      clr = 0;
      checks++;
      if (sum != 0) begin
        failures++;
        $display("FAIL clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
