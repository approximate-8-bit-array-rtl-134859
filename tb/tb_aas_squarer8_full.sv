// tb_aas_squarer8_full: the squarer at its default configuration (AMA5 at
// level V7), squaring every 8-bit operand once. Each result is compared with
// the reference model, and the approximate result must never be further from
// x * x than 1.5 % of the largest square, and the mean error distance over
// the 256 operands must be 183 after truncation, the published figure for
// AMA5 at V7.
module tb_aas_squarer8_full;
  import aas_ref_pkg::*;

  logic [7:0] x;
  logic [15:0] p;
  int checks = 0, failures = 0;

  aas_squarer8 dut (.x(x), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err = 0, worst = 0, sum_ed = 0;
    for (int xi = 0; xi < 256; xi++) begin
      int e;
      x = 8'(xi);
      #1;
      checks++;
      if (p != 16'(ref_square(x, 5, 7))) begin
        failures++;
        $display("FAIL x=%0d: got %0d expected %0d", xi, p, ref_square(x, 5, 7));
      end
      e = int'(p) - xi * xi;
      if (e < 0) e = -e;
      if (e != 0) n_err++;
      sum_ed += e;
      if (e > worst) worst = e;
    end
    checks++;
    if (worst * 1000 >= 65025 * 15) begin
      failures++;
      $display("FAIL worst error %0d", worst);
    end
    checks++;
    if (sum_ed / 256 != 183) begin
      failures++;
      $display("FAIL mean error distance %f, published 183", real'(sum_ed) / 256.0);
    end
    $display("default configuration: %0d of 256 results approximate, worst error %0d, MED %f",
             n_err, worst, real'(sum_ed) / 256.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
