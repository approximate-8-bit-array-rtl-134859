// tb_pp_gen: exhaustive test of the partial product generator for all 256
// operands. Every pp[i][j] with i < j must equal a[i] & a[j], every other
// entry 0, and the products with the diagonal bits must add up to x * x.
module tb_pp_gen;
  localparam int N = 8;
  logic [N-1:0] a;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      int unsigned total;
      a = 8'(x);
      #1;
      total = 0;
      for (int i = 0; i < N; i++) begin
        total += int'(a[i]) << (2 * i);
        for (int j = 0; j < N; j++) begin
          logic expected;
          expected = (i < j) ? (x[i] & x[j]) : 1'b0;
          checks++;
          if (pp[i][j] != expected) begin
            failures++;
            $display("FAIL x=%0d pp[%0d][%0d]=%0b", x, i, j, pp[i][j]);
          end
          if (i < j) total += int'(pp[i][j]) << (i + j + 1);
        end
      end
      checks++;
      if (total != x * x) begin
        failures++;
        $display("FAIL x=%0d: products sum to %0d", x, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
