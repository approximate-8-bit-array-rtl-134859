// tb_aas_array: exhaustive test of the adder array in all 36 configurations
// (exact, and AMA1 .. AMA5 at levels V1 .. V7). The partial products are
// formed here with AND operations, not by pp_gen. For every operand the exact
// configuration must give x * x and every approximate one the value of the
// reference model in aas_ref_pkg.
module tb_aas_array;
  import aas_pkg::*;
  import aas_ref_pkg::*;

  logic [7:0] a;
  logic [7:0][7:0] pp;
  logic [15:0] p_exact;
  logic [15:0] p [1:5][1:7];
  int checks = 0, failures = 0;

  always_comb begin
    pp = '0;
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++) pp[i][j] = a[i] & a[j];
  end

  aas_array #(.AMA(FA_AMA1), .LEVEL(0)) u_exact (.a(a), .pp(pp), .p(p_exact));

  for (genvar t = 1; t <= 5; t++) begin : g_ama
    for (genvar l = 1; l <= 7; l++) begin : g_lvl
      aas_array #(.AMA(fa_kind_e'(t)), .LEVEL(l)) u_dut (.a(a), .pp(pp), .p(p[t][l]));
    end
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      a = 8'(x);
      #1;
      checks++;
      if (p_exact != 16'(x * x)) begin
        failures++;
        $display("FAIL exact x=%0d: got %0d", x, p_exact);
      end
      for (int t = 1; t <= 5; t++) begin
        for (int l = 1; l <= 7; l++) begin
          checks++;
          if (p[t][l] != 16'(ref_square(8'(x), t, l))) begin
            failures++;
            if (failures < 20)
              $display("FAIL AMA%0d V%0d x=%0d: got %0d expected %0d", t, l, x,
                       p[t][l], ref_square(8'(x), t, l));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
