// tb_ama_fa: exhaustive test of the five approximate mirror adders. Each
// variant is compared, for all eight input combinations, with its truth
// table in aas_ref_pkg. It also checks how many of the eight cases each
// variant gets wrong (sum or cout differing from an exact full adder):
// 2, 2, 3, 3 and 4 for AMA1 .. AMA5.
module tb_ama_fa;
  import aas_pkg::*;
  import aas_ref_pkg::*;

  logic a, b, cin;
  logic [5:1] sum, cout;
  int checks = 0, failures = 0;

  ama_fa #(.KIND(FA_AMA1)) u1 (.a(a), .b(b), .cin(cin), .sum(sum[1]), .cout(cout[1]));
  ama_fa #(.KIND(FA_AMA2)) u2 (.a(a), .b(b), .cin(cin), .sum(sum[2]), .cout(cout[2]));
  ama_fa #(.KIND(FA_AMA3)) u3 (.a(a), .b(b), .cin(cin), .sum(sum[3]), .cout(cout[3]));
  ama_fa #(.KIND(FA_AMA4)) u4 (.a(a), .b(b), .cin(cin), .sum(sum[4]), .cout(cout[4]));
  ama_fa #(.KIND(FA_AMA5)) u5 (.a(a), .b(b), .cin(cin), .sum(sum[5]), .cout(cout[5]));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wrong [5:1] = '{default: 0};
    int expect_wrong [5:1] = '{4, 3, 3, 2, 2};  // AMA5 .. AMA1
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      for (int t = 1; t <= 5; t++) begin
        checks++;
        if ({cout[t], sum[t]} != ref_cell(t, a, b, cin)) begin
          failures++;
          $display("FAIL AMA%0d abc=%03b: got cout=%0b sum=%0b", t, v[2:0], cout[t], sum[t]);
        end
        if ({cout[t], sum[t]} != ref_cell(0, a, b, cin)) wrong[t]++;
      end
    end
    for (int t = 1; t <= 5; t++) begin
      checks++;
      if (wrong[t] != expect_wrong[t]) begin
        failures++;
        $display("FAIL AMA%0d wrong in %0d cases, expected %0d", t, wrong[t], expect_wrong[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
