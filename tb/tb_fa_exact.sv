// tb_fa_exact: exhaustive test of the exact full adder. All eight input
// combinations; {cout, sum} must equal the arithmetic sum a + b + cin.
module tb_fa_exact;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  fa_exact dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL abc=%03b: got cout=%0b sum=%0b", v[2:0], cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
