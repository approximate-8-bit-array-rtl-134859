// fa_exact: exact one-bit full adder.
//
// sum  = a ^ b ^ cin
// cout = majority(a, b, cin)
//
// Purely combinational. This is the accurate cell of the squarer's adder
// array; cells that are drawn with a constant 0 on one input are kept as
// full adders (a synthesis tool reduces them to half adders).
module fa_exact (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
