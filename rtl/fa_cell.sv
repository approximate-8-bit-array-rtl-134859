// fa_cell: one adder cell of the squarer's array, exact or approximate.
//
// KIND = FA_EXACT builds an exact full adder; FA_AMA1 .. FA_AMA5 build the
// corresponding approximate mirror adder. The ports keep the names of the
// adder's truth table (a, b, cin); the adder array decides which signal
// drives each. Combinational.
module fa_cell #(
  parameter aas_pkg::fa_kind_e KIND = aas_pkg::FA_EXACT
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  if (KIND == aas_pkg::FA_EXACT) begin : g_exact
    fa_exact u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else begin : g_ama
    ama_fa #(.KIND(KIND)) u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end

endmodule
