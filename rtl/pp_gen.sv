// pp_gen: partial product generator of an N-bit unsigned squarer.
//
// Squaring x = sum a_i 2^i gives x^2 = sum a_i 2^(2i) + sum_(i<j) a_i a_j
// 2^(i+j+1): the partial-product matrix of a multiplier is symmetric about its
// diagonal, so each off-diagonal pair a_i a_j appears once, one column to the
// left, and each diagonal term a_i a_i is just a_i. Only the N(N-1)/2
// off-diagonal products need an AND gate: 28 for N = 8.
//
// Output pp[i][j] (0-based bit indices, i < j) is a[i] & a[j], with weight
// 2^(i+j+1) in the square; entries with i >= j are tied to 0 and are not
// used. The diagonal terms are the operand bits themselves and are taken by
// the adder array straight from the operand. Combinational.
module pp_gen #(
  parameter int unsigned N = aas_pkg::N
) (
  input  logic [N-1:0]        a,
  output logic [N-1:0][N-1:0] pp
);

  always_comb begin
    pp = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = i + 1; j < N; j++) begin
        pp[i][j] = a[i] & a[j];
      end
    end
  end

endmodule
