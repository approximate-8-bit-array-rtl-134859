// aas_squarer8: 8-bit unsigned approximate array squarer (AAS).
//
// Computes p ~= x * x for an 8-bit unsigned x. A squarer needs far fewer
// partial products than a multiplier: the 28 off-diagonal products a_i a_j
// come from 28 AND gates (pp_gen), the diagonal products are the operand bits
// themselves, and a 31-cell ripple adder array (aas_array) sums them into the
// 16-bit square. Energy and delay are traded for accuracy by replacing the
// full adders of the LEVEL least significant adder columns with an
// approximate mirror adder:
//
//   AMA    FA_AMA1 .. FA_AMA5: which approximate adder is used
//   LEVEL  1 .. 7 for approximation levels V1 .. V7 (columns 2 .. LEVEL+1);
//          0 gives the exact squarer
//
// Together the two parameters span 35 approximate designs. The defaults,
// AMA5 at level V7, are this design's choice: the most aggressive of them
// and the smallest and least power-hungry, whose accuracy is still adequate
// for image-energy computation.
//
// Interface: x in, p out, no clock. Purely combinational: p is valid one
// propagation delay after x changes.
module aas_squarer8 #(
  parameter aas_pkg::fa_kind_e AMA   = aas_pkg::FA_AMA5,
  parameter int unsigned       LEVEL = 7
) (
  input  logic [aas_pkg::N-1:0]  x,
  output logic [aas_pkg::PW-1:0] p
);
  import aas_pkg::*;

  logic [N-1:0][N-1:0] pp;

  pp_gen #(.N(N)) u_pp_gen (
    .a (x),
    .pp(pp)
  );

  aas_array #(.AMA(AMA), .LEVEL(LEVEL)) u_array (
    .a (x),
    .pp(pp),
    .p (p)
  );

endmodule
