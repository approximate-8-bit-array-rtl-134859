// aas_array: partial-product accumulation array of the 8-bit approximate
// array squarer (AAS).
//
// The array adds the 28 AND-gate products a_i a_j (i < j) and the 8 diagonal
// bits a_i of an 8-bit square with 31 one-bit adder cells arranged as ripple
// rows. Operand bits are called A1 (lsb) .. A8 (msb) in the comments, so A_k
// is a[k-1] and product A_iA_j is pp[i-1][j-1]; product bit Pc is p[c].
//
//   P0 = A1, P1 = 0.
//   Row 1 (columns 2..14): the first two products of each column plus the
//     carry from the right. Columns 2 and 3 produce P2 and P3.
//   Row 2 (columns 4..15): row-1 sum, the next product, carry from the right.
//     Columns 4, 5 produce P4, P5; columns 11..15 produce P11..P15, column 11
//     absorbing the carry of row 3, column 15 the last carry of row 1.
//   Row 3 (columns 6..10): row-2 sum, the next product, carry. Columns 6, 7,
//     9 and 10 produce P6, P7, P9, P10; column 10's carry goes to row 2.
//   Row 4 (column 8): adds A4A5 to the row-3 sum of column 8, giving P8.
// Column heights are 1,0,2,1,3,2,4,3,5,3,4,2,3,1,2 for columns 0..14: at most
// floor(N/2)+1 = 5 bits.
//
// Cells with a constant 0 operand are still full adders. Every cell in
// columns 2 .. LEVEL+1 is the approximate adder AMA, all others are exact:
// LEVEL = 1 .. 7 are approximation levels V1 .. V7, and LEVEL = 0 (this
// design's addition) gives the exact squarer.
//
// Approximate adders are not symmetric in their inputs, so which signal
// drives which port changes the error. The assignment used here is this
// design's own, chosen because it reproduces the published error figures of
// all 35 configurations (e.g. mean error distance at V7 of 231, 405, 721,
// 216 and 183 for AMA1 .. AMA5):
//   - a constant 0 always drives cin; the carry from the right then drives b;
//   - row 1: a = first product, b = second product, cin = carry;
//   - lower rows, cell adding an AND product: a = product, b = sum from
//     above, cin = carry;
//   - lower rows, cell adding an operand bit (A3, A4, A7): a = sum from
//     above, b = operand bit;
//   - row 3 column 8, which adds A5: a = sum from above, b = carry, cin = A5.
//
// Purely combinational; the critical path ripples along row 1 and then down
// and along rows 2 to 4.
module aas_array #(
  parameter aas_pkg::fa_kind_e AMA   = aas_pkg::FA_AMA5,
  parameter int unsigned       LEVEL = 7
) (
  input  logic [aas_pkg::N-1:0]               a,   // operand bits (diagonal terms)
  input  logic [aas_pkg::N-1:0][aas_pkg::N-1:0] pp,  // pp[i][j] = a[i] & a[j], i < j
  output logic [aas_pkg::PW-1:0]              p    // square
);
  import aas_pkg::*;

  initial begin
    assert (LEVEL <= MAX_LEVEL)
      else $error("aas_array: LEVEL must be 0 .. %0d", MAX_LEVEL);
  end

  // Sums and carries of each row, indexed by product column.
  logic s1 [2:14];
  logic c1 [2:14];
  logic s2 [4:15];
  logic c2 [4:15];
  logic s3 [6:10];
  logic c3 [6:10];
  logic s4, c4;

  // Row-1 operands of columns 4..12: A_iA_j and A_kA_l.
  localparam int R1_I [4:12] = '{1, 1, 1, 1, 1, 2, 3, 4, 5};
  localparam int R1_J [4:12] = '{4, 5, 6, 7, 8, 8, 8, 8, 8};
  localparam int R1_K [4:12] = '{2, 2, 2, 2, 2, 3, 4, 5, 6};
  localparam int R1_L [4:12] = '{3, 4, 5, 6, 7, 7, 7, 7, 7};

  // Row-2 product of columns 6..10: A_iA_j.
  localparam int R2_I [6:10] = '{3, 3, 3, 4, 5};
  localparam int R2_J [6:10] = '{4, 5, 6, 6, 6};

  // ---------------------------------------------------------------- row 1
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 2))) u_r1_c2 (
    .a(pp[0][1]), .b(a[1]), .cin(1'b0), .sum(s1[2]), .cout(c1[2]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 3))) u_r1_c3 (
    .a(pp[0][2]), .b(c1[2]), .cin(1'b0), .sum(s1[3]), .cout(c1[3]));

  for (genvar c = 4; c <= 12; c++) begin : g_r1
    fa_cell #(.KIND(col_kind(AMA, LEVEL, c))) u_fa (
      .a  (pp[R1_I[c]-1][R1_J[c]-1]),
      .b  (pp[R1_K[c]-1][R1_L[c]-1]),
      .cin(c1[c-1]),
      .sum(s1[c]), .cout(c1[c]));
  end

  fa_cell #(.KIND(col_kind(AMA, LEVEL, 13))) u_r1_c13 (
    .a(pp[5][7]), .b(c1[12]), .cin(1'b0), .sum(s1[13]), .cout(c1[13]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 14))) u_r1_c14 (
    .a(pp[6][7]), .b(a[7]), .cin(c1[13]), .sum(s1[14]), .cout(c1[14]));

  // ---------------------------------------------------------------- row 2
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 4))) u_r2_c4 (
    .a(s1[4]), .b(a[2]), .cin(1'b0), .sum(s2[4]), .cout(c2[4]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 5))) u_r2_c5 (
    .a(s1[5]), .b(c2[4]), .cin(1'b0), .sum(s2[5]), .cout(c2[5]));

  for (genvar c = 6; c <= 10; c++) begin : g_r2
    fa_cell #(.KIND(col_kind(AMA, LEVEL, c))) u_fa (
      .a  (pp[R2_I[c]-1][R2_J[c]-1]),
      .b  (s1[c]),
      .cin(c2[c-1]),
      .sum(s2[c]), .cout(c2[c]));
  end

  fa_cell #(.KIND(col_kind(AMA, LEVEL, 11))) u_r2_c11 (
    .a(s1[11]), .b(c3[10]), .cin(c2[10]), .sum(s2[11]), .cout(c2[11]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 12))) u_r2_c12 (
    .a(s1[12]), .b(a[6]), .cin(c2[11]), .sum(s2[12]), .cout(c2[12]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 13))) u_r2_c13 (
    .a(s1[13]), .b(c2[12]), .cin(1'b0), .sum(s2[13]), .cout(c2[13]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 14))) u_r2_c14 (
    .a(s1[14]), .b(c2[13]), .cin(1'b0), .sum(s2[14]), .cout(c2[14]));
  // The carry out of column 15 would be product bit 16; it is always 0 for
  // an exact array and is left unused, as in the 16-bit square.
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 15))) u_r2_c15 (
    .a(c1[14]), .b(c2[14]), .cin(1'b0), .sum(s2[15]), .cout(c2[15]));

  // ---------------------------------------------------------------- row 3
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 6))) u_r3_c6 (
    .a(s2[6]), .b(a[3]), .cin(1'b0), .sum(s3[6]), .cout(c3[6]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 7))) u_r3_c7 (
    .a(s2[7]), .b(c3[6]), .cin(1'b0), .sum(s3[7]), .cout(c3[7]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 8))) u_r3_c8 (
    .a(s2[8]), .b(c3[7]), .cin(a[4]), .sum(s3[8]), .cout(c3[8]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 9))) u_r3_c9 (
    .a(s2[9]), .b(c4), .cin(c3[8]), .sum(s3[9]), .cout(c3[9]));
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 10))) u_r3_c10 (
    .a(s2[10]), .b(a[5]), .cin(c3[9]), .sum(s3[10]), .cout(c3[10]));

  // ---------------------------------------------------------------- row 4
  fa_cell #(.KIND(col_kind(AMA, LEVEL, 8))) u_r4_c8 (
    .a(pp[3][4]), .b(s3[8]), .cin(1'b0), .sum(s4), .cout(c4));

  // ---------------------------------------------------------- product bits
  always_comb begin
    p[0]  = a[0];
    p[1]  = 1'b0;
    p[2]  = s1[2];
    p[3]  = s1[3];
    p[4]  = s2[4];
    p[5]  = s2[5];
    p[6]  = s3[6];
    p[7]  = s3[7];
    p[8]  = s4;
    p[9]  = s3[9];
    p[10] = s3[10];
    p[11] = s2[11];
    p[12] = s2[12];
    p[13] = s2[13];
    p[14] = s2[14];
    p[15] = s2[15];
  end

endmodule
