// aas_ref_pkg: reference model of the 8-bit approximate array squarer, for
// the testbenches.
//
// The adder cells are described by their truth tables (bit k of a table is
// the output for inputs {a, b, cin} = k), written out independently of the
// logic equations in the RTL. ref_square() rebuilds the adder array, cell by
// cell in ripple order, from those tables.
package aas_ref_pkg;

  //                      exact   AMA1    AMA2    AMA3    AMA4    AMA5
  localparam logic [7:0] SUM_TT [6]  = '{8'h96, 8'h82, 8'h17, 8'h13, 8'h8A, 8'hCC};
  localparam logic [7:0] COUT_TT [6] = '{8'hE8, 8'hEC, 8'hE8, 8'hEC, 8'hF0, 8'hF0};

  // One cell: kind 0 = exact, 1..5 = AMA1..AMA5.
  function automatic logic [1:0] ref_cell(int kind, logic a, logic b, logic c);
    int idx = {a, b, c};
    return {COUT_TT[kind][idx], SUM_TT[kind][idx]};  // {cout, sum}
  endfunction

  // Approximate square of x for adder kind ama (1..5) at level lvl (0..7).
  function automatic int unsigned ref_square(logic [7:0] x, int ama, int lvl);
    logic A [1:8];
    logic [15:0] P;
    logic t [2:15];   // row-1 sums
    logic r2 [4:15];  // row-2 sums
    logic r3 [6:10];  // row-3 sums
    logic c, c14, c10r2, c8r3, c8r4, c10r3;
    logic [1:0] o;
    int top_i [4:12] = '{1, 1, 1, 1, 1, 2, 3, 4, 5};
    int top_j [4:12] = '{4, 5, 6, 7, 8, 8, 8, 8, 8};
    int top_k [4:12] = '{2, 2, 2, 2, 2, 3, 4, 5, 6};
    int top_l [4:12] = '{3, 4, 5, 6, 7, 7, 7, 7, 7};
    int r2_i [6:10]  = '{3, 3, 3, 4, 5};
    int r2_j [6:10]  = '{4, 5, 6, 6, 6};
    for (int i = 1; i <= 8; i++) A[i] = x[i-1];
    P = '0;
    P[0] = A[1];
    // row 1
    o = ref_cell(ref_kind(ama, lvl, 2), A[1] & A[2], A[2], 1'b0);  P[2] = o[0]; c = o[1];
    o = ref_cell(ref_kind(ama, lvl, 3), A[1] & A[3], c, 1'b0);    P[3] = o[0]; c = o[1];
    for (int col = 4; col <= 12; col++) begin
      o = ref_cell(ref_kind(ama, lvl, col), A[top_i[col]] & A[top_j[col]],
               A[top_k[col]] & A[top_l[col]], c);
      t[col] = o[0]; c = o[1];
    end
    o = ref_cell(0, A[6] & A[8], 1'b0, c); t[13] = o[0]; c = o[1];
    o = ref_cell(0, A[7] & A[8], A[8], c); t[14] = o[0]; c14 = o[1];
    // row 2
    o = ref_cell(ref_kind(ama, lvl, 4), t[4], A[3], 1'b0); P[4] = o[0]; c = o[1];
    o = ref_cell(ref_kind(ama, lvl, 5), t[5], c, 1'b0);    P[5] = o[0]; c = o[1];
    for (int col = 6; col <= 10; col++) begin
      o = ref_cell(ref_kind(ama, lvl, col), A[r2_i[col]] & A[r2_j[col]], t[col], c);
      r2[col] = o[0]; c = o[1];
    end
    c10r2 = c;
    // row 3 and row 4
    o = ref_cell(ref_kind(ama, lvl, 6), r2[6], A[4], 1'b0); P[6] = o[0]; c = o[1];
    o = ref_cell(ref_kind(ama, lvl, 7), r2[7], c, 1'b0);    P[7] = o[0]; c = o[1];
    o = ref_cell(ref_kind(ama, lvl, 8), r2[8], c, A[5]);    r3[8] = o[0]; c8r3 = o[1];
    o = ref_cell(ref_kind(ama, lvl, 8), A[4] & A[5], r3[8], 1'b0); P[8] = o[0]; c8r4 = o[1];
    o = ref_cell(0, r2[9], c8r4, c8r3);   P[9] = o[0]; c = o[1];
    o = ref_cell(0, r2[10], A[6], c);     P[10] = o[0]; c10r3 = o[1];
    // remaining row 2
    o = ref_cell(0, t[11], c10r3, c10r2); P[11] = o[0]; c = o[1];
    o = ref_cell(0, t[12], A[7], c);      P[12] = o[0]; c = o[1];
    o = ref_cell(0, t[13], 1'b0, c);      P[13] = o[0]; c = o[1];
    o = ref_cell(0, t[14], 1'b0, c);      P[14] = o[0]; c = o[1];
    o = ref_cell(0, c14, 1'b0, c);        P[15] = o[0];
    return P;
  endfunction

  // Cell kind of column col.
  function automatic int ref_kind(int ama, int lvl, int col);
    return (col >= 2 && col <= lvl + 1) ? ama : 0;
  endfunction

endpackage
