// aas_pkg: types and constants shared by the 8-bit approximate array squarer.
//
// The squarer is built from one-bit adder cells. Each cell is either an exact
// full adder or one of five approximate mirror adders, AMA1 to AMA5. Which
// kind a cell gets depends only on the column of the adder array it sits in:
// approximation level Vk (k = 1..7) makes every cell in the k least
// significant adder columns (product bits 2 .. k+1) approximate. Level 0 is
// this design's own name for the fully exact squarer.
package aas_pkg;

  // Operand width and square width of the squarer.
  localparam int unsigned N  = 8;
  localparam int unsigned PW = 2 * N;

  // Highest approximation level (V7): columns 2..8 approximate.
  localparam int unsigned MAX_LEVEL = 7;

  // Kind of a one-bit adder cell.
  typedef enum logic [2:0] {
    FA_EXACT = 3'd0,
    FA_AMA1  = 3'd1,
    FA_AMA2  = 3'd2,
    FA_AMA3  = 3'd3,
    FA_AMA4  = 3'd4,
    FA_AMA5  = 3'd5
  } fa_kind_e;

  // Cell kind used in product column COL of a squarer built with approximate
  // adder AMA at level LEVEL. The first adder column is column 2 (bit P2).
  function automatic fa_kind_e col_kind(fa_kind_e ama, int unsigned level,
                                        int unsigned col);
    return (col >= 2 && col <= level + 1) ? ama : FA_EXACT;
  endfunction

endpackage
