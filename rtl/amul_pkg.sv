// amul_pkg: shared sizes of the dynamically truncated approximate multiplier.
//
// The multiplier is 8 x 8 bits unsigned with a 16-bit product. The fifteen
// partial-product columns (0..14) are split into five groups of three columns
// (3-3-3-3-3 partition); one bit of the 5-bit truncation control word governs
// each group, bit 4 the most significant columns 14..12 and bit 0 the columns
// 2..0. Columns 0..3 are summed approximately with OR gates, columns 4..7 with
// approximate 4:2 compressors, and columns 8..14 exactly. These numbers are the
// ones the design is laid out for; the reduction tree is hand-placed for them.
package amul_pkg;
  localparam int unsigned N        = 8;           // operand width
  localparam int unsigned PROD_W   = 2 * N;       // product width
  localparam int unsigned NCOL     = 2 * N - 1;   // partial-product columns
  localparam int unsigned TRUNC_W  = 5;           // truncation control bits
  localparam int unsigned GROUP    = 3;           // columns per control bit

  typedef logic [N-1:0]       operand_t;
  typedef logic [PROD_W-1:0]  product_t;
  typedef logic [TRUNC_W-1:0] trunc_t;
  // pp[i][j] = partial product of multiplier bit i and multiplicand bit j,
  // weight 2^(i+j).
  typedef logic [N-1:0][N-1:0] pp_matrix_t;
endpackage
