// approx_mult_core: combinational 8 x 8 unsigned approximate multiplier with
// 5-bit dynamic truncation.
//
// Stage 1 (trunc_pp_gen) forms the 64 partial products, forcing to zero
// every partial product in a column group whose truncation bit is set.
// Stages 2 and 3 (pp_reduction) compress the matrix to two rows: OR gates in
// columns 0..3, approximate 4:2 compressors in columns 4..7 and exact
// compressors, full and half adders in columns 8..14. An exact carry-propagate
// adder adds the two rows into the 16-bit product.
// trunc[4] truncates columns 14..12, trunc[3] 11..9, trunc[2] 8..6,
// trunc[1] 5..3 and trunc[0] 2..0; trunc = 0 gives the most accurate result.
// edc_err reports the error flags of the column-7 compressors (already
// compensated inside the tree). No clock: output settles combinationally.
module approx_mult_core
  import amul_pkg::*;
(
  input  operand_t   a,        // multiplicand
  input  operand_t   b,        // multiplier
  input  trunc_t     trunc,    // truncation control
  output product_t   product,  // approximate product
  output logic [1:0] edc_err   // column-7 compressor error flags
);
  pp_matrix_t pp;
  product_t   row_a, row_b;

  trunc_pp_gen #(.N(N), .TRUNC_W(TRUNC_W), .GROUP(GROUP)) u_ppgen (
    .a(a), .b(b), .trunc(trunc), .pp(pp)
  );

  pp_reduction u_tree (.pp(pp), .row_a(row_a), .row_b(row_b), .edc_err(edc_err));

  // Accurate final adder; the two rows never overflow 16 bits.
  assign product = row_a + row_b;
endmodule
