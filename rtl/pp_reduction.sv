// pp_reduction: reduces the 8 x 8 partial-product matrix of the approximate
// multiplier to two 16-bit rows whose exact sum is the (approximate) product.
//
// The bits of column c are taken in order of the multiplier row i (lowest
// row first). Three regions:
//   * columns 0..3 - each column is collapsed to a single bit by OR-ing its
//     partial products; no carry leaves these columns (they carry the least
//     weight, so the lost carries cost little).
//   * columns 4..7 - approximate region. In the first reduction level
//     columns 4, 5 and 6 each feed their four lowest-row bits into one
//     proposed approximate 4:2 compressor; column 7 (eight bits) feeds two
//     error-detecting 4:2 compressors, whose error flags are added back into
//     column 7 as compensation bits, which makes column 7 exact.
//   * columns 8..14 - accurate region, reduced exactly with exact 4:2
//     compressors (cout/cin chained between neighbouring columns), full
//     adders and half adders.
// After the first level (stage 2) every column above 3 holds at most five
// bits; the second level (stage 3) reduces them exactly to two rows.
// The tree is hand-placed for N = 8: which bits meet in which counter is this
// design's choice, the regions and counter types follow the published
// structure. Purely combinational.
module pp_reduction
  import amul_pkg::*;
(
  input  pp_matrix_t pp,        // pp[i][j], weight 2^(i+j)
  output product_t   row_a,     // first final row
  output product_t   row_b,     // second final row
  output logic [1:0] edc_err    // error flags of the two column-7 compressors
);
  // ---------------------------------------------------------------------
  // Column view of the matrix: col[c][k] is the k-th bit of column c,
  // counting from the lowest multiplier row that reaches that column.
  // ---------------------------------------------------------------------
  logic [N-1:0] col [NCOL];

  for (genvar c = 0; c < NCOL; c++) begin : g_colv
    localparam int unsigned I0 = (c > N - 1) ? c - (N - 1) : 0;
    localparam int unsigned H  = (c < N) ? c + 1 : 2 * N - 1 - c;
    for (genvar k = 0; k < N; k++) begin : g_bit
      if (k < H) begin : g_on
        assign col[c][k] = pp[I0 + k][c - I0 - k];
      end else begin : g_off
        assign col[c][k] = 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Stage 2, approximate region
  // ---------------------------------------------------------------------
  logic s4, k4, s5, k5, s6, k6;
  logic s7a, k7a, e7a, s7b, k7b, e7b;

  approx_compressor42 u_p4 (.a1(col[4][0]), .a2(col[4][1]), .a3(col[4][2]), .a4(col[4][3]), .sum(s4), .carry(k4));
  approx_compressor42 u_p5 (.a1(col[5][0]), .a2(col[5][1]), .a3(col[5][2]), .a4(col[5][3]), .sum(s5), .carry(k5));
  approx_compressor42 u_p6 (.a1(col[6][0]), .a2(col[6][1]), .a3(col[6][2]), .a4(col[6][3]), .sum(s6), .carry(k6));
  edc_compressor42    u_e7a (.x1(col[7][0]), .x2(col[7][1]), .x3(col[7][2]), .x4(col[7][3]),
                             .sum(s7a), .carry(k7a), .error(e7a));
  edc_compressor42    u_e7b (.x1(col[7][4]), .x2(col[7][5]), .x3(col[7][6]), .x4(col[7][7]),
                             .sum(s7b), .carry(k7b), .error(e7b));
  assign edc_err = {e7b, e7a};

  // ---------------------------------------------------------------------
  // Stage 2, accurate region (sN = sum, yN = carry, oN = cout)
  // ---------------------------------------------------------------------
  logic s8a, y8a, o8a, s8b, y8b, o8b;
  logic s9a, y9a, o9a, s9b, y9b, o9b;
  logic s10, y10, o10, f10s, f10c;
  logic s11, y11, o11;
  logic s12, y12, o12;
  logic f13s, f13c;

  acc_compressor42 u_k8a (.x1(col[8][0]), .x2(col[8][1]), .x3(col[8][2]), .x4(col[8][3]), .cin(k7b),
                          .sum(s8a), .carry(y8a), .cout(o8a));
  acc_compressor42 u_k8b (.x1(col[8][4]), .x2(col[8][5]), .x3(col[8][6]), .x4(k7a), .cin(1'b0),
                          .sum(s8b), .carry(y8b), .cout(o8b));
  acc_compressor42 u_k9a (.x1(col[9][0]), .x2(col[9][1]), .x3(col[9][2]), .x4(col[9][3]), .cin(o8a),
                          .sum(s9a), .carry(y9a), .cout(o9a));
  acc_compressor42 u_k9b (.x1(col[9][4]), .x2(col[9][5]), .x3(y8a), .x4(y8b), .cin(o8b),
                          .sum(s9b), .carry(y9b), .cout(o9b));
  acc_compressor42 u_k10 (.x1(col[10][0]), .x2(col[10][1]), .x3(col[10][2]), .x4(col[10][3]), .cin(o9a),
                          .sum(s10), .carry(y10), .cout(o10));
  full_adder       u_f10 (.a(col[10][4]), .b(y9a), .c(y9b), .sum(f10s), .carry(f10c));
  acc_compressor42 u_k11 (.x1(col[11][0]), .x2(col[11][1]), .x3(col[11][2]), .x4(col[11][3]), .cin(o10),
                          .sum(s11), .carry(y11), .cout(o11));
  acc_compressor42 u_k12 (.x1(col[12][0]), .x2(col[12][1]), .x3(col[12][2]), .x4(y11), .cin(o11),
                          .sum(s12), .carry(y12), .cout(o12));
  full_adder       u_f13 (.a(col[13][0]), .b(col[13][1]), .c(y12), .sum(f13s), .carry(f13c));

  // ---------------------------------------------------------------------
  // Stage 3: exact reduction to two rows
  // ---------------------------------------------------------------------
  logic t5s, t5c;
  logic q6s, q6y, q6o;
  logic q7s, q7y, q7o, h7s, h7c;
  logic q8s, q8y, q8o;
  logic g9s, g9c, g10s, g10c, g11s, g11c;

  full_adder       u_t5 (.a(s5), .b(col[5][4]), .c(col[5][5]), .sum(t5s), .carry(t5c));
  acc_compressor42 u_q6 (.x1(s6), .x2(col[6][4]), .x3(col[6][5]), .x4(col[6][6]), .cin(k5),
                         .sum(q6s), .carry(q6y), .cout(q6o));
  acc_compressor42 u_q7 (.x1(s7a), .x2(s7b), .x3(k6), .x4(e7a), .cin(q6o),
                         .sum(q7s), .carry(q7y), .cout(q7o));
  half_adder       u_h7 (.a(e7b), .b(q6y), .sum(h7s), .carry(h7c));
  acc_compressor42 u_q8 (.x1(s8a), .x2(s8b), .x3(q7y), .x4(h7c), .cin(q7o),
                         .sum(q8s), .carry(q8y), .cout(q8o));
  full_adder       u_g9  (.a(s9a), .b(s9b), .c(q8y), .sum(g9s), .carry(g9c));
  full_adder       u_g10 (.a(s10), .b(f10s), .c(o9b), .sum(g10s), .carry(g10c));
  full_adder       u_g11 (.a(s11), .b(y10), .c(f10c), .sum(g11s), .carry(g11c));

  // ---------------------------------------------------------------------
  // Final two rows
  // ---------------------------------------------------------------------
  always_comb begin
    row_a = '0;
    row_b = '0;
    // OR region: one bit per column, no carries.
    row_a[0] = col[0][0];
    row_a[1] = |col[1][1:0];
    row_a[2] = |col[2][2:0];
    row_a[3] = |col[3][3:0];
    // Approximate and accurate regions.
    row_a[4]  = s4;         row_b[4]  = col[4][4];
    row_a[5]  = t5s;        row_b[5]  = k4;
    row_a[6]  = q6s;        row_b[6]  = t5c;
    row_a[7]  = q7s;        row_b[7]  = h7s;
    row_a[8]  = q8s;
    row_a[9]  = g9s;        row_b[9]  = q8o;
    row_a[10] = g10s;       row_b[10] = g9c;
    row_a[11] = g11s;       row_b[11] = g10c;
    row_a[12] = s12;        row_b[12] = g11c;
    row_a[13] = f13s;       row_b[13] = o12;
    row_a[14] = col[14][0]; row_b[14] = f13c;
  end
endmodule
