// amul_ref_pkg: behavioural reference model of the dynamically truncated
// approximate multiplier, used by the testbenches.
//
// It works on column bit counts rather than on gates. For every column c the
// partial products b[i]&a[c-i] that survive truncation (truncation bit c/3)
// are listed lowest row first. Columns 0..3 contribute the OR of their bits;
// columns 4..6 contribute the number of ones, corrected by the error of the
// proposed approximate 4:2 compressor on their first four bits (+1 for the
// input patterns 1000 and 0100, -1 for 0011 and 1111, written a1 a2 a3 a4);
// column 7 and up contribute their exact number of ones (column 7's compressor
// error is compensated). The weighted sum is the expected product.
package amul_ref_pkg;

  // Error (result minus number of ones) of the proposed compressor.
  function automatic int approx42_err(bit a1, bit a2, bit a3, bit a4);
    case ({a1, a2, a3, a4})
      4'b1000, 4'b0100: return 1;
      4'b0011, 4'b1111: return -1;
      default:          return 0;
    endcase
  endfunction

  // Model of the tree from an arbitrary partial-product matrix, pp[i][j].
  function automatic int unsigned ref_tree(bit [7:0][7:0] pp);
    int unsigned total = 0;
    for (int c = 0; c < 15; c++) begin
      bit bits[$];
      int n = 0;
      for (int i = 0; i < 8; i++)
        if (c - i >= 0 && c - i < 8) bits.push_back(pp[i][c-i]);
      foreach (bits[k]) n += int'(bits[k]);
      if (c < 4)
        n = (n != 0) ? 1 : 0;
      else if (c < 7)
        n += approx42_err(bits[0], bits[1], bits[2], bits[3]);
      total += int'(n) << c;
    end
    return total;
  endfunction

  // Truncated partial-product matrix.
  function automatic bit [7:0][7:0] ref_pp(bit [7:0] a, bit [7:0] b, bit [4:0] trunc);
    bit [7:0][7:0] pp;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        pp[i][j] = b[i] & a[j] & !trunc[(i + j) / 3];
    return pp;
  endfunction

  function automatic int unsigned ref_product(bit [7:0] a, bit [7:0] b, bit [4:0] trunc);
    return ref_tree(ref_pp(a, b, trunc));
  endfunction

  // Exact sum of the partial products that survive truncation.
  function automatic int unsigned trunc_exact(bit [7:0] a, bit [7:0] b, bit [4:0] trunc);
    bit [7:0][7:0] pp = ref_pp(a, b, trunc);
    int unsigned total = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        total += int'(pp[i][j]) << (i + j);
    return total;
  endfunction

  // Number of column-7 compressors (bits 0..3 and 4..7 of column 7) whose
  // four inputs are all one.
  function automatic bit [1:0] ref_edc(bit [7:0][7:0] pp);
    bit [1:0] e;
    e[0] = pp[0][7] & pp[1][6] & pp[2][5] & pp[3][4];
    e[1] = pp[4][3] & pp[5][2] & pp[6][1] & pp[7][0];
    return e;
  endfunction
endpackage
