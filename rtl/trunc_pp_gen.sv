// trunc_pp_gen: partial-product generation with dynamic input truncation.
//
// Partial product pp[i][j] (multiplier bit b[i] times multiplicand bit a[j])
// sits in column c = i + j. The columns are partitioned into groups of GROUP
// columns, and truncation control bit trunc[k] governs group k = c / GROUP
// (at the defaults bit 4 drives columns 14..12, ..., bit 0 columns 2..0).
// A set control bit forces every partial product of its columns to zero:
//   pp[i][j] = (~trunc[k] & b[i]) & a[j]
// Gate sharing: the term (~trunc[k] & b[i]) is formed once per row and group
// as a mask and shared by all partial products of that row in that group, so
// each partial product costs one 2-input AND gate more.
// Purely combinational. The equation, the gate sharing and the 3-3-3-3-3
// partition are the published ones; the parameterisation is this design's.
module trunc_pp_gen #(
  parameter int unsigned N       = 8,
  parameter int unsigned TRUNC_W = 5,
  parameter int unsigned GROUP   = 3
) (
  input  logic [N-1:0]         a,      // multiplicand
  input  logic [N-1:0]         b,      // multiplier
  input  logic [TRUNC_W-1:0]   trunc,  // 1 = truncate that column group
  output logic [N-1:0][N-1:0]  pp      // pp[i][j], weight 2^(i+j)
);
  // Group index of a column, saturated to the last control bit.
  function automatic int unsigned grp(int unsigned c);
    return (c / GROUP < TRUNC_W) ? c / GROUP : TRUNC_W - 1;
  endfunction

  // Shared row masks, one per multiplier bit and control bit.
  logic [N-1:0][TRUNC_W-1:0] mask;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar k = 0; k < TRUNC_W; k++) begin : g_mask
      assign mask[i][k] = ~trunc[k] & b[i];
    end
    for (genvar j = 0; j < N; j++) begin : g_col
      assign pp[i][j] = mask[i][grp(i + j)] & a[j];
    end
  end
endmodule
