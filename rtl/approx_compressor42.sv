// approx_compressor42: the proposed area-efficient approximate 4:2 compressor.
//
// Four bits of equal weight in, two bits out, no carry-in or carry-out:
//   carry = a1 | a2                          (weight 2)
//   sel   = a1 ^ a2
//   sum   = sel ? (a3 & a4) : (a3 | a4)      (weight 1)
// The carry logic is reduced to one OR gate and the sum to a multiplexer
// whose select is the XOR of the first pair; these gates and the select
// polarity are the published structure. Every error it makes has error
// distance 1 (2*carry + sum differs from the number of ones by +-1 for the
// input patterns 1000, 0100, 0011 and 1111 of a1..a4). Purely combinational.
module approx_compressor42 (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  output logic sum,
  output logic carry
);
  logic sel;

  assign carry = a1 | a2;
  assign sel   = a1 ^ a2;
  assign sum   = sel ? (a3 & a4) : (a3 | a4);
endmodule
