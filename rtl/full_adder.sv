// full_adder: 3:2 counter. Adds three bits of equal weight; sum keeps the
// weight, carry has twice the weight (a + b + c = 2*carry + sum).
// Purely combinational. Used on its own in the reduction tree and twice
// inside the exact 4:2 compressor. The multiplier's structure calls for full
// adders; the gate-level form of the carry is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (c & (a ^ b));
endmodule
