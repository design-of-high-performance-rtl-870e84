// edc_compressor42: high-accuracy approximate 4:2 compressor with an error
// detection output.
//
// From four inputs x1..x4 of equal weight it forms
//   w1 = x1 & x2, w2 = x1 | x2, w3 = x3 & x4, w4 = x3 | x4,
//   w5 = w1 | w3, w6 = w2 & w4,
//   carry = w5 | w6, sum = w5 ^ w2 ^ w4, error = w1 & w3.
// The carry (weight 2) is always right; 2*carry + sum equals the number of
// ones except for x1..x4 = 1111, where it gives 3 instead of 4. error is 1
// exactly then, so a compensation bit of weight 1 makes the result exact.
// Purely combinational. The equations are the published ones; using the
// error flag as a compensation bit is the multiplier's own choice.
module edc_compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry,
  output logic error
);
  logic w1, w2, w3, w4, w5, w6;

  assign w1    = x1 & x2;
  assign w2    = x1 | x2;
  assign w3    = x3 & x4;
  assign w4    = x3 | x4;
  assign w5    = w1 | w3;
  assign w6    = w2 & w4;
  assign carry = w5 | w6;
  assign sum   = w5 ^ w2 ^ w4;
  assign error = w1 & w3;
endmodule
