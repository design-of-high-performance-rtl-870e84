// acc_compressor42: exact 4:2 compressor made of two cascaded full adders.
//
// The first full adder adds x1, x2 and x3; its carry leaves sideways as cout
// to the compressor of the next more significant column, its sum goes with
// x4 and the cin from the previous column into the second full adder, which
// gives sum and carry. The identity is
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// and cout never depends on cin, so a row of these compressors does not
// ripple. Purely combinational. This is the textbook structure of the
// accurate compressor; the multiplier uses it in its exact (upper) columns.
module acc_compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .c(x3),  .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .c(cin), .sum(sum), .carry(carry));
endmodule
