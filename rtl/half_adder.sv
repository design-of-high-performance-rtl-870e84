// half_adder: 2:2 counter. sum = a ^ b, carry = a & b (carry has twice the
// weight of sum). Purely combinational. Used in the exact part of the
// partial-product reduction tree of the approximate multiplier. The
// multiplier's structure calls for half adders; the gates are the standard ones.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
