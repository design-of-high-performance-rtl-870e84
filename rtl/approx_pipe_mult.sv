// approx_pipe_mult: pipelined 8 x 8 unsigned approximate multiplier with
// 5-bit dynamic truncation (the top of the design).
//
// The operands and the truncation word are captured in an input register,
// the combinational approximate multiplier (approx_mult_core) works on the
// registered values, and its product is captured in an output register.
// Registering both ends cuts the multiplier off from the paths that feed and
// use it, so the clock period is set by the multiplier alone.
// Timing: a new operation can be started every clock cycle; the product of
// the operands presented before rising edge n appears on `product` after
// rising edge n+1 (two-cycle latency); edc_err travels with it. rst is synchronous and active high
// and clears both registers (so the product reads 0 after reset).
// The input and output registers follow the published flow; the reset style
// is this design's choice.
module approx_pipe_mult
  import amul_pkg::*;
(
  input  logic     clk,
  input  logic     rst,      // synchronous, active high
  input  operand_t a,        // multiplicand
  input  operand_t b,        // multiplier
  input  trunc_t   trunc,    // truncation control, 1 = drop that column group
  output product_t product,  // approximate product, two cycles after a/b/trunc
  output logic [1:0] edc_err // column-7 error flags of that product (informative;
                             // the error is already compensated in the product)
);
  operand_t   a_q, b_q;
  trunc_t     trunc_q;
  product_t   prod_d;
  logic [1:0] edc_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q     <= '0;
      b_q     <= '0;
      trunc_q <= '0;
      product <= '0;
      edc_err <= '0;
    end else begin
      a_q     <= a;
      b_q     <= b;
      trunc_q <= trunc;
      product <= prod_d;
      edc_err <= edc_d;
    end
  end

  // A reset cycle leaves the output cleared.
  assert property (@(posedge clk) rst |=> (product == '0 && edc_err == '0))
    else $error("output not cleared by reset");

  approx_mult_core u_core (
    .a(a_q), .b(b_q), .trunc(trunc_q), .product(prod_d), .edc_err(edc_d)
  );
endmodule
