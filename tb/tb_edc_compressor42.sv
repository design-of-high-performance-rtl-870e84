// tb_edc_compressor42: exhaustive self-check of the error-detecting 4:2
// compressor against its published truth table (carry and sum columns for
// x1..x4 = 0000 .. 1111) and against arithmetic: 2*carry + sum + error must
// equal the number of ones, and error must be set only for 1111.
module tb_edc_compressor42;
  logic clk = 1'b0;
  logic x1, x2, x3, x4, sum, carry, error;
  int   checks = 0, failures = 0;

  // Truth table, index = {x1,x2,x3,x4}.
  localparam logic [15:0] CARRY_T = 16'b1111_1110_1110_1000; // bit v = carry of row v
  localparam logic [15:0] SUM_T   = 16'b1110_1001_1001_0110;

  edc_compressor42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4),
                        .sum(sum), .carry(carry), .error(error));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      @(posedge clk);
      ones = int'(x1) + int'(x2) + int'(x3) + int'(x4);
      checks += 4;
      if (carry != CARRY_T[v]) begin
        failures++;
        $display("FAIL carry x=%4b -> %0b", v[3:0], carry);
      end
      if (sum != SUM_T[v]) begin
        failures++;
        $display("FAIL sum x=%4b -> %0b", v[3:0], sum);
      end
      if (error != (v == 15)) begin
        failures++;
        $display("FAIL error x=%4b -> %0b", v[3:0], error);
      end
      if (2 * int'(carry) + int'(sum) + int'(error) != ones) begin
        failures++;
        $display("FAIL value x=%4b", v[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
