// tb_approx_compressor42: exhaustive self-check of the proposed approximate
// 4:2 compressor. For all 16 inputs it checks the carry against a1 | a2 and
// the value 2*carry + sum against the number of ones plus the expected
// error: +1 for a1..a4 = 1000 and 0100, -1 for 0011 and 1111, 0 otherwise.
// It also counts that exactly four inputs are inexact and all by one.
module tb_approx_compressor42;
  logic clk = 1'b0;
  logic a1, a2, a3, a4, sum, carry;
  int   checks = 0, failures = 0, inexact = 0;

  approx_compressor42 dut (.a1(a1), .a2(a2), .a3(a3), .a4(a4), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, err, got;
    for (int v = 0; v < 16; v++) begin
      {a1, a2, a3, a4} = 4'(v);
      @(posedge clk);
      ones = int'(a1) + int'(a2) + int'(a3) + int'(a4);
      err  = (v == 8 || v == 4) ? 1 : (v == 3 || v == 15) ? -1 : 0;
      got  = 2 * int'(carry) + int'(sum);
      checks += 2;
      if (carry != (a1 | a2)) begin
        failures++;
        $display("FAIL carry a=%4b -> %0b", v[3:0], carry);
      end
      if (got != ones + err) begin
        failures++;
        $display("FAIL value a=%4b -> %0d, expected %0d", v[3:0], got, ones + err);
      end
      if (got != ones) inexact++;
    end
    checks++;
    if (inexact != 4) begin
      failures++;
      $display("FAIL %0d inexact input patterns, expected 4", inexact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
