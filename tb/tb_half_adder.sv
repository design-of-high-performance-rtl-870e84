// tb_half_adder: exhaustive self-check of the half adder against 2-bit
// integer addition (all four input pairs), with a cycle watchdog.
module tb_half_adder;
  logic clk = 1'b0;
  logic a, b, sum, carry;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if (2 * int'(carry) + int'(sum) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
