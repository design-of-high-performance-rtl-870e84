// tb_full_adder: exhaustive self-check of the full adder against integer
// addition of its three inputs, with a cycle watchdog.
module tb_full_adder;
  logic clk = 1'b0;
  logic a, b, c, sum, carry;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      if (2 * int'(carry) + int'(sum) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> carry=%0b sum=%0b", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
