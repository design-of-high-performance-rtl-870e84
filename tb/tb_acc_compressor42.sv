// tb_acc_compressor42: exhaustive self-check of the exact 4:2 compressor.
// For all 32 input combinations it checks
//   x1+x2+x3+x4+cin == sum + 2*(carry+cout)
// and that cout does not depend on cin (no ripple through a row).
module tb_acc_compressor42;
  logic clk = 1'b0;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int   checks = 0, failures = 0;

  acc_compressor42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                        .sum(sum), .carry(carry), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(ci);
        @(posedge clk);
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) !=
            int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)) begin
          failures++;
          $display("FAIL x=%4b cin=%0b -> sum=%0b carry=%0b cout=%0b",
                   {x1, x2, x3, x4}, cin, sum, carry, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%4b", {x1, x2, x3, x4});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
