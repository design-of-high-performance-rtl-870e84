// tb_trunc_pp_gen: self-check of partial-product generation with dynamic
// truncation. For all 32 truncation words and 2000 random operand pairs it
// checks every partial product against b[i] & a[j], zeroed when truncation
// bit (i+j)/3 is set. It also checks the published example: with
// trunc = 00101 columns 8..6 and 2..0 are empty while 14..9 and 5..3 are kept.
module tb_trunc_pp_gen;
  import amul_ref_pkg::*;
  logic clk = 1'b0;
  logic [7:0] a, b;
  logic [4:0] trunc;
  logic [7:0][7:0] pp;
  int checks = 0, failures = 0;

  trunc_pp_gen dut (.a(a), .b(b), .trunc(trunc), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = (n == 0) ? 8'hFF : 8'($urandom);
      b = (n == 0) ? 8'hFF : 8'($urandom);
      for (int t = 0; t < 32; t++) begin
        trunc = 5'(t);
        #1;
        checks++;
        if (pp !== ref_pp(a, b, trunc)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h trunc=%b", a, b, trunc);
        end
        if (n == 0 && t == 5) begin
          // all-ones operands: column c is non-empty iff its group is kept
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++) begin
              bit kept;
              kept = !((i + j) inside {[6:8], [0:2]});
              checks++;
              if (pp[i][j] != kept) begin
                failures++;
                $display("FAIL example 00101: pp[%0d][%0d]=%0b", i, j, pp[i][j]);
              end
            end
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
