// tb_approx_mult_core: exhaustive self-check of the combinational
// approximate multiplier: all 65536 operand pairs for each of the 32
// truncation words. Each product is compared with the reference model.
// Further checks: with trunc = 0 and operands whose partial products all
// fall in columns 8..14 (both operands multiples of 16) the product is exact;
// with trunc = 11111 it is 0. It prints, per truncation word, the mean
// relative error distance against the exact product, and the error rate.
module tb_approx_mult_core;
  import amul_ref_pkg::*;
  logic clk = 1'b0;
  logic [7:0] a, b;
  logic [4:0] trunc;
  logic [15:0] product;
  logic [1:0] edc_err;
  int checks = 0, failures = 0;

  approx_mult_core dut (.a(a), .b(b), .trunc(trunc), .product(product), .edc_err(edc_err));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 32; t++) begin
      real red_sum;
      int  n_err, n_nz;
      red_sum = 0.0;
      n_err   = 0;
      n_nz    = 0;
      trunc   = 5'(t);
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          int unsigned exp_v, exact;
          a = 8'(x);
          b = 8'(y);
          #1;
          exp_v = ref_product(a, b, trunc);
          exact = x * y;
          checks++;
          if (int'(product) != exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d trunc=%b: got %0d expected %0d", x, y, trunc, product, exp_v);
          end
          if (edc_err != ref_edc(ref_pp(a, b, trunc))) begin
            failures++;
            if (failures < 10) $display("FAIL edc_err a=%0d b=%0d", x, y);
          end
          if (t == 0 && x % 16 == 0 && y % 16 == 0) begin
            checks++;
            if (int'(product) != exact) begin
              failures++;
              $display("FAIL exact region a=%0d b=%0d got %0d", x, y, product);
            end
          end
          if (t == 31) begin
            checks++;
            if (product != 0) begin
              failures++;
              if (failures < 10) $display("FAIL full truncation a=%0d b=%0d", x, y);
            end
          end
          if (int'(product) != exact) n_err++;
          if (exact != 0) begin
            n_nz++;
            red_sum += (real'(int'(product)) - real'(exact)) / real'(exact) *
                       ((int'(product) >= int'(exact)) ? 1.0 : -1.0);
          end
        end
        @(posedge clk);
      end
      $display("trunc=%b  error rate=%6.2f%%  MRED=%8.5f", trunc,
               100.0 * n_err / 65536.0, red_sum / n_nz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
