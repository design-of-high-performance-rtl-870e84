// tb_pp_reduction: self-check of the partial-product reduction tree.
// It drives arbitrary (not only product-shaped) 64-bit partial-product
// matrices: all-zero, all-one, every single bit alone, and 200000 random
// matrices of several densities. It checks that row_a + row_b equals the
// column-count reference model and that edc_err flags exactly the column-7
// groups of four ones. It counts how often the approximate compressors
// err and the column-7 compensation is used, and fails if either never is.
module tb_pp_reduction;
  import amul_ref_pkg::*;
  logic clk = 1'b0;
  logic [7:0][7:0] pp;
  logic [15:0] row_a, row_b;
  logic [1:0] edc_err;
  int checks = 0, failures = 0, n_edc = 0, n_approx_err = 0;

  pp_reduction dut (.pp(pp), .row_a(row_a), .row_b(row_b), .edc_err(edc_err));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int unsigned exp_v, got_v, exact_v;
    #1;
    exp_v = ref_tree(pp);
    got_v = int'(row_a) + int'(row_b);
    exact_v = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) exact_v += int'(pp[i][j]) << (i + j);
    checks += 2;
    if (got_v != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%h: got %0d expected %0d", pp, got_v, exp_v);
    end
    if (edc_err != ref_edc(pp)) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%h: edc_err=%b", pp, edc_err);
    end
    if (edc_err != 0) n_edc++;
    if (got_v != exact_v) n_approx_err++;
  endtask

  initial begin
    pp = '0;       check_one();
    pp = '1;       check_one();
    for (int k = 0; k < 64; k++) begin
      pp = 64'd1 << k;
      check_one();
    end
    for (int n = 0; n < 200000; n++) begin
      logic [63:0] r1, r2;
      r1 = {$urandom, $urandom};
      r2 = {$urandom, $urandom};
      case (n % 3)
        0: pp = r1;
        1: pp = r1 | r2;   // dense
        default: pp = r1 & r2; // sparse
      endcase
      check_one();
      if (n % 64 == 0) @(posedge clk);
    end
    checks += 2;
    if (n_edc == 0) begin failures++; $display("FAIL column-7 compensation never used"); end
    if (n_approx_err == 0) begin failures++; $display("FAIL approximation never visible"); end
    $display("column-7 compensations: %0d, inexact results: %0d", n_edc, n_approx_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
