// tb_approx_pipe_mult: end-to-end self-check of the pipelined approximate
// multiplier at its default (and only) size, 8 x 8 bits with a 5-bit
// truncation word.
//
// Phases:
//   1. reset: product and edc_err must read 0 while and after rst is high.
//   2. latency: one operation on an idle pipeline; the product must appear
//      exactly two rising edges after the operands are presented.
//   3. sweep: a = 103, b = 96 held while trunc steps 0..13, one value per
//      clock, as in the published simulation waveform.
//   4. stream: 40000 back-to-back operations with random operands and
//      truncation words (a new one every cycle, biased towards the
//      operands 0xFF and 0x00 now and then).
// Every output is compared with the reference model two cycles after its
// operands were applied. The testbench counts the mechanisms of the design:
// each truncation bit dropping a non-zero partial product, column-7 error
// compensation, a result differing from the exact sum of kept partial
// products (approximation visible), and back-to-back issue; one that never
// occurs counts as a failure.
module tb_approx_pipe_mult;
  import amul_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  a, b;
  logic [4:0]  trunc;
  logic [15:0] product;
  logic [1:0]  edc_err;
  int checks = 0, failures = 0;

  int n_trunc_hit[5];
  int n_edc = 0, n_approx = 0, n_back2back = 0;

  approx_pipe_mult dut (.clk(clk), .rst(rst), .a(a), .b(b), .trunc(trunc),
                        .product(product), .edc_err(edc_err));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results, one per cycle, two stages deep.
  typedef struct packed {
    logic        show;
    logic        valid;
    logic [15:0] prod;
    logic [1:0]  edc;
  } exp_t;
  exp_t pipe1, pipe2;

  function automatic exp_t model(logic [7:0] x, logic [7:0] y, logic [4:0] t);
    exp_t e;
    e.show  = 1'b0;
    e.valid = 1'b1;
    e.prod  = 16'(ref_product(x, y, t));
    e.edc   = ref_edc(ref_pp(x, y, t));
    return e;
  endfunction

  // Scoreboard: inputs are driven after the falling edge, captured at the
  // rising edge; the product of the operands captured at edge n is checked
  // just after edge n+1.
  logic checking = 1'b0;
  always @(posedge clk) begin
    if (checking) begin
      #1;
      if (pipe2.valid) begin
        if (pipe2.show) $display("sweep: product=%0d edc_err=%b", product, edc_err);
        checks++;
        if (product != pipe2.prod || edc_err != pipe2.edc) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0t product=%0d edc=%b expected %0d %b", $time,
                     product, edc_err, pipe2.prod, pipe2.edc);
        end
      end
    end
  end

  task automatic issue(logic [7:0] x, logic [7:0] y, logic [4:0] t, bit show = 0);
    bit [7:0][7:0] full, kept;
    @(negedge clk);
    a = x; b = y; trunc = t;
    // count mechanisms of this operation
    kept = ref_pp(x, y, t);
    full = ref_pp(x, y, 5'b0);
    for (int k = 0; k < 5; k++) begin
      bit hit;
      hit = 0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if ((i + j) / 3 == k && full[i][j] && !kept[i][j]) hit = 1;
      if (hit) n_trunc_hit[k]++;
    end
    if (ref_edc(kept) != 0) n_edc++;
    if (ref_product(x, y, t) != trunc_exact(x, y, t)) n_approx++;
    if (pipe1.valid) n_back2back++;
    // advance the expected-value pipeline at the next rising edge
    @(posedge clk);
    pipe2 = pipe1;
    pipe1 = model(x, y, t);
    pipe1.show = show;
  endtask

  task automatic idle();
    @(posedge clk);
    pipe2 = pipe1;
    pipe1 = '0;
  endtask

  initial begin
    pipe1 = '0;
    pipe2 = '0;
    foreach (n_trunc_hit[k]) n_trunc_hit[k] = 0;

    // 1. reset
    rst = 1'b1; a = 8'hFF; b = 8'hFF; trunc = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (product != 0 || edc_err != 0) begin
      failures++;
      $display("FAIL reset: product=%0d", product);
    end
    @(negedge clk);
    rst = 1'b0; a = 0; b = 0;
    repeat (3) @(posedge clk);

    // 2. latency: present 200 x 201 before edge n; expect it after n+1, not n
    begin
      logic [15:0] exp_p;
      exp_p = 16'(ref_product(8'd200, 8'd201, 5'd0));
      @(negedge clk);
      a = 8'd200; b = 8'd201; trunc = 5'd0;
      @(posedge clk); #1;
      checks++;
      if (product == exp_p) begin
        failures++;
        $display("FAIL latency: product after one edge");
      end
      @(posedge clk); #1;
      checks++;
      if (product != exp_p) begin
        failures++;
        $display("FAIL latency: product %0d after two edges, expected %0d", product, exp_p);
      end
      @(negedge clk);
      a = 0; b = 0;
      repeat (3) @(posedge clk);
    end

    // 3 and 4 are checked by the scoreboard
    checking = 1'b1;
    for (int t = 0; t <= 13; t++) issue(8'd103, 8'd96, 5'(t), 1);
    for (int n = 0; n < 40000; n++) begin
      logic [7:0] x, y;
      x = 8'($urandom);
      y = 8'($urandom);
      if (n % 17 == 0) x = 8'hFF;
      if (n % 23 == 0) y = 8'hFF;
      if (n % 101 == 0) x = 8'h00;
      issue(x, y, 5'($urandom));
    end
    idle();
    idle();
    idle();

    // mechanism coverage
    for (int k = 0; k < 5; k++) begin
      checks++;
      $display("truncation bit %0d dropped partial products in %0d operations", k, n_trunc_hit[k]);
      if (n_trunc_hit[k] == 0) failures++;
    end
    $display("column-7 compensation: %0d, approximate results: %0d, back-to-back issues: %0d",
             n_edc, n_approx, n_back2back);
    checks += 3;
    if (n_edc == 0) failures++;
    if (n_approx == 0) failures++;
    if (n_back2back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
