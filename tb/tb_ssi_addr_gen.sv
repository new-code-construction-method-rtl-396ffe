// tb_ssi_addr_gen: checks the pi(i,j) column sequence.
// Instance 0 (P=3, i=1, j=2) must give the published example permutation,
// columns (1-based) 2 3 7 1 4 6 5 for rows 0..6, and wrap to row 0 after L steps.
// Instance 1 (P=7, i=5, j=3) is compared with alpha^(i+j*k) from a power table
// built by stepping an LFSR, and must visit every column exactly once.
// A random load/step pattern also checks that `step` low holds the address.
module tb_ssi_addr_gen;
  import ssi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load0, step0, load1, step1;
  logic [2:0] col0;
  logic [6:0] col1;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  ssi_addr_gen #(.P(3), .I(1), .J(2)) dut0 (.clk, .rst_n, .load(load0), .step(step0), .col(col0));
  ssi_addr_gen #(.P(7), .I(5), .J(3)) dut1 (.clk, .rst_n, .load(load1), .step(step1), .col(col1));

  int unsigned expt [127];
  int unsigned example [7] = '{2, 3, 7, 1, 4, 6, 5};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned x;
    bit seen [127];
    int unsigned k;
    x = 1;
    for (int n = 0; n < 127; n++) begin
      expt[n] = x;
      x = x << 1;
      if (x & 'h80) x = x ^ 'h83;
    end
    load0 = 0; step0 = 0; load1 = 0; step1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load0 = 1; load1 = 1;
    @(negedge clk);
    load0 = 0; load1 = 0;
    // paper example, two passes
    for (int n = 0; n < 14; n++) begin
      check(int'(col0) + 1 == int'(example[n % 7]),
            $sformatf("pi(1,2) row %0d: col %0d expected %0d", n % 7, col0 + 1, example[n % 7]));
      step0 = 1;
      @(negedge clk);
      step0 = 0;
    end
    // P = 7 with random stalls
    k = 0;
    seen = '{default: 0};
    while (k < 127) begin
      check(int'(col1) == int'(expt[(5 + 3 * k) % 127]) - 1,
            $sformatf("P=7 row %0d: col %0d", k, col1));
      step1 = ($urandom_range(0, 3) != 0);
      if (step1) begin
        check(!seen[col1], $sformatf("P=7 column %0d repeated", col1));
        seen[col1] = 1'b1;
      end
      @(negedge clk);
      if (step1) k++;
      step1 = 0;
    end
    // reload in the middle restarts at row 0
    step1 = 1;
    repeat (5) @(negedge clk);
    step1 = 0; load1 = 1;
    @(negedge clk);
    load1 = 0;
    check(int'(col1) == int'(expt[5]) - 1, "P=7 reload to row 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
