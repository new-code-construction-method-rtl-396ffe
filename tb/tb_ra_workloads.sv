// tb_ra_workloads: encodes the other code sizes evaluated for SSI codes, each
// with the parallel encoder re-parameterised to that size and the stand-in
// table of ssi_pkg (the published tables are not available):
//   N = 2032,  rate 1/2, L = 127: P = 7, NB = 16, MB = 8, all information
//              columns of weight 4
//   N = 16352, rate 1/2: L = 511, NB = 32, MB = 16, weight 4
//   N = 9690:  L = 255, NB = 38, MB = 19 (rate 1/2 assumed), weight 4
// Two codewords each, every slice and the 2L + 3 cycle period checked.
module tb_ra_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [3];
  int chk [3];
  int fail [3];
  int checks;
  int failures;

  always #5 clk = ~clk;

  ra_enc_workload #(.P(7), .NB(16), .MB(8),  .W3(0)) u_2032  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  ra_enc_workload #(.P(9), .NB(32), .MB(16), .W3(0)) u_16352 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  ra_enc_workload #(.P(8), .NB(38), .MB(19), .W3(0)) u_9690  (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    fork
      begin
        wait (done[0] && done[1] && done[2]);
      end
      begin
        repeat (4 * (2 * 511 + 3) + 200) @(posedge clk);
        $display("watchdog expired");
      end
    join_any
    checks = chk[0] + chk[1] + chk[2];
    failures = fail[0] + fail[1] + fail[2];
    if (!(done[0] && done[1] && done[2])) failures++;
    $display("N=2032: checks=%0d failures=%0d; N=16352: checks=%0d failures=%0d; N=9690: checks=%0d failures=%0d",
             chk[0], fail[0], chk[1], fail[1], chk[2], fail[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
