// tb_mc_coverage: random fault-injection campaign over the matrix-code
// checker, comparing single- and multi-bit upsets (1 to 7 flipped bits per
// codeword) for the 16-bit (4 x 4) and the 32-bit (4 x 8) geometries. It
// prints the share of corrected, flagged, miscorrected and undetected
// patterns for each upset count, and checks the guaranteed part: all
// single and double upsets corrected, all patterns of up to four detected.
module tb_mc_coverage;
  logic done_a, done_b;
  int   checks_a, failures_a, checks_b, failures_b;

  mc_coverage_run #(.K1(4), .K2(4)) u_a (.start(1'b1), .done(done_a), .checks(checks_a), .failures(failures_a));
  mc_coverage_run #(.K1(4), .K2(8)) u_b (.start(done_a), .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end
endmodule
