// tb_mc_decoder: self-checking test of the matrix-code checker/corrector in
// the 16-bit (4 x 4) geometry and the 32-bit (4 x 8) geometry, the latter
// giving the 20 row check bits and 8 column parity bits of the 32-bit
// variant. Random words and error patterns come from mc_codec_tester.
module tb_mc_decoder;
  logic done_a, done_b;
  int   checks_a, failures_a, checks_b, failures_b;
  int   checks, failures;

  mc_codec_tester #(.K1(4), .K2(4), .TRIALS(400)) u_a (.done(done_a), .checks(checks_a), .failures(failures_a));
  mc_codec_tester #(.K1(4), .K2(8), .TRIALS(400)) u_b (.done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    #200000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    checks   = checks_a + checks_b;
    failures = failures_a + failures_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
