// mc_coverage_run: fault-injection campaign on one mc_decoder geometry.
//
// For every upset count k = 1..KMAX it draws TRIALS random codewords (encoded
// by mc_ref_pkg) and flips k distinct random bits of each, anywhere in the
// codeword. Each outcome is classified as corrected (right data, no
// uncorrectable flag), flagged (uncorrectable raised), miscorrected (wrong
// data without a flag, but error set) or undetected (error clear). It
// checks the guarantees of the code: every pattern of up to two upsets is
// corrected, and every pattern of up to four upsets is detected (the lightest
// non-zero codeword is one data bit with its three row check bits and its
// column parity bit, weight 5). A table of the counts is printed. The run
// begins when start is high.
module mc_coverage_run #(
  parameter int unsigned K1     = 4,
  parameter int unsigned K2     = 4,
  parameter int unsigned KMAX   = 7,
  parameter int unsigned TRIALS = 2000
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int unsigned N  = K1 * K2;
  localparam int unsigned R  = ref_r(K2);
  localparam int unsigned RB = R + 1;
  localparam int unsigned CB = K1 * RB;
  localparam int unsigned CW = N + CB + K2;

  logic [N-1:0]  data, corrected, good_d;
  logic [CB-1:0] check, good_c;
  logic [K2-1:0] parity, good_p, sp;
  logic          error, ue;
  row_status_e   rs [K1];

  mc_decoder #(.K1(K1), .K2(K2)) u_dec (
    .data(data), .check(check), .parity(parity), .corrected(corrected),
    .row_status(rs), .sp(sp), .error(error), .uncorrectable(ue));

  initial begin
    logic [CW-1:0] cw, m;
    int n_corr, n_flag, n_mis, n_undet;
    done = 0; checks = 0; failures = 0;
    wait (start);
    $display("geometry %0dx%0d (%0d-bit codeword), %0d trials per upset count", K1, K2, CW, TRIALS);
    $display("  upsets  corrected  flagged  miscorrected  undetected");
    for (int unsigned k = 1; k <= KMAX; k++) begin
      n_corr = 0; n_flag = 0; n_mis = 0; n_undet = 0;
      for (int unsigned t = 0; t < TRIALS; t++) begin
        for (int unsigned i = 0; i < N; i++) good_d[i] = 1'($urandom);
        good_p = '0;
        for (int unsigned r = 0; r < K1; r++) begin
          logic [7:0] c;
          c = ref_row_check(32'(good_d[r*K2 +: K2]), K2);
          good_c[r*RB +: RB] = c[RB-1:0];
          good_p ^= good_d[r*K2 +: K2];
        end
        m = '0;
        for (int unsigned j = 0; j < k; j++) begin
          int unsigned b;
          do b = $urandom_range(CW-1); while (m[b]);
          m[b] = 1'b1;
        end
        cw     = {good_p, good_c, good_d} ^ m;
        data   = cw[N-1:0];
        check  = cw[N +: CB];
        parity = cw[N+CB +: K2];
        #1;
        if (!error)                          n_undet++;
        else if (ue)                         n_flag++;
        else if (corrected == good_d)        n_corr++;
        else                                 n_mis++;
      end
      $display("  %6d  %9d  %7d  %12d  %10d", k, n_corr, n_flag, n_mis, n_undet);
      if (k <= 2) begin
        checks++;
        if (n_corr != int'(TRIALS)) begin
          failures++; $display("FAIL %0dx%0d: not every %0d-upset pattern corrected", K1, K2, k);
        end
      end
      if (k <= 4) begin
        checks++;
        if (n_undet != 0) begin
          failures++; $display("FAIL %0dx%0d: %0d-upset pattern undetected", K1, K2, k);
        end
      end
    end
    done = 1;
  end

endmodule
