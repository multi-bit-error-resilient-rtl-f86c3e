// mc_codec_tester: drives one mc_encoder/mc_decoder pair of a given geometry
// with random words and error patterns, and compares against mc_ref_pkg.
//
// Scenarios (each TRIALS times): no error; one flipped bit anywhere in the
// codeword; two flipped bits anywhere; two flipped data bits in one row;
// a double error in one row plus a single error in every other row; double
// errors in two rows (must be flagged uncorrectable). Every correctable case
// must return the original data. Results leave through checks/failures when
// done rises.
module mc_codec_tester #(
  parameter int unsigned K1     = 4,
  parameter int unsigned K2     = 4,
  parameter int unsigned TRIALS = 300
) (
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

  logic [N-1:0]  data, corrected;
  logic [CB-1:0] check, enc_check;
  logic [K2-1:0] parity, enc_parity, sp;
  logic          error, ue;
  row_status_e   rs [K1];

  mc_encoder #(.K1(K1), .K2(K2)) u_enc (.data(data), .check(enc_check), .parity(enc_parity));
  mc_decoder #(.K1(K1), .K2(K2)) u_dec (
    .data(data), .check(check), .parity(parity), .corrected(corrected),
    .row_status(rs), .sp(sp), .error(error), .uncorrectable(ue));

  logic [N-1:0]  good_d;
  logic [CB-1:0] good_c;
  logic [K2-1:0] good_p;

  task automatic make_word();
    for (int unsigned i = 0; i < N; i++) good_d[i] = 1'($urandom);
    good_p = '0;
    for (int unsigned r = 0; r < K1; r++) begin
      logic [7:0] c;
      c = ref_row_check(32'(good_d[r*K2 +: K2]), K2);
      good_c[r*RB +: RB] = c[RB-1:0];
      good_p ^= good_d[r*K2 +: K2];
    end
  endtask

  // Codeword bit index of element e of row r (data bits first, then checks).
  function automatic int unsigned row_bit(input int unsigned r, input int unsigned e);
    return (e < K2) ? r * K2 + e : N + r * RB + (e - K2);
  endfunction

  task automatic apply(input logic [CW-1:0] mask);
    logic [CW-1:0] cw;
    cw     = {good_p, good_c, good_d} ^ mask;
    data   = cw[N-1:0];
    check  = cw[N +: CB];
    parity = cw[N+CB +: K2];
    #1;
  endtask

  task automatic expect_ok(input string what, input logic exp_err);
    checks++;
    if (corrected !== good_d || error !== exp_err || ue !== 1'b0) begin
      failures++;
      $display("FAIL %0dx%0d %s: data %h corrected %h error %b ue %b", K1, K2, what,
               good_d, corrected, error, ue);
    end
  endtask

  initial begin
    logic [CW-1:0] m;
    int unsigned a, b, r0, r1;
    done = 0; checks = 0; failures = 0;
    for (int t = 0; t < TRIALS; t++) begin
      make_word();
      // Encoder against the reference.
      data = good_d; #1;
      checks++;
      if (enc_check !== good_c || enc_parity !== good_p) begin
        failures++;
        $display("FAIL %0dx%0d encode %h: check %h/%h parity %h/%h", K1, K2, good_d,
                 enc_check, good_c, enc_parity, good_p);
      end
      // No error.
      apply('0); expect_ok("clean", 1'b0);
      checks++;
      for (int unsigned r = 0; r < K1; r++) if (rs[r] != ROW_NE) begin failures++; break; end
      // One error anywhere.
      m = '0; m[$urandom_range(CW-1)] = 1'b1;
      apply(m); expect_ok("single", 1'b1);
      // Two errors anywhere.
      a = $urandom_range(CW-1);
      do b = $urandom_range(CW-1); while (b == a);
      m = '0; m[a] = 1'b1; m[b] = 1'b1;
      apply(m); expect_ok("double-any", 1'b1);
      // Two data errors in the same row.
      r0 = $urandom_range(K1-1);
      a = $urandom_range(K2-1);
      do b = $urandom_range(K2-1); while (b == a);
      m = '0; m[r0*K2 + a] = 1'b1; m[r0*K2 + b] = 1'b1;
      apply(m); expect_ok("double-row", 1'b1);
      checks++;
      if (rs[r0] != ROW_DED) begin failures++; $display("FAIL row status not DED"); end
      // Double error in one row, single error in all others.
      m = '0;
      for (int unsigned r = 0; r < K1; r++) begin
        a = $urandom_range(K2+RB-1);
        m[row_bit(r, a)] = 1'b1;
        if (r == r0) begin
          do b = $urandom_range(K2+RB-1); while (b == a);
          m[row_bit(r, b)] = 1'b1;
        end
      end
      apply(m); expect_ok("double+singles", 1'b1);
      // Double data errors in two rows: uncorrectable.
      do r1 = $urandom_range(K1-1); while (r1 == r0);
      m = '0;
      m[r0*K2 + 0] = 1'b1; m[r0*K2 + 1] = 1'b1;
      m[r1*K2 + 1] = 1'b1; m[r1*K2 + 2] = 1'b1;
      apply(m);
      checks++;
      if (ue !== 1'b1 || error !== 1'b1) begin
        failures++; $display("FAIL %0dx%0d two DED rows not flagged", K1, K2);
      end
    end
    done = 1;
  end

endmodule
