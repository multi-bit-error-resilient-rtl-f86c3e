// tb_imeccc_cram: self-checking test of one protected CRAM word (4 x 4
// matrix code, 36-bit codeword).
//
// Stimulus is applied on the falling clock edge. For each random word the
// test programs the codeword (computed by mc_ref_pkg), then injects, in turn,
// a single upset anywhere, a double upset in one row, two upsets anywhere,
// upsets in the check/parity bits only, and double upsets in two rows. It
// checks that the corrected configuration never changes, that err_async is
// set in the cycle the upset lands, that err_flag and repaired follow exactly
// one clock later (fixed time to detect of one cycle), that the stored
// codeword is restored by the write-back, that an uncorrectable word is
// flagged and left alone, and that with repair disabled the word stays
// upset while its corrected output stays right.
module tb_imeccc_cram;
  import mc_pkg::*;
  import mc_ref_pkg::*;

  localparam int K1 = 4, K2 = 4, N = 16, RB = 4, CB = 16, CW = 36;

  logic          clk = 0, rst_n = 0;
  logic          wr_en = 0, inj_en = 0, repair_en = 1;
  logic [CW-1:0] wr_code = '0, inj_mask = '0, code;
  logic [N-1:0]  cfg, cfg_raw;
  row_status_e   rs [K1];
  logic          err_async, err_flag, ue_flag, repaired;
  int checks = 0, failures = 0;
  int cycle = 0;

  imeccc_cram u_dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_code(wr_code), .inj_en(inj_en),
    .inj_mask(inj_mask), .repair_en(repair_en), .cfg(cfg), .cfg_raw(cfg_raw),
    .code(code), .row_status(rs), .err_async(err_async), .err_flag(err_flag),
    .ue_flag(ue_flag), .repaired(repaired));

  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CW-1:0] ref_encode(input logic [N-1:0] d);
    logic [CB-1:0] c;
    logic [K2-1:0] p;
    p = '0;
    for (int r = 0; r < K1; r++) begin
      logic [7:0] rc;
      rc = ref_row_check(32'(d[r*K2 +: K2]), K2);
      c[r*RB +: RB] = rc[RB-1:0];
      p ^= d[r*K2 +: K2];
    end
    return {p, c, d};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s (code %h cfg %h err %b/%b ue %b rep %b)", cycle, what,
               code, cfg, err_async, err_flag, ue_flag, repaired);
    end
  endtask

  // Inject mask, then follow the word for two cycles.
  task automatic upset(input logic [CW-1:0] mask, input logic [CW-1:0] good,
                       input bit correctable, input string what);
    inj_mask = mask; inj_en = 1;
    @(negedge clk);                       // upset is in the storage now
    inj_en = 0;
    check(code == (good ^ mask), {what, ": upset stored"});
    check(err_async == 1'b1, {what, ": err_async in the upset cycle"});
    check(err_flag == 1'b0, {what, ": err_flag not before one clock"});
    if (correctable) check(cfg == good[N-1:0], {what, ": corrected output"});
    @(negedge clk);                       // one clock later
    check(err_flag == 1'b1, {what, ": err_flag one clock after the upset"});
    if (correctable) begin
      check(repaired == repair_en, {what, ": repaired pulse"});
      check(ue_flag == 1'b0, {what, ": no ue"});
      if (repair_en) begin
        check(code == good, {what, ": codeword restored"});
        check(err_async == 1'b0, {what, ": clean after repair"});
      end else begin
        check(code == (good ^ mask), {what, ": untouched without repair"});
        check(cfg == good[N-1:0], {what, ": corrected output without repair"});
      end
    end else begin
      check(ue_flag == 1'b1, {what, ": ue flagged"});
      check(repaired == 1'b0, {what, ": no repair of ue"});
      check(code == (good ^ mask), {what, ": ue word left alone"});
    end
  endtask

  initial begin
    logic [N-1:0]  d;
    logic [CW-1:0] good, m;
    int a, b, r0, r1;
    repeat (2) @(negedge clk);
    check(code == '0 && err_async == 1'b0, "reset state is a clean codeword");
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      d = 16'($urandom);
      good = ref_encode(d);
      wr_code = good; wr_en = 1;
      @(negedge clk);
      wr_en = 0;
      check(code == good && cfg == d && err_async == 1'b0, "programmed word");
      repair_en = (t % 5 != 4);
      // Single upset anywhere.
      m = '0; m[$urandom_range(CW-1)] = 1'b1;
      upset(m, good, 1, "single");
      if (!repair_en) begin wr_code = good; wr_en = 1; @(negedge clk); wr_en = 0; end
      // Double upset in one row's data.
      r0 = $urandom_range(K1-1); a = $urandom_range(K2-1);
      do b = $urandom_range(K2-1); while (b == a);
      m = '0; m[r0*K2 + a] = 1'b1; m[r0*K2 + b] = 1'b1;
      upset(m, good, 1, "double in row");
      if (!repair_en) begin wr_code = good; wr_en = 1; @(negedge clk); wr_en = 0; end
      // Two upsets anywhere.
      a = $urandom_range(CW-1);
      do b = $urandom_range(CW-1); while (b == a);
      m = '0; m[a] = 1'b1; m[b] = 1'b1;
      upset(m, good, 1, "two anywhere");
      if (!repair_en) begin wr_code = good; wr_en = 1; @(negedge clk); wr_en = 0; end
      // Check and parity bits only.
      m = '0; m[N + $urandom_range(CB+K2-1)] = 1'b1;
      upset(m, good, 1, "check bit");
      if (!repair_en) begin wr_code = good; wr_en = 1; @(negedge clk); wr_en = 0; end
      // Double upsets in two rows: beyond the code.
      do r1 = $urandom_range(K1-1); while (r1 == r0);
      m = '0; m[r0*K2] = 1'b1; m[r0*K2+3] = 1'b1; m[r1*K2+1] = 1'b1; m[r1*K2+2] = 1'b1;
      upset(m, good, 0, "two double rows");
      // Reprogramming clears it.
      wr_code = good; wr_en = 1;
      @(negedge clk);
      wr_en = 0;
      check(code == good && err_async == 1'b0, "reprogrammed");
      @(negedge clk);
      check(err_flag == 1'b0 && ue_flag == 1'b0, "flags clear after reprogramming");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
