// tb_imeccc_tile: end-to-end test of the protected tile at its default size.
//
// Programming phase: the CLB, SB and CB words are written through mode/dec_ip
// (first the inverter LUT 16'h5555 with straight CB and SB routes, later
// random configurations), and di is compared with an independent encoding.
// Operating phase: writes are ignored, and the corrected outputs op1..op3
// are compared with a behavioural model of the fabric for random inputs.
// Upsets are then injected into all three words at once (single, row-double,
// check-bit, mixed), with repair off and on. The test checks that the
// corrected outputs never change, that the raw outputs op*_f follow the upset
// words, that err rises one clock after an upset, that repair restores the
// words, and that two double-error rows are flagged uncorrectable.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_imeccc_tile;
  timeunit 1ns;
  timeprecision 1ps;
  import mc_ref_pkg::*;

  localparam int CW = 36, N = 16, RB = 4, CB = 16;

  logic          clk = 0, rst_n = 0;
  logic          mode = 0;
  logic [1:0]    dec_ip = 2'd3, inj_sel = 2'd0;
  logic [15:0]   d = '0;
  logic [CW-1:0] di, inj_mask = '0;
  logic          inj_en = 0, repair_en = 0;
  logic [3:0]    tracks = '0;
  logic [2:0]    sb_in = '0;
  logic          op1, op1_f;
  logic [3:0]    op2, op3, op2_f, op3_f;
  logic [2:0]    err_async, err, ue, repaired;
  mc_pkg::row_status_e row_status [3][4];

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_prog = 0, n_ignored = 0, n_sed = 0, n_ded = 0, n_chk = 0, n_ue = 0;
  int n_repair = 0, n_norepair = 0, n_visible = 0, n_triple = 0;
  int n_rs_sed = 0, n_rs_ded = 0;

  imeccc_tile u_dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .dec_ip(dec_ip), .d(d), .di(di),
    .inj_en(inj_en), .inj_sel(inj_sel), .inj_mask(inj_mask), .repair_en(repair_en),
    .tracks(tracks), .sb_in(sb_in), .op1(op1), .op2(op2), .op3(op3),
    .op1_f(op1_f), .op2_f(op2_f), .op3_f(op3_f), .row_status(row_status), .err_async(err_async),
    .err(err), .ue(ue), .repaired(repaired));

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] word [3];   // programmed configuration (0 CLB, 1 SB, 2 CB)
  logic [15:0] raw  [3];   // model of the stored data bits

  function automatic logic [CW-1:0] ref_encode(input logic [N-1:0] x);
    logic [CB-1:0] c;
    logic [3:0]    p;
    p = '0;
    for (int r = 0; r < 4; r++) begin
      logic [7:0] rc;
      rc = ref_row_check(32'(x[r*4 +: 4]), 4);
      c[r*RB +: RB] = rc[RB-1:0];
      p ^= x[r*4 +: 4];
    end
    return {p, c, x};
  endfunction

  // Behavioural fabric: CB, LUT, SB.
  task automatic model(input logic [15:0] clb, sb, cb,
                       output logic o1, output logic [3:0] o2, o3);
    for (int i = 0; i < 4; i++) begin
      o3[i] = 1'b0;
      for (int t = 0; t < 4; t++) if (cb[i*4 + t] && tracks[t]) o3[i] = 1'b1;
    end
    o1 = clb[8 * o3[3] + 4 * o3[2] + 2 * o3[1] + o3[0]];
    for (int s = 0; s < 4; s++) begin
      logic [3:0] sin;
      sin = {sb_in, o1};
      o2[s] = 1'b0;
      for (int t = 0; t < 4; t++) if (sb[s*4 + t] && sin[t]) o2[s] = 1'b1;
    end
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Compare both output sets with the model for a few random inputs.
  task automatic check_outputs(input string what);
    logic e1, f1;
    logic [3:0] e2, e3, f2, f3;
    for (int k = 0; k < 16; k++) begin
      tracks = 4'($urandom); sb_in = 3'($urandom); #0.25;
      model(word[0], word[1], word[2], e1, e2, e3);
      model(raw[0], raw[1], raw[2], f1, f2, f3);
      check(op1 == e1 && op2 == e2 && op3 == e3, {what, ": corrected outputs"});
      check(op1_f == f1 && op2_f == f2 && op3_f == f3, {what, ": raw outputs"});
      if ({op1_f, op2_f, op3_f} != {op1, op2, op3}) n_visible++;
    end
  endtask

  // Output checks take 16 x 0.25 ns, inside half a clock period, so every
  // clocked step below starts right after a falling edge.
  task automatic prog_word(input int e, input logic [15:0] w);
    @(negedge clk);
    mode = 1; dec_ip = 2'(e); d = w;
    #0.25;
    check(di == ref_encode(w), "di encoding");
    @(negedge clk);
    mode = 0; dec_ip = 2'd3;
    word[e] = w; raw[e] = w;
    n_prog++;
  endtask

  // Upset all three words with their masks, then watch detection and repair.
  task automatic upset3(input logic [CW-1:0] m [3], input bit correctable, input string what);
    @(negedge clk);
    for (int e = 0; e < 3; e++) begin
      inj_sel = 2'(e); inj_mask = m[e]; inj_en = 1;
      @(negedge clk);
      inj_en = 0;
      raw[e] = raw[e] ^ m[e][N-1:0];
    end
    // The last word was upset one clock ago at most: its flag is not yet up.
    // With repair on, the first two words are already repaired by now.
    check(err_async[2] == 1'b1 && (repair_en || !correctable || err_async == 3'b111),
          {what, ": err_async in the upset cycle"});
    check(err[2] == 1'b0, {what, ": err not before one clock"});
    // Row statuses of the last word upset, against the mask's row weights.
    for (int r = 0; r < 4; r++) begin
      int w;
      mc_pkg::row_status_e exp;
      w = $countones({m[2][N + r*RB +: RB], m[2][r*4 +: 4]});
      exp = (w == 0) ? mc_pkg::ROW_NE : (w % 2 == 1) ? mc_pkg::ROW_SED : mc_pkg::ROW_DED;
      check(row_status[2][r] == exp, {what, ": row status"});
      if (exp == mc_pkg::ROW_SED) n_rs_sed++;
      if (exp == mc_pkg::ROW_DED) n_rs_ded++;
    end
    if (correctable && !repair_en) check_outputs(what);
    @(negedge clk);
    check(err[2] == 1'b1, {what, ": err one clock after the upset"});
    if (correctable) begin
      if (repair_en) begin
        for (int e = 0; e < 3; e++) raw[e] = word[e];
        check(err_async == 3'b000, {what, ": clean after repair"});
        check(repaired[2] == 1'b1, {what, ": repair pulse"});
        n_repair++;
      end else begin
        check(err_async == 3'b111, {what, ": kept without repair"});
        n_norepair++;
      end
      check_outputs({what, " after"});
    end else begin
      check(ue[2] == 1'b1, {what, ": ue"});
      n_ue++;
    end
  endtask

  task automatic reprogram_all();
    for (int e = 0; e < 3; e++) prog_word(e, word[e]);
  endtask

  initial begin
    logic [CW-1:0] m [3];
    int a, b, r0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // LUT as an inverter of A1; CB: track i -> A(i+1); SB: side 0 (LUT) to
    // all four outputs.
    prog_word(0, 16'h5555);
    prog_word(1, 16'h1111);
    prog_word(2, 16'h8421);
    check_outputs("inverter tile");
    for (int k = 0; k < 16; k++) begin
      tracks = 4'(k); #0.25;
      check(op1 == !tracks[0] && op2 == {4{op1}}, "LUT inverts A1");
    end
    // Writes in the operating phase are ignored.
    mode = 0; dec_ip = 2'd0; d = 16'h0000;
    @(negedge clk);
    dec_ip = 2'd3;
    check(err_async == 3'b000, "operating-phase write ignored (no error)");
    check_outputs("operating-phase write ignored");
    n_ignored++;

    for (int t = 0; t < 60; t++) begin
      if (t > 0) for (int e = 0; e < 3; e++) prog_word(e, 16'($urandom));
      check_outputs("programmed");
      repair_en = t[0];
      // One upset per word (the three-fault case).
      for (int e = 0; e < 3; e++) begin m[e] = '0; m[e][$urandom_range(N-1)] = 1'b1; end
      upset3(m, 1, "single x3"); n_sed++;
      if (!repair_en) reprogram_all();
      // Double upset in one row of every word.
      for (int e = 0; e < 3; e++) begin
        r0 = $urandom_range(3); a = $urandom_range(3);
        do b = $urandom_range(3); while (b == a);
        m[e] = '0; m[e][r0*4 + a] = 1'b1; m[e][r0*4 + b] = 1'b1;
      end
      upset3(m, 1, "row double x3"); n_ded++;
      if (!repair_en) reprogram_all();
      // Check or parity bit upsets.
      for (int e = 0; e < 3; e++) begin m[e] = '0; m[e][N + $urandom_range(CB+3)] = 1'b1; end
      upset3(m, 1, "check bit x3"); n_chk++;
      if (!repair_en) reprogram_all();
      // Three upsets in one word: a double in one row, a single in another.
      for (int e = 0; e < 3; e++) begin
        m[e] = '0; m[e][0] = 1'b1; m[e][2] = 1'b1; m[e][4 + $urandom_range(11)] = 1'b1;
      end
      upset3(m, 1, "three in a word"); n_triple++;
      if (!repair_en) reprogram_all();
      // Two rows with double upsets: uncorrectable.
      for (int e = 0; e < 3; e++) begin
        m[e] = '0; m[e][0] = 1'b1; m[e][1] = 1'b1; m[e][12] = 1'b1; m[e][15] = 1'b1;
      end
      upset3(m, 0, "two double rows");
      reprogram_all();
    end

    check(n_prog > 0, "mechanism: programming");
    check(n_ignored > 0, "mechanism: operating-phase write ignored");
    check(n_sed > 0, "mechanism: single upset corrected");
    check(n_ded > 0, "mechanism: row double upset corrected");
    check(n_chk > 0, "mechanism: check bit upset");
    check(n_triple > 0, "mechanism: three upsets in a word corrected");
    check(n_ue > 0, "mechanism: uncorrectable flagged");
    check(n_repair > 0, "mechanism: automatic repair");
    check(n_norepair > 0, "mechanism: repair disabled");
    check(n_visible > 0, "mechanism: upset visible on raw outputs only");
    check(n_rs_sed > 0 && n_rs_ded > 0, "mechanism: SED and DED row statuses");
    $display("mechanisms: prog=%0d ignored=%0d sed=%0d ded=%0d chk=%0d triple=%0d ue=%0d repair=%0d norepair=%0d visible=%0d rowSED=%0d rowDED=%0d",
             n_prog, n_ignored, n_sed, n_ded, n_chk, n_triple, n_ue, n_repair, n_norepair, n_visible, n_rs_sed, n_rs_ded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
