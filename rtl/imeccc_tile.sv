// imeccc_tile: an FPGA tile whose configuration memory corrects multi-bit
// upsets in place.
//
// The tile holds a configurable logic block (a 4-input LUT, clb_lut4), a
// switch box (switch_box) and a connection box (connection_box). Each of the
// three is configured by one 16-bit word, and each word lives in its own
// imeccc_cram: a matrix-code protected CRAM word with a permanently attached
// checker. Upsets are therefore detected asynchronously and flagged a fixed
// one clock after they happen, and correctable ones are repaired by
// write-back, instead of waiting for a read-back scrubber to reach the word.
//
// Datapath: tracks -> CB -> LUT inputs; the LUT output enters the SB on side
// 0, the tile inputs sb_in[2:0] on sides 1..3. The fabric runs twice: once
// from the corrected configuration (op1, op2, op3) and once from the raw
// stored bits (op1_f, op2_f, op3_f), so the effect of an upset and of its
// correction can be watched side by side, as in the original description's simulation.
//
// Programming: with mode = 1 (programming phase) the 16-bit bitstream word d
// is encoded (di = data plus matrix-code check and parity bits) and written
// into the CRAM selected by dec_ip (0 = CLB, 1 = SB, 2 = CB, 3 = none) on
// each clock. mode = 0 is the operating phase: no writes.
// Error injection: inj_en XORs inj_mask into the codeword selected by inj_sel.
// Status per element (index 0 = CLB, 1 = SB, 2 = CB): row_status (NE, SED or
// DED of every matrix row, combinational), err_async (combinational), err
// (registered error flag, one cycle after the upset), ue (uncorrectable),
// repaired (write-back done).
// The signal names MODE, DEC_IP, D, DI, OPx and OPx_F follow the original description;
// the encodings of mode and dec_ip, the tile wiring and the injection port
// are this design's choices.
module imeccc_tile #(
  parameter int unsigned K1 = mc_pkg::MC_K1,
  parameter int unsigned K2 = mc_pkg::MC_K2,
  localparam int unsigned CW = mc_pkg::code_width(K1, K2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mode,
  input  logic [1:0]    dec_ip,
  input  logic [15:0]   d,
  output logic [CW-1:0] di,
  input  logic          inj_en,
  input  logic [1:0]    inj_sel,
  input  logic [CW-1:0] inj_mask,
  input  logic          repair_en,
  input  logic [3:0]    tracks,
  input  logic [2:0]    sb_in,
  output logic          op1,
  output logic [3:0]    op2,
  output logic [3:0]    op3,
  output logic          op1_f,
  output logic [3:0]    op2_f,
  output logic [3:0]    op3_f,
  output mc_pkg::row_status_e row_status [3][K1],
  output logic [2:0]    err_async,
  output logic [2:0]    err,
  output logic [2:0]    ue,
  output logic [2:0]    repaired
);
  import mc_pkg::*;

  localparam int unsigned N  = K1 * K2;
  localparam int unsigned CB = K1 * row_cb(K2);

  if (N != 16) begin : g_bad_size
    $error("imeccc_tile: K1*K2 must be 16, the size of a LUT4/SB/CB configuration word");
  end

  logic [CB-1:0]    enc_check;
  logic [K2-1:0]    enc_parity;
  logic [15:0]      cfg     [3];
  logic [15:0]      cfg_raw [3];
  logic [CW-1:0]    code_unused [3];

  mc_encoder #(.K1(K1), .K2(K2)) u_enc (
    .data  (d),
    .check (enc_check),
    .parity(enc_parity)
  );
  assign di = {enc_parity, enc_check, d};

  for (genvar e = 0; e < 3; e++) begin : g_cram
    imeccc_cram #(.K1(K1), .K2(K2)) u_cram (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (mode && dec_ip == 2'(e)),
      .wr_code   (di),
      .inj_en    (inj_en && inj_sel == 2'(e)),
      .inj_mask  (inj_mask),
      .repair_en (repair_en),
      .cfg       (cfg[e]),
      .cfg_raw   (cfg_raw[e]),
      .code      (code_unused[e]),
      .row_status(row_status[e]),
      .err_async (err_async[e]),
      .err_flag  (err[e]),
      .ue_flag   (ue[e]),
      .repaired  (repaired[e])
    );
  end

  // Fabric driven by the corrected configuration.
  logic [3:0] lut_in, lut_in_f;

  connection_box u_cb   (.cfg(cfg[2]),     .tracks(tracks), .lut_in(lut_in));
  clb_lut4       u_clb  (.cfg(cfg[0]),     .a(lut_in),      .o(op1));
  switch_box     u_sb   (.cfg(cfg[1]),     .in({sb_in, op1}), .out(op2));
  assign op3 = lut_in;

  // The same fabric driven by the raw stored bits.
  connection_box u_cb_f (.cfg(cfg_raw[2]), .tracks(tracks), .lut_in(lut_in_f));
  clb_lut4       u_clb_f(.cfg(cfg_raw[0]), .a(lut_in_f),    .o(op1_f));
  switch_box     u_sb_f (.cfg(cfg_raw[1]), .in({sb_in, op1_f}), .out(op2_f));
  assign op3_f = lut_in_f;

endmodule
