// mc_decoder: matrix-code checker and corrector.
//
// Works in the two steps of the original description's verification algorithm:
//  1. Row step. For every row the Hamming check bits are recomputed from the
//     stored data and XORed with the stored ones (syndrome SC), and the
//     overall row parity is recomputed (ovr). ovr = 1 is a single error
//     (SED): the syndrome names the flipped position, and a data bit there is
//     inverted. ovr = 0 with SC != 0 is a double error (DED). SC = 0 and
//     ovr = 0 is no error (NE).
//  2. Column step. The vertical syndrome SP is the column parity of the
//     row-corrected data XOR the stored parity bits. If exactly one row
//     reports DED, the data bits of that row in the columns where SP = 1 are
//     inverted; this repairs two errors in that row as long as every other
//     row has at most one error. Two or more DED rows cannot be resolved and
//     raise 'uncorrectable'.
// Errors in check or parity bits leave the data untouched; they are reported
// through 'error' so that the storage can be rewritten (re-encoded).
//
// Ports: data/check/parity - stored codeword fields (layout of mc_encoder)
//        corrected         - corrected data word
//        row_status        - NE/SED/DED per row
//        sp                - vertical syndrome after the row step
//        error             - any syndrome bit set anywhere
//        uncorrectable     - more than one row with a double error
// The recomputed overall-parity bits of the row encoders are not used: the
// overall check is taken directly over all stored bits of the row (ovr).
// Timing: purely combinational, so an upset is visible on 'error' in the
// same cycle it lands in the storage (asynchronous detection).
module mc_decoder #(
  parameter int unsigned K1 = mc_pkg::MC_K1,
  parameter int unsigned K2 = mc_pkg::MC_K2
) (
  input  logic [K1*K2-1:0]                 data,
  input  logic [K1*mc_pkg::row_cb(K2)-1:0] check,
  input  logic [K2-1:0]                    parity,
  output logic [K1*K2-1:0]                 corrected,
  output mc_pkg::row_status_e              row_status [K1],
  output logic [K2-1:0]                    sp,
  output logic                             error,
  output logic                             uncorrectable
);
  import mc_pkg::*;

  localparam int unsigned R  = ham_bits(K2);
  localparam int unsigned RB = row_cb(K2);

  logic [K1*RB-1:0] recomputed;
  logic [K1*K2-1:0] row_fixed;
  logic [R-1:0]     sc  [K1];
  logic             ovr [K1];
  logic             ded [K1];
  int unsigned      n_ded;
  int unsigned      ded_row;
  logic [K2-1:0]    par_unused;
  logic [K2-1:0]    sed_hit [K1];  // data bit whose position equals SC

  mc_encoder #(.K1(K1), .K2(K2)) u_enc (
    .data  (data),
    .check (recomputed),
    .parity(par_unused)
  );

  for (genvar r = 0; r < K1; r++) begin : g_hit
    for (genvar i = 0; i < K2; i++) begin : g_bit
      localparam int unsigned POS = data_pos(i);
      assign sed_hit[r][i] = (32'(sc[r]) == POS);
    end
    assign sc[r]  = recomputed[r*RB +: R] ^ check[r*RB +: R];
    // Overall parity over stored data, stored Hamming bits and stored overall
    // bit; even for a clean row.
    assign ovr[r] = (^data[r*K2 +: K2]) ^ (^check[r*RB +: RB]);
    assign ded[r] = !ovr[r] && (sc[r] != '0);
  end

  always_comb begin
    row_fixed = data;
    n_ded     = 0;
    ded_row   = 0;
    for (int unsigned r = 0; r < K1; r++) begin
      if (ovr[r]) begin
        row_status[r] = ROW_SED;
        row_fixed[r*K2 +: K2] = data[r*K2 +: K2] ^ sed_hit[r];
      end else if (ded[r]) begin
        row_status[r] = ROW_DED;
        n_ded   = n_ded + 1;
        ded_row = r;
      end else begin
        row_status[r] = ROW_NE;
      end
    end

    sp = parity;
    for (int unsigned r = 0; r < K1; r++) sp = sp ^ row_fixed[r*K2 +: K2];

    corrected = row_fixed;
    if (n_ded == 1) corrected[ded_row*K2 +: K2] = row_fixed[ded_row*K2 +: K2] ^ sp;

    error = (sp != '0);
    for (int unsigned r = 0; r < K1; r++) error = error || ovr[r] || (sc[r] != '0);
    uncorrectable = (n_ded > 1);
  end

endmodule
