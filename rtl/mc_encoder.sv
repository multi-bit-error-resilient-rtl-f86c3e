// mc_encoder: matrix-code encoder.
//
// The N = K1*K2 bit data word is read as K1 rows of K2 bits (row r holds
// data[r*K2 +: K2], bit 0 of the word is the top-left element X1). Each row
// receives ROW_CB SEC-DED check bits from a secded_row_enc, and each column
// receives one vertical parity bit, the XOR of that column's K1 data
// bits. This is the (K1, K2) matrix arrangement of horizontal check bits and
// vertical parity bits of the original description; the bit ordering inside the check
// field is this design's choice.
//
// Ports: data   - N data bits
//        check  - K1*ROW_CB row check bits, row r at [r*ROW_CB +: ROW_CB]
//        parity - K2 column parity bits, parity[c] covers column c
// Timing: purely combinational.
module mc_encoder #(
  parameter int unsigned K1 = mc_pkg::MC_K1,
  parameter int unsigned K2 = mc_pkg::MC_K2
) (
  input  logic [K1*K2-1:0]                 data,
  output logic [K1*mc_pkg::row_cb(K2)-1:0] check,
  output logic [K2-1:0]                    parity
);
  import mc_pkg::*;

  localparam int unsigned RB = row_cb(K2);

  for (genvar r = 0; r < K1; r++) begin : g_row
    secded_row_enc #(.K2(K2)) u_row (
      .data (data[r*K2 +: K2]),
      .check(check[r*RB +: RB])
    );
  end

  always_comb begin
    parity = '0;
    for (int unsigned r = 0; r < K1; r++) parity = parity ^ data[r*K2 +: K2];
  end

endmodule
