// mc_pkg: constants, types and constant functions shared by the matrix-code
// (MC) blocks.
//
// A matrix code arranges an N-bit data word as K1 rows of K2 bits. Every row
// gets its own SEC-DED Hamming code (R Hamming check bits plus one overall
// parity bit, ROW_CB = R + 1 bits per row) and every column gets one vertical
// parity bit. The functions below give the Hamming geometry of a row: how
// many check bits a K2-bit row needs and at which codeword position (1-based,
// powers of two being the check positions) each data bit sits. Row statuses
// follow the no-error / single-error / double-error classification used by
// the row decoders. The classification is the original description's; the numeric
// encoding of the status is this design's choice.
package mc_pkg;

  // Default geometry: a 16-bit configuration word as a 4 x 4 matrix.
  localparam int unsigned MC_K1 = 4;
  localparam int unsigned MC_K2 = 4;

  // Per-row decoder status.
  typedef enum logic [1:0] {
    ROW_NE  = 2'd0,  // syndrome and overall parity both clean
    ROW_SED = 2'd1,  // overall parity odd: single error, corrected by Hamming
    ROW_DED = 2'd2   // overall parity even, syndrome non-zero: double error
  } row_status_e;

  // Number of Hamming check bits for k data bits: smallest r with 2^r >= k+r+1.
  function automatic int unsigned ham_bits(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((1 << r) < (k + r + 1)) r++;
    return r;
  endfunction

  // SEC-DED check bits per row (Hamming bits plus overall parity).
  function automatic int unsigned row_cb(input int unsigned k);
    return ham_bits(k) + 1;
  endfunction

  // Total stored width of an MC codeword: data, row check bits, column parity.
  function automatic int unsigned code_width(input int unsigned k1, input int unsigned k2);
    return k1 * k2 + k1 * row_cb(k2) + k2;
  endfunction

  // 1-based Hamming codeword position of data bit i (positions that are not
  // powers of two, in increasing order: 3, 5, 6, 7, 9, ...).
  function automatic int unsigned data_pos(input int unsigned i);
    int unsigned pos;
    pos = 2;
    for (int unsigned n = 0; n <= i; n++) begin
      pos++;
      if ((pos & (pos - 1)) == 0) pos++;
    end
    return pos;
  endfunction

endpackage
