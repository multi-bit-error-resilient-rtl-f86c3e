// secded_row_enc: SEC-DED Hamming check bits of one matrix-code row.
//
// Check bit j (j < R) is the XOR of every data bit whose 1-based Hamming
// position has bit j set (see mc_pkg::data_pos). Check bit R is the overall
// parity of the row, i.e. the XOR of all data bits and all R Hamming bits,
// which turns the single-error-correcting Hamming code into a SEC-DED code.
// Purely combinational; used by the encoder, the checker and the repair path.
//
// Ports: data  - K2 data bits of the row
//        check - R+1 check bits, [R-1:0] Hamming, [R] overall parity
module secded_row_enc #(
  parameter int unsigned K2 = mc_pkg::MC_K2
) (
  input  logic [K2-1:0]                 data,
  output logic [mc_pkg::row_cb(K2)-1:0] check
);
  import mc_pkg::*;

  localparam int unsigned R = ham_bits(K2);

  logic [R-1:0] ham;

  // Coverage mask of Hamming check bit j over the row's data bits.
  function automatic logic [K2-1:0] cover_mask(input int unsigned j);
    logic [K2-1:0] m;
    for (int unsigned i = 0; i < K2; i++) m[i] = ((data_pos(i) >> j) & 1) != 0;
    return m;
  endfunction

  for (genvar j = 0; j < R; j++) begin : g_ham
    localparam logic [K2-1:0] MASK = cover_mask(j);
    assign ham[j] = ^(data & MASK);
  end

  assign check = {(^data) ^ (^ham), ham};

endmodule
