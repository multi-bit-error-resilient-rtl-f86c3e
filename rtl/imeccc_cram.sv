// imeccc_cram: one configuration-memory (CRAM) word with its own in-memory
// matrix-code checker (IMECCC: in-memory error code correction and checking).
//
// The stored codeword is {parity, check, data} in the layout of mc_encoder.
// Instead of a scrubber that reads words back one after another, every word
// carries a permanently attached mc_decoder, so an upset is seen
// combinationally (err_async) and registered on the next clock edge
// (err_flag): the time to detect is a fixed single cycle, whatever the word's
// position in the memory. When the decoder can correct the word and repair
// is enabled, the corrected data is re-encoded and written back on that same
// edge, which also restores flipped check or parity bits. An uncorrectable
// word is left as it is and flagged, for the system to reprogram it.
//
// Ports: wr_en/wr_code - programming write of a complete codeword (the
//                        bitstream carries its check bits); has priority
//        inj_en/inj_mask - error injection, XORs inj_mask into the stored
//                        codeword (the CRAM error-injection function)
//        repair_en     - allows the automatic write-back
//        cfg           - corrected configuration data driving the fabric
//        cfg_raw       - stored (possibly upset) data bits
//        code          - whole stored codeword
//        err_async     - decoder error, combinational from the storage
//        err_flag, ue_flag, repaired - registered status, one cycle after
// Reset: storage cleared to all zeros, which is a valid codeword.
// The write-back policy and the priorities are this design's choices.
module imeccc_cram #(
  parameter int unsigned K1 = mc_pkg::MC_K1,
  parameter int unsigned K2 = mc_pkg::MC_K2,
  localparam int unsigned N  = K1 * K2,
  localparam int unsigned CB = K1 * mc_pkg::row_cb(K2),
  localparam int unsigned CW = mc_pkg::code_width(K1, K2)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [CW-1:0]       wr_code,
  input  logic                inj_en,
  input  logic [CW-1:0]       inj_mask,
  input  logic                repair_en,
  output logic [N-1:0]        cfg,
  output logic [N-1:0]        cfg_raw,
  output logic [CW-1:0]       code,
  output mc_pkg::row_status_e row_status [K1],
  output logic                err_async,
  output logic                err_flag,
  output logic                ue_flag,
  output logic                repaired
);
  import mc_pkg::*;

  logic [CW-1:0] store;
  logic          ue_async;
  logic [CB-1:0] fix_check;
  logic [K2-1:0] fix_parity;
  logic [K2-1:0] sp_unused;
  logic          do_repair;

  assign code    = store;
  assign cfg_raw = store[N-1:0];

  mc_decoder #(.K1(K1), .K2(K2)) u_dec (
    .data         (store[N-1:0]),
    .check        (store[N +: CB]),
    .parity       (store[N+CB +: K2]),
    .corrected    (cfg),
    .row_status   (row_status),
    .sp           (sp_unused),
    .error        (err_async),
    .uncorrectable(ue_async)
  );

  mc_encoder #(.K1(K1), .K2(K2)) u_fix (
    .data  (cfg),
    .check (fix_check),
    .parity(fix_parity)
  );

  assign do_repair = repair_en && err_async && !ue_async && !wr_en && !inj_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      store    <= '0;
      err_flag <= 1'b0;
      ue_flag  <= 1'b0;
      repaired <= 1'b0;
    end else begin
      err_flag <= err_async;
      ue_flag  <= ue_async;
      repaired <= do_repair;
      if (wr_en)          store <= wr_code;
      else if (inj_en)    store <= store ^ inj_mask;
      else if (do_repair) store <= {fix_parity, fix_check, cfg};
    end
  end

endmodule
