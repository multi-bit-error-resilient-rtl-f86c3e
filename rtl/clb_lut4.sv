// clb_lut4: the 4-input look-up table of a configurable logic block (CLB).
//
// The 16 configuration bits are the truth table: output o = cfg[{a4,a3,a2,a1}],
// so cfg[0] is the output for a4..a1 = 0000. Loading 16'h5555 makes o the
// inverse of a1 with a2..a4 as don't-cares, the inverter used in the
// original description's LUT experiment. Purely combinational. The original description names the
// 4-input LUT of the CLB and its inputs A1..A4; the bit ordering of the truth
// table is this design's choice.
module clb_lut4 (
  input  logic [15:0] cfg,
  input  logic [3:0]  a,    // a[0] = A1 ... a[3] = A4
  output logic        o
);
  assign o = cfg[a];
endmodule
