// switch_box: programmable routing switch box (SB) of a tile.
//
// Four sides, one track per side (index 0..3). A 4 x 4 matrix of programmable
// switches joins input side t to output side s when cfg[s*4 + t] is set; an
// output driven by several closed switches takes their OR (wired connection of
// several sources), and an output with no closed switch is 0. Sixteen
// configuration bits, so the SB's configuration is one 16-bit CRAM word.
// Purely combinational. The original description only names the switch box; its size and
// switch pattern are this design's choice.
module switch_box (
  input  logic [15:0] cfg,
  input  logic [3:0]  in,
  output logic [3:0]  out
);
  always_comb begin
    for (int s = 0; s < 4; s++) out[s] = |(in & cfg[s*4 +: 4]);
  end
endmodule
