// connection_box: programmable connection box (CB) between the routing
// tracks and the four CLB (LUT) inputs.
//
// LUT input i is connected to track t when cfg[i*4 + t] is set; several
// closed switches on one input give the OR of their tracks, none gives 0.
// Sixteen configuration bits, one 16-bit CRAM word. Purely combinational.
// The original description only names the connection box; its size and switch pattern
// are this design's choice.
module connection_box (
  input  logic [15:0] cfg,
  input  logic [3:0]  tracks,
  output logic [3:0]  lut_in
);
  always_comb begin
    for (int i = 0; i < 4; i++) lut_in[i] = |(tracks & cfg[i*4 +: 4]);
  end
endmodule
