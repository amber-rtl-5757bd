// Connection box (CB): brings one tile input in from the routing tracks.
//
// A configured multiplexer over the tracks arriving at the tile from all four
// sides; a select value past the last track gives zero (input unused).
// Interface: `tracks` flattened as side*NT + track (sides N, E, S, W).
// Timing: combinational.
module amber_cb #(
  parameter int unsigned W     = 16,
  parameter int unsigned NIN   = 20,
  parameter int unsigned SEL_W = $clog2(NIN + 1)
) (
  input  logic [NIN-1:0][W-1:0] tracks,
  input  logic [SEL_W-1:0]      sel,
  output logic [W-1:0]          out
);
  always_comb begin
    out = '0;
    if (int'(sel) < int'(NIN)) out = tracks[sel];
  end
endmodule
