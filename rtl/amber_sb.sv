// Switch box (SB): routes tile outputs and through-traffic on the tracks.
//
// For every side and track there is an outgoing wire. Its multiplexer picks
// the same-numbered track arriving from one of the other three sides
// (select 1..3 = the sides clockwise from the output side: for the north
// output, east, south, west) or one of the tile core's two outputs (select 4
// and 5); select 0 (the reset value) drives zero, so an unconfigured array
// holds no combinational loop. Each outgoing wire has an optional pipeline register, enabled by
// bit 3 of its 4-bit configuration field, which the compiler's pipelining
// step uses to break long combinational paths.
// Because unregistered wires pass straight through, tools that analyse the
// whole array see possible combinational cycles through neighbouring switch
// boxes; a real cycle exists only if a configuration routes a loop with no
// register enabled, which a valid configuration never does, so this stands.
// Interface: arrays indexed [side][track], sides 0..3 = N, E, S, W.
// Timing: combinational, or one cycle where the register is enabled.
// Track count, the disjoint topology and the register placement are this
// design's choices.
module amber_sb #(
  parameter int unsigned W  = 16,
  parameter int unsigned NT = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0][NT-1:0][W-1:0] in,
  input  logic [1:0][W-1:0]       core,
  input  logic [3:0][NT-1:0][3:0] cfg,
  output logic [3:0][NT-1:0][W-1:0] out
);
  logic [3:0][NT-1:0][W-1:0] mux, q;

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      for (int t = 0; t < int'(NT); t++) begin
        unique case (cfg[s][t][2:0])
          3'd1:    mux[s][t] = in[(s+1)%4][t];
          3'd2:    mux[s][t] = in[(s+2)%4][t];
          3'd3:    mux[s][t] = in[(s+3)%4][t];
          3'd4:    mux[s][t] = core[0];
          3'd5:    mux[s][t] = core[1];
          default: mux[s][t] = '0;
        endcase
        out[s][t] = cfg[s][t][3] ? q[s][t] : mux[s][t];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= mux;
  end
endmodule
