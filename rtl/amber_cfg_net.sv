// Configuration network for dynamic partial reconfiguration (DPR).
//
// Each GLB tile owns two neighbouring CGRA columns and can send one 28-bit
// configuration word per cycle into them (16 tiles x 28 bits = a 448-bit
// interface). The word's `col` bit picks one of the two columns; row,
// register and data travel down that column's bus. The bus is pipelined: a
// register at the top of every column, and a second one halfway down, which
// feeds the lower half of the rows. Because every GLB tile drives its own
// columns, separate regions of the array can be reconfigured in parallel while
// the rest keeps running.
// A slower host path (32-bit words {col[4:0], row, reg, data}) shares the
// buses; it is accepted (`host_ready`) only in a cycle where the GLB tile
// owning that column sends nothing.
// Timing: rows 0..NUM_ROWS/2-1 see a word one cycle after it is presented,
// the lower rows two cycles after.
// The per-tile parallel lanes and the mid-column pipeline register follow the
// configuration-network diagram; word format and host arbitration are this
// design's choices.
module amber_cfg_net
  import amber_pkg::*;
#(
  parameter int unsigned NGLB = NUM_GLB_TILES,
  parameter int unsigned NCOL = 2 * NGLB
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  cfg_word_t [NGLB-1:0]  lane,
  input  logic [NGLB-1:0]       lane_v,
  input  logic                  host_v,
  input  logic [31:0]           host_word,
  output logic                  host_ready,
  output cfg_bus_t [NCOL-1:0]   cfg_top,
  output cfg_bus_t [NCOL-1:0]   cfg_bot
);
  logic [4:0] hcol;
  assign hcol       = host_word[31:27];
  assign host_ready = (int'(hcol[4:1]) < int'(NGLB)) ? !lane_v[hcol[4:1]] : 1'b1;

  cfg_bus_t [NCOL-1:0] nxt;
  always_comb begin
    for (int c = 0; c < int'(NCOL); c++) begin
      nxt[c] = '0;
      if (lane_v[c/2] && (int'(lane[c/2].col) == c % 2)) begin
        nxt[c].we    = 1'b1;
        nxt[c].row   = lane[c/2].row;
        nxt[c].reg_a = lane[c/2].reg_a;
        nxt[c].data  = lane[c/2].data;
      end else if (host_v && host_ready && int'(hcol) == c) begin
        nxt[c].we    = 1'b1;
        nxt[c].row   = host_word[26:23];
        nxt[c].reg_a = host_word[22:16];
        nxt[c].data  = host_word[15:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_top <= '0;
      cfg_bot <= '0;
    end else begin
      cfg_top <= nxt;
      cfg_bot <= cfg_top;
    end
  end
endmodule
