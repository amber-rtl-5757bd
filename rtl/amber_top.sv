// Amber accelerator subsystem: global buffer, configuration network and CGRA.
//
// A 4 MB global buffer (16 GLB tiles) feeds a 32 x 16 coarse-grained
// reconfigurable array of 384 PE tiles and 128 MEM tiles (every fourth column
// is memory). GLB tile t serves columns 2t and 2t+1: its load unit drives the
// north port of column 2t, its store unit takes the north port of column
// 2t+1, and its configuration unit writes the bitstream for both columns
// through the pipelined configuration network. Because each GLB tile can
// reconfigure and restart its own columns, regions of the array can be
// reconfigured while others run (dynamic partial reconfiguration).
// The host (an application processor elsewhere in the SoC) loads data and
// bitstreams into the GLB banks, programs the GLB tile registers, and can also
// write configuration words directly over a slower 32-bit path.
// Timing: see amber_glb_tile (host ports), amber_cfg_net (configuration
// latency) and amber_cgra.
// Sizes follow the design description; the column assignment of the load and
// store units and the host ports are this design's choices.
module amber_top
  import amber_pkg::*;
#(
  parameter int unsigned NGLB       = NUM_GLB_TILES,
  parameter int unsigned NROW       = NUM_ROWS,
  parameter int unsigned BANK_DEPTH = 16384,
  parameter int unsigned NT         = NUM_TRACKS
) (
  input  logic              clk,
  input  logic              rst_n,
  // host: GLB tile registers
  input  logic              host_reg_we,
  input  logic [3:0]        host_reg_tile,
  input  logic [5:0]        host_reg_addr,
  input  logic [15:0]       host_reg_data,
  // host: GLB memory
  input  logic              host_en,
  input  logic              host_we,
  input  logic [3:0]        host_tile,
  input  logic              host_bank,
  input  logic [13:0]       host_row,
  input  logic [63:0]       host_wdata,
  output logic              host_gnt,
  output logic [63:0]       host_rdata,
  output logic              host_rvalid,
  // host: direct configuration words
  input  logic              host_cfg_v,
  input  logic [31:0]       host_cfg_word,
  output logic              host_cfg_ready,
  // status
  output logic [NGLB-1:0]   ld_busy,
  output logic [NGLB-1:0]   st_busy,
  output logic [NGLB-1:0]   cfg_busy,
  output logic              err
);
  localparam int unsigned NCOL = 2 * NGLB;

  logic [NGLB-1:0][15:0] ld_data, st_data;
  logic [NGLB-1:0]       ld_valid, st_valid, gstart, cfg_valid;
  cfg_word_t [NGLB-1:0]  cfg_word;
  cfg_bus_t [NCOL-1:0]   cfg_top, cfg_bot;
  logic [NCOL-1:0][15:0] io_in16, io_out16;
  logic [NCOL-1:0]       io_in1, io_out1, cstart;
  logic                  glb_err, cgra_err;

  amber_glb #(.NGLB(NGLB), .BANK_DEPTH(BANK_DEPTH)) u_glb (.clk, .rst_n,
    .host_reg_we, .host_reg_tile, .host_reg_addr, .host_reg_data,
    .host_en, .host_we, .host_tile, .host_bank, .host_row, .host_wdata,
    .host_gnt, .host_rdata, .host_rvalid,
    .ld_data, .ld_valid, .st_data, .st_valid, .col_start(gstart), .cfg_word, .cfg_valid,
    .ld_busy, .st_busy, .cfg_busy, .err(glb_err));

  amber_cfg_net #(.NGLB(NGLB)) u_cfg (.clk, .rst_n, .lane(cfg_word), .lane_v(cfg_valid),
    .host_v(host_cfg_v), .host_word(host_cfg_word), .host_ready(host_cfg_ready),
    .cfg_top, .cfg_bot);

  for (genvar t = 0; t < int'(NGLB); t++) begin : g_io
    assign io_in16[2*t]   = ld_data[t];
    assign io_in1[2*t]    = ld_valid[t];
    assign io_in16[2*t+1] = '0;
    assign io_in1[2*t+1]  = 1'b0;
    assign st_data[t]     = io_out16[2*t+1];
    assign st_valid[t]    = io_out1[2*t+1];
    assign cstart[2*t]    = gstart[t];
    assign cstart[2*t+1]  = gstart[t];
  end

  amber_cgra #(.NCOL(NCOL), .NROW(NROW), .NT(NT)) u_cgra (.clk, .rst_n, .start(cstart),
    .cfg_top, .cfg_bot, .io_in16, .io_in1, .io_out16, .io_out1, .err(cgra_err));

  assign err = glb_err | cgra_err;

  logic unused;
  assign unused = ^{io_out16[0], io_out1[0]};
endmodule
