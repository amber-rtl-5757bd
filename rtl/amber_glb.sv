// Global buffer: NGLB GLB tiles (16 x 256 KB = 4 MB by default).
//
// Routes the host's register and memory requests to the addressed tile and
// returns read data from it; exposes every tile's load/store streams, column
// start pulse and configuration lane, and ORs the status bits.
// Timing: as amber_glb_tile; host read data one cycle after the grant.
// The tile count and sizes follow the design description; the host ports are
// this design's choice.
module amber_glb
  import amber_pkg::*;
#(
  parameter int unsigned NGLB       = NUM_GLB_TILES,
  parameter int unsigned BANK_DEPTH = 16384
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   host_reg_we,
  input  logic [3:0]             host_reg_tile,
  input  logic [5:0]             host_reg_addr,
  input  logic [15:0]            host_reg_data,
  input  logic                   host_en,
  input  logic                   host_we,
  input  logic [3:0]             host_tile,
  input  logic                   host_bank,
  input  logic [13:0]            host_row,
  input  logic [63:0]            host_wdata,
  output logic                   host_gnt,
  output logic [63:0]            host_rdata,
  output logic                   host_rvalid,
  output logic [NGLB-1:0][15:0]  ld_data,
  output logic [NGLB-1:0]        ld_valid,
  input  logic [NGLB-1:0][15:0]  st_data,
  input  logic [NGLB-1:0]        st_valid,
  output logic [NGLB-1:0]        col_start,
  output cfg_word_t [NGLB-1:0]   cfg_word,
  output logic [NGLB-1:0]        cfg_valid,
  output logic [NGLB-1:0]        ld_busy,
  output logic [NGLB-1:0]        st_busy,
  output logic [NGLB-1:0]        cfg_busy,
  output logic                   err
);
  logic [NGLB-1:0]       t_gnt, t_rv, t_err;
  logic [63:0]           t_rd [NGLB];

  for (genvar t = 0; t < int'(NGLB); t++) begin : g_tile
    amber_glb_tile #(.BANK_DEPTH(BANK_DEPTH)) u_tile (
      .clk, .rst_n,
      .host_reg_we(host_reg_we && host_reg_tile == 4'(t)), .host_reg_addr, .host_reg_data,
      .host_en(host_en && host_tile == 4'(t)), .host_we, .host_bank, .host_row, .host_wdata,
      .host_gnt(t_gnt[t]), .host_rdata(t_rd[t]), .host_rvalid(t_rv[t]),
      .ld_data(ld_data[t]), .ld_valid(ld_valid[t]), .st_data(st_data[t]), .st_valid(st_valid[t]),
      .col_start(col_start[t]), .cfg_word(cfg_word[t]), .cfg_valid(cfg_valid[t]),
      .ld_busy(ld_busy[t]), .st_busy(st_busy[t]), .cfg_busy(cfg_busy[t]), .err(t_err[t]));
  end

  logic [3:0] rt_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rt_q <= '0;
    else        rt_q <= host_tile;
  end
  assign host_gnt    = |t_gnt;
  assign host_rvalid = |t_rv;
  assign host_rdata  = t_rd[rt_q];
  assign err         = |t_err;
endmodule
