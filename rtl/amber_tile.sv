// CGRA tile: switch boxes, connection boxes, configuration decoder and a PE
// or MEM core.
//
// Every tile has the same routing shell: a 16-bit and a 1-bit switch box with
// NT tracks per side, three 16-bit and three 1-bit connection boxes feeding
// the core, and a decoder that accepts writes from its column's configuration
// bus when the row field matches `tile_row`. The core is a PE (IS_MEM=0) or a
// MEM tile (IS_MEM=1). Core outputs: PE -> {ALU result, register-file
// stream} and {COND, LUT}; MEM -> {output 0, output 1} and {valid 0,
// valid 1}. Core inputs: PE uses 16-bit inputs 0,1 and 1-bit inputs 0..2;
// MEM uses 16-bit inputs 0,1 as its streams, 16-bit input 2 and 1-bit input 0
// as the chain input.
// Register map (7-bit address): 0..9 switch boxes (4 bits per outgoing wire,
// wire index = (width*4 + side)*NT + track, 4 wires per register; width 0 is
// 16-bit), 10..15 connection boxes (16-bit CB 0..2, 1-bit CB 0..2), 16..127
// core registers 0..111.
// Timing: configuration writes land one cycle after they appear on the bus.
// The routing shell follows the array diagram; track count and register map
// are this design's choices.
module amber_tile
  import amber_pkg::*;
#(
  parameter bit          IS_MEM = 1'b0,
  parameter int unsigned NT     = NUM_TRACKS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [3:0]                 tile_row,
  input  cfg_bus_t                   cfg,
  input  logic [3:0][NT-1:0][15:0]   in16,
  input  logic [3:0][NT-1:0]         in1,
  output logic [3:0][NT-1:0][15:0]   out16,
  output logic [3:0][NT-1:0]         out1,
  output logic                       err
);
  localparam int unsigned NIN = 4 * NT;
  localparam int unsigned SW  = $clog2(NIN + 1);
  localparam int unsigned NSB = 2 * 4 * NT;
  localparam int unsigned NSBREG = (NSB + 3) / 4;

  logic        we;
  logic [15:0] sbreg [NSBREG];
  logic [15:0] cbreg [6];
  logic        core_we;
  logic [6:0]  core_a;

  assign we      = cfg.we && (cfg.row == tile_row);
  assign core_we = we && (cfg.reg_a >= 7'd16);
  assign core_a  = cfg.reg_a - 7'd16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NSBREG); i++) sbreg[i] <= '0;
      for (int i = 0; i < 6; i++) cbreg[i] <= '0;
    end else if (we) begin
      if (int'(cfg.reg_a) < int'(NSBREG)) sbreg[cfg.reg_a] <= cfg.data;
      else if (cfg.reg_a >= 7'd10 && cfg.reg_a < 7'd16) cbreg[cfg.reg_a - 7'd10] <= cfg.data;
    end
  end

  // switch-box configuration fields
  logic [3:0][NT-1:0][3:0] sb16_cfg, sb1_cfg;
  always_comb begin
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < int'(NT); t++) begin
        sb16_cfg[s][t] = sbreg[(s*NT + t) / 4][4*((s*NT + t) % 4) +: 4];
        sb1_cfg[s][t]  = sbreg[((4 + s)*NT + t) / 4][4*(((4 + s)*NT + t) % 4) +: 4];
      end
  end

  // connection boxes
  logic [NIN-1:0][15:0] trk16;
  logic [NIN-1:0][0:0]  trk1;
  always_comb begin
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < int'(NT); t++) begin
        trk16[s*NT + t] = in16[s][t];
        trk1[s*NT + t]  = in1[s][t];
      end
  end

  logic [2:0][15:0] cin16;
  logic [2:0]       cin1;
  for (genvar i = 0; i < 3; i++) begin : g_cb
    amber_cb #(.W(16), .NIN(NIN)) u_cb16 (.tracks(trk16), .sel(SW'(cbreg[i])),   .out(cin16[i]));
    amber_cb #(.W(1),  .NIN(NIN)) u_cb1  (.tracks(trk1),  .sel(SW'(cbreg[3+i])), .out(cin1[i]));
  end

  // core
  logic [1:0][15:0] cout16;
  logic [1:0]       cout1;
  if (IS_MEM) begin : g_mem
    amber_mem_core u_mem (.clk, .rst_n, .start, .cfg_we(core_we), .cfg_addr(core_a),
      .cfg_data(cfg.data), .data_in0(cin16[0]), .data_in1(cin16[1]), .chain_in(cin16[2]),
      .chain_valid_in(cin1[0]), .data_out0(cout16[0]), .data_out1(cout16[1]),
      .valid_out0(cout1[0]), .valid_out1(cout1[1]), .err);
  end else begin : g_pe
    logic rf_valid;
    amber_pe_core u_pe (.clk, .rst_n, .start, .cfg_we(core_we), .cfg_addr(core_a),
      .cfg_data(cfg.data), .data0(cin16[0]), .data1(cin16[1]), .bit_in(cin1),
      .alu_out(cout16[0]), .rf_out(cout16[1]), .cond_out(cout1[0]), .lut_out(cout1[1]),
      .rf_valid);
    assign err = 1'b0;
  end

  // switch boxes
  logic [3:0][NT-1:0][0:0] in1w, out1w;
  always_comb begin
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < int'(NT); t++) begin
        in1w[s][t] = in1[s][t];
        out1[s][t] = out1w[s][t];
      end
  end
  amber_sb #(.W(16), .NT(NT)) u_sb16 (.clk, .rst_n, .in(in16), .core(cout16), .cfg(sb16_cfg), .out(out16));
  amber_sb #(.W(1),  .NT(NT)) u_sb1  (.clk, .rst_n, .in(in1w), .core(cout1),  .cfg(sb1_cfg),  .out(out1w));
endmodule
