// The coarse-grained reconfigurable array: NCOL x NROW tiles on a mesh.
//
// Columns whose index is 3 mod 4 are MEM tiles, the rest PE tiles, so every
// fourth column is memory (32 x 16 gives 384 PEs and 128 MEMs). Neighbouring
// tiles connect track-for-track on all four sides; the west, east and south
// edges are tied off. The north edge of each column is the port to the global
// buffer: track 0 of the 16-bit and 1-bit networks enters from `io_in16/1` and
// leaves to `io_out16/1`. Rows 0..NROW/2-1 take their configuration from the
// column's upper bus, the rest from the lower (pipelined) bus. `start` (per
// column) starts the streaming controllers of a column's tiles together.
// Combinational paths: a switch box can route a wire straight through, so the
// mesh contains structural loops; the reset configuration drives every switch
// box output to zero and the compiler inserts switch-box registers, so no
// loop is active in a valid configuration. Lint tools may still report them.
// Array size and tile mix follow the architecture description; the edge
// convention is this design's choice.
module amber_cgra
  import amber_pkg::*;
#(
  parameter int unsigned NCOL = NUM_COLS,
  parameter int unsigned NROW = NUM_ROWS,
  parameter int unsigned NT   = NUM_TRACKS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NCOL-1:0]        start,
  input  cfg_bus_t [NCOL-1:0]    cfg_top,
  input  cfg_bus_t [NCOL-1:0]    cfg_bot,
  input  logic [NCOL-1:0][15:0]  io_in16,
  input  logic [NCOL-1:0]        io_in1,
  output logic [NCOL-1:0][15:0]  io_out16,
  output logic [NCOL-1:0]        io_out1,
  output logic                   err
);
  localparam int N = 0, E = 1, S = 2, W = 3;
  logic [NCOL-1:0] cerr;

  logic [3:0][NT-1:0][15:0] i16 [NCOL][NROW];
  logic [3:0][NT-1:0][15:0] o16 [NCOL][NROW];
  logic [3:0][NT-1:0]       i1  [NCOL][NROW];
  logic [3:0][NT-1:0]       o1  [NCOL][NROW];
  logic [NROW-1:0]          terr [NCOL];

  for (genvar c = 0; c < int'(NCOL); c++) begin : g_col
    for (genvar r = 0; r < int'(NROW); r++) begin : g_row
      // north side
      if (r == 0) begin : g_n_edge
        always_comb begin
          i16[c][r][N] = '0;
          i1[c][r][N]  = '0;
          i16[c][r][N][0] = io_in16[c];
          i1[c][r][N][0]  = io_in1[c];
        end
      end else begin : g_n
        assign i16[c][r][N] = o16[c][r-1][S];
        assign i1[c][r][N]  = o1[c][r-1][S];
      end
      // south side
      if (r == int'(NROW) - 1) begin : g_s_edge
        assign i16[c][r][S] = '0;
        assign i1[c][r][S]  = '0;
      end else begin : g_s
        assign i16[c][r][S] = o16[c][r+1][N];
        assign i1[c][r][S]  = o1[c][r+1][N];
      end
      // west side
      if (c == 0) begin : g_w_edge
        assign i16[c][r][W] = '0;
        assign i1[c][r][W]  = '0;
      end else begin : g_w
        assign i16[c][r][W] = o16[c-1][r][E];
        assign i1[c][r][W]  = o1[c-1][r][E];
      end
      // east side
      if (c == int'(NCOL) - 1) begin : g_e_edge
        assign i16[c][r][E] = '0;
        assign i1[c][r][E]  = '0;
      end else begin : g_e
        assign i16[c][r][E] = o16[c+1][r][W];
        assign i1[c][r][E]  = o1[c+1][r][W];
      end

      amber_tile #(.IS_MEM(c % MEM_COL_EVERY == MEM_COL_EVERY - 1), .NT(NT)) u_tile (
        .clk, .rst_n, .start(start[c]), .tile_row(4'(r)),
        .cfg((r < int'(NROW) / 2) ? cfg_top[c] : cfg_bot[c]),
        .in16(i16[c][r]), .in1(i1[c][r]), .out16(o16[c][r]), .out1(o1[c][r]),
        .err(terr[c][r]));
    end
    assign cerr[c] = |terr[c];
    assign io_out16[c] = o16[c][0][N][0];
    assign io_out1[c]  = o1[c][0][N][0];
  end

  assign err = |cerr;
endmodule
