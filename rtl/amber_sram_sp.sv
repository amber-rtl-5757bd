// Single-port SRAM, written as a memory array.
//
// Stands for the foundry SRAM macros: the 512 x 64-bit macro of each MEM tile
// (4 KB, the default) and the 16384 x 64-bit banks of the global buffer
// (128 KB, set by parameter). One access per cycle: a write when `we` is high
// (with a 16-bit-lane write mask), otherwise a read when `en` is high. The sizes come from the design description;
// the lane mask and one-cycle read latency are this design's choice.
// Timing: read data appears on `rdata` the cycle after the read and holds
// until the next read.
module amber_sram_sp #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 64,
  parameter int unsigned LANES = WIDTH / 16
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [LANES-1:0]         wmask,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  localparam int unsigned LW = WIDTH / LANES;
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int l = 0; l < int'(LANES); l++)
          if (wmask[l]) mem[addr][l*LW +: LW] <= wdata[l*LW +: LW];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
