// PE register file: 64 bytes (32 x 16-bit) with affine streaming controllers.
//
// The smallest level of the memory hierarchy. A write controller (iteration
// domain + address + schedule generator) decides on which cycles the incoming
// 16-bit word is stored and at which entry; a read controller decides when an
// entry is read out and which. Typical use is a short delay line or a small
// reuse buffer (e.g. the taps of a stencil) without spending a MEM tile.
// Timing: a write fires in the cycle its schedule names and is visible to a
// read from the next cycle on; read data is registered and appears with
// `rvalid` one cycle after the read's scheduled cycle. Write wins over nothing:
// reads and writes are independent (two-port flop array).
// Size and the affine control follow the design description; the two-port
// flop array and the one-cycle read latency are this design's choices.
module amber_pe_rf
  import amber_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  affine_cfg_t wr_cfg,
  input  affine_cfg_t rd_cfg,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        rvalid
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [15:0] mem [DEPTH];
  logic        wv, rv, wbusy, rbusy;
  logic [CNT_W-1:0] wa, ra;

  amber_stream_ctrl #(.USE_SG(1'b1)) u_wr (.clk, .rst_n, .cfg(wr_cfg), .start,
    .ext_step(1'b0), .valid(wv), .addr(wa), .busy(wbusy));
  amber_stream_ctrl #(.USE_SG(1'b1)) u_rd (.clk, .rst_n, .cfg(rd_cfg), .start,
    .ext_step(1'b0), .valid(rv), .addr(ra), .busy(rbusy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      if (wv) mem[AW'(wa)] <= wdata;
      rvalid <= rv;
      if (rv) rdata <= mem[AW'(ra)];
    end
  end

  logic unused;
  assign unused = ^{wa[CNT_W-1:AW], ra[CNT_W-1:AW], wbusy, rbusy};
endmodule
