// GLB load unit: streams data from a global-buffer bank into the CGRA.
//
// An affine streaming controller (iteration domain, address and schedule
// generators) decides on which cycle which 16-bit word is read. The unit reads
// the 64-bit bank row holding that word (address bits 15:2 = row, 1:0 = lane)
// and, one cycle later, drives the selected lane on `out_data` with
// `out_valid`. Timing: one word per cycle at most; latency one cycle from the
// scheduled cycle. The affine control follows the design description; the
// word addressing is this design's choice.
module amber_glb_ld
  import amber_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  affine_cfg_t cfg,
  output logic        rd_en,
  output logic [13:0] rd_row,
  input  logic [63:0] rd_data,
  output logic [15:0] out_data,
  output logic        out_valid,
  output logic        busy
);
  logic [CNT_W-1:0] addr;
  logic [1:0]       lane_q;

  amber_stream_ctrl #(.USE_SG(1'b1)) u_ctrl (.clk, .rst_n, .cfg, .start,
    .ext_step(1'b0), .valid(rd_en), .addr, .busy);

  assign rd_row = addr[15:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_q <= '0; out_valid <= 1'b0;
    end else begin
      lane_q    <= addr[1:0];
      out_valid <= rd_en;
    end
  end
  assign out_data = rd_data[16*lane_q +: 16];
endmodule
