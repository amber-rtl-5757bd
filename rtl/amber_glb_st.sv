// GLB store unit: writes the CGRA's output stream into a global-buffer bank.
//
// Every cycle the CGRA presents a word with `in_valid` high, the unit writes it
// at the next address of its affine address generator (iteration domain +
// address generator; the timing comes from the array, so no schedule
// generator). The write is a 64-bit row write with a one-hot 16-bit lane mask.
// Timing: the write request is combinational from `in_valid`.
// The affine addressing follows the design description; the valid-driven
// timing is this design's choice.
module amber_glb_st
  import amber_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  affine_cfg_t cfg,
  input  logic [15:0] in_data,
  input  logic        in_valid,
  output logic        wr_en,
  output logic [13:0] wr_row,
  output logic [63:0] wr_data,
  output logic [3:0]  wr_mask,
  output logic        busy
);
  logic [CNT_W-1:0] addr;

  amber_stream_ctrl #(.USE_SG(1'b0)) u_ctrl (.clk, .rst_n, .cfg, .start,
    .ext_step(in_valid), .valid(wr_en), .addr, .busy);

  assign wr_row  = addr[15:2];
  assign wr_data = {4{in_data}};
  assign wr_mask = 4'b0001 << addr[1:0];
endmodule
