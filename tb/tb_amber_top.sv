// End-to-end testbench of the accelerator subsystem.
// 1. The host writes 32 input words into GLB tile 0 and two bitstreams into
//    the GLB banks: tile 0's for columns 0-1, tile 1's for columns 2-3.
// 2. Both GLB tiles stream their bitstreams into the array in parallel
//    (dynamic partial reconfiguration); meanwhile the host tries a direct
//    configuration word, which is refused while its column's lane is busy and
//    accepted afterwards.
// 3. Run: GLB load -> column 0 -> PE(0,0) adds a constant -> east along row 0
//    through a switch-box pipeline register -> MEM(3,0) packs the stream into
//    wide rows and replays it (its reads collide with its writes and are
//    delayed) -> back west -> column 1 -> GLB store. The host reads the
//    stored words back and compares them with input + constant.
// 4. Only tile 0's region is reconfigured (new constant) while the MEM keeps
//    its configuration, and the run is repeated.
// Every mechanism is counted and must occur at least once.
module tb_amber_top;
  import amber_pkg::*;
  localparam int NG = 2, NRW = 4, BD = 1024;
  `include "tb_amber_top_body.svh"
  amber_top #(.NGLB(NG), .NROW(NRW), .BANK_DEPTH(BD)) dut (.*);
endmodule
