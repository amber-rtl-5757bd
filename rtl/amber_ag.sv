// Address generator (AG) of an affine streaming controller.
//
// Produces addr = offset + sum_k stride_k * i_k without a multiplier: the
// address register is loaded with the offset on `start`, and on every step it
// adds the recurrence delta of the loop level that increments (from the
// iteration domain). The deltas are computed ahead of time by the compiler.
// Timing: `addr` is the address of the current iteration; it moves to the next
// one on the clock edge that samples `step`.
module amber_ag #(
  parameter int unsigned LEVELS = 6,
  parameter int unsigned CW     = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        step,
  input  logic [$clog2(LEVELS)-1:0]   inc_lvl,
  input  logic [CW-1:0]               cfg_off,
  input  logic [LEVELS-1:0][CW-1:0]   cfg_dlt,
  output logic [CW-1:0]               addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     addr <= '0;
    else if (start) addr <= cfg_off;
    else if (step)  addr <= addr + cfg_dlt[inc_lvl];
  end
endmodule
