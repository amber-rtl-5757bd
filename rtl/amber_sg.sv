// Schedule generator (SG) of an affine streaming controller.
//
// Works like the address generator, but the affine value it tracks is the
// cycle at which the next access happens. A free-running cycle counter starts
// at zero on `start`; when it equals the scheduled cycle, `fire` is raised
// (the read or write enable) and the schedule advances by the recurrence delta
// of the incrementing loop level. Timing: `fire` is combinational from the
// counters; both advance on the next clock edge.
module amber_sg #(
  parameter int unsigned LEVELS = 6,
  parameter int unsigned CW     = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        run,
  input  logic [$clog2(LEVELS)-1:0]   inc_lvl,
  input  logic [CW-1:0]               cfg_off,
  input  logic [LEVELS-1:0][CW-1:0]   cfg_dlt,
  output logic                        fire
);
  logic [CW-1:0] cycle, sched;

  assign fire = run && (cycle == sched);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle <= '0;
      sched <= '0;
    end else if (start) begin
      cycle <= '0;
      sched <= cfg_off;
    end else if (run) begin
      cycle <= cycle + CW'(1);
      if (fire) sched <= sched + cfg_dlt[inc_lvl];
    end
  end
endmodule
