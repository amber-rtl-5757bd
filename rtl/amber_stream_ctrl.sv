// Affine streaming controller: iteration domain (ID) + address generator (AG)
// + schedule generator (SG).
//
// Walks a 6-level affine pattern
//   for i5..for i0: addr = offset + sum s_k*i_k, at cycle t0 + sum d_k*i_k
// using recurrence relations (one adder per generator, no multiplier).
// `start` (re)loads the controller and begins the pattern; `busy` stays high
// until the last iteration has been issued. A controller configured with zero
// levels (dims = 0) stays idle. With USE_SG=1 the schedule
// generator decides when each access happens and raises `valid` on that cycle.
// With USE_SG=0 the schedule generator is left out and an access happens on
// each cycle the user raises `ext_step` (used where the timing comes from a
// neighbouring unit, e.g. the wide side of the MEM tile).
// Timing: `valid` and `addr` are combinational outputs of registers; the
// controller advances on the clock edge of a valid cycle.
module amber_stream_ctrl
  import amber_pkg::*;
#(
  parameter bit USE_SG = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  affine_cfg_t  cfg,
  input  logic         start,
  input  logic         ext_step,
  output logic         valid,
  output logic [CNT_W-1:0] addr,
  output logic         busy
);
  logic [$clog2(ID_LEVELS)-1:0] inc_lvl;
  logic last, fire, step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               busy <= 1'b0;
    else if (start)           busy <= (cfg.dims != 3'd0);   // dims = 0: disabled
    else if (step && last)    busy <= 1'b0;
  end

  if (USE_SG) begin : g_sg
    amber_sg #(.LEVELS(ID_LEVELS), .CW(CNT_W)) u_sg (
      .clk, .rst_n, .start, .run(busy), .inc_lvl,
      .cfg_off(cfg.sch_off), .cfg_dlt(cfg.sch_dlt), .fire
    );
  end else begin : g_ext
    assign fire = busy && ext_step;
  end

  assign step  = fire;
  assign valid = fire;

  amber_id #(.LEVELS(ID_LEVELS), .CW(CNT_W)) u_id (
    .clk, .rst_n, .start, .step, .cfg_dims(cfg.dims), .cfg_extent(cfg.extent),
    .inc_lvl, .last
  );

  amber_ag #(.LEVELS(ID_LEVELS), .CW(CNT_W)) u_ag (
    .clk, .rst_n, .start, .step, .inc_lvl,
    .cfg_off(cfg.addr_off), .cfg_dlt(cfg.addr_dlt), .addr
  );
endmodule
