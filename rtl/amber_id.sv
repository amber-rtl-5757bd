// Iteration domain (ID) of an affine streaming controller.
//
// Up to ID_LEVELS nested loop counters. Each `step` advances the innermost
// counter; a counter that reaches its extent wraps to zero and carries into the
// next level, exactly like the nested `for` loops of an affine access pattern.
// The module reports, for the step in progress, which level increments
// (`inc_lvl`, the lowest level that does not wrap) so that the address and
// schedule generators can add the matching recurrence delta. `last` is high
// while every active counter sits at its final value, so the step taken then
// ends the domain. Counters clear on `start`.
// Interface: `cfg_dims` active levels (1..ID_LEVELS), `cfg_extent` per level.
// Timing: counters update on the clock edge that samples `step`.
module amber_id #(
  parameter int unsigned LEVELS = 6,
  parameter int unsigned CW     = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        step,
  input  logic [2:0]                  cfg_dims,
  input  logic [LEVELS-1:0][CW-1:0]   cfg_extent,
  output logic [$clog2(LEVELS)-1:0]   inc_lvl,
  output logic                        last
);
  logic [LEVELS-1:0][CW-1:0] cnt;
  logic [LEVELS-1:0]         at_max;

  always_comb begin
    for (int k = 0; k < LEVELS; k++)
      at_max[k] = (k >= int'(cfg_dims)) || (cnt[k] == cfg_extent[k] - CW'(1));
    // lowest level that does not wrap
    inc_lvl = '0;
    for (int k = LEVELS-1; k >= 0; k--)
      if (!at_max[k]) inc_lvl = ($clog2(LEVELS))'(k);
    last = &at_max;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (start) cnt <= '0;
    else if (step && !last) begin
      for (int k = 0; k < LEVELS; k++) begin
        if (k < int'(inc_lvl))       cnt[k] <= '0;
        else if (k == int'(inc_lvl)) cnt[k] <= cnt[k] + CW'(1);
      end
    end
  end
endmodule
