// Serial-in parallel-out converter of the MEM tile (16-bit in, 64-bit out).
//
// Collects four consecutive 16-bit words (first word in the low lane) into one
// 64-bit word for a wide SRAM write. When the fourth word arrives the full word
// is copied into an output holding register and `full` rises; it stays up
// until the write port takes it with `take`, while the next four words are
// already being collected. `overflow` flags a completed word that found the
// holding register still occupied (the schedule was wrong).
// Timing: one input word per cycle at most; `full` rises the cycle after the
// fourth word.
module amber_sipo #(
  parameter int unsigned IN_W = 16,
  parameter int unsigned N    = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              in_valid,
  input  logic [IN_W-1:0]   in_data,
  input  logic              take,
  output logic              full,
  output logic [N*IN_W-1:0] out_data,
  output logic              overflow
);
  logic [N-1:0][IN_W-1:0]  shreg;
  logic [$clog2(N)-1:0]    idx;
  logic                    complete;

  assign complete = in_valid && (idx == ($clog2(N))'(N-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0; idx <= '0; full <= 1'b0; out_data <= '0; overflow <= 1'b0;
    end else if (clr) begin
      idx <= '0; full <= 1'b0; overflow <= 1'b0;
    end else begin
      if (in_valid) begin
        shreg[idx] <= in_data;
        idx <= idx + 1'b1;
      end
      if (complete) begin
        out_data <= {in_data, shreg[N-2:0]};
        full     <= 1'b1;
        if (full && !take) overflow <= 1'b1;
      end else if (take) begin
        full <= 1'b0;
      end
    end
  end
endmodule
