// Parallel-in serial-out converter of the MEM tile (64-bit in, 16-bit out).
//
// Holds one 64-bit word fetched from the SRAM and a second one behind it, and
// hands out 16-bit lanes, low lane first, one on each cycle `out_ready` is
// high. `need` asks for a new wide word while the back buffer is empty, so the
// read port can fetch ahead of the consumer. `load` writes the fetched word.
// `out_valid` is low when no data is left (an underrun).
// Timing: `out_data` is valid in the cycle `out_valid` is high; the lane
// advances on the clock edge where `out_ready` is high.
module amber_piso #(
  parameter int unsigned OUT_W = 16,
  parameter int unsigned N     = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               load,
  input  logic [N*OUT_W-1:0] in_data,
  input  logic               out_ready,
  output logic               out_valid,
  output logic [OUT_W-1:0]   out_data,
  output logic               need
);
  logic [N-1:0][OUT_W-1:0] cur, nxt;
  logic                    cur_v, nxt_v;
  logic [$clog2(N)-1:0]    idx;
  logic                    pop_last;

  assign out_valid = cur_v;
  assign out_data  = cur[idx];
  assign pop_last  = cur_v && out_ready && (idx == ($clog2(N))'(N-1));
  assign need      = !nxt_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0; nxt <= '0; cur_v <= 1'b0; nxt_v <= 1'b0; idx <= '0;
    end else if (clr) begin
      cur_v <= 1'b0; nxt_v <= 1'b0; idx <= '0;
    end else begin
      if (cur_v && out_ready) idx <= idx + 1'b1;
      // current word: refill from back buffer or straight from the SRAM
      if (!cur_v || pop_last) begin
        if (nxt_v) begin
          cur <= nxt; cur_v <= 1'b1;
          nxt_v <= load;
          if (load) nxt <= in_data;
        end else if (load) begin
          cur <= in_data; cur_v <= 1'b1;
        end else begin
          cur_v <= 1'b0;
        end
      end else if (load) begin
        nxt <= in_data; nxt_v <= 1'b1;
      end
    end
  end
endmodule
