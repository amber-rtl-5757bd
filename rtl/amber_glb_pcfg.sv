// GLB configuration unit: streams a bitstream from a global-buffer bank into
// the configuration network.
//
// The bitstream shares the banks with application data. Each 64-bit row holds
// two 28-bit configuration words (bits 27:0 first, then 59:32). After `start`
// the unit reads `count` words beginning at row `row0`, fetching the next row
// while it sends the second word of the current one, so with the bank granted
// it delivers one word per cycle (the first word of an arriving row goes
// straight through). A refused request (`gnt` low) is retried.
// Timing: first word two cycles after `start` when granted; `busy` until the
// last word has been sent.
// The per-tile configuration stream stored in the GLB follows the design
// description; the word packing is this design's choice.
module amber_glb_pcfg
  import amber_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [13:0] row0,
  input  logic [15:0] count,
  output logic        rd_req,
  input  logic        gnt,
  output logic [13:0] rd_row,
  input  logic [63:0] rd_data,
  output cfg_word_t   word,
  output logic        word_v,
  output logic        busy
);
  logic [63:0] buffer;
  logic [1:0]  bcnt;      // words left in buffer
  logic        hsel;      // next word is the high half
  logic        pend;      // read in flight
  logic [1:0]  pend_n;    // words in the row in flight
  logic [15:0] remain;    // words still to send
  logic [15:0] to_fetch;  // words not yet fetched

  assign busy   = (remain != 0);
  // a row arriving from the bank sends its first word straight through
  assign word_v = (bcnt != 0) || pend;
  assign word   = (bcnt == 0) ? cfg_word_t'(rd_data[27:0])
                : hsel ? cfg_word_t'(buffer[59:32]) : cfg_word_t'(buffer[27:0]);
  assign rd_req = (to_fetch != 0) && !pend && (bcnt != 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer <= '0; bcnt <= '0; hsel <= 1'b0; pend <= 1'b0; pend_n <= '0;
      remain <= '0; to_fetch <= '0; rd_row <= '0;
    end else if (start) begin
      bcnt <= '0; hsel <= 1'b0; pend <= 1'b0;
      remain <= count; to_fetch <= count; rd_row <= row0;
    end else begin
      pend <= rd_req && gnt;
      if (rd_req && gnt) begin
        rd_row   <= rd_row + 14'd1;
        pend_n   <= (to_fetch >= 16'd2) ? 2'd2 : 2'd1;
        to_fetch <= (to_fetch >= 16'd2) ? to_fetch - 16'd2 : 16'd0;
      end
      if (pend) begin
        buffer <= rd_data;
        bcnt   <= pend_n - 2'd1;
        hsel   <= 1'b1;
        remain <= remain - 16'd1;
      end else if (bcnt != 0) begin
        bcnt   <= bcnt - 2'd1;
        hsel   <= 1'b1;
        remain <= remain - 16'd1;
      end
    end
  end

  logic unused;
  assign unused = ^{buffer[63:60], buffer[31:28]};
endmodule
