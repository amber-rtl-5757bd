// Self-checking testbench for the GLB configuration unit: streams 37 words
// (an odd count) from a bank model. With the bank always granted, it must
// send one word per cycle (37 words in 37 consecutive cycles after the first);
// with random refusals, the word order must still be exact.
module tb_amber_glb_pcfg;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, rd_req, gnt, word_v, busy;
  logic [13:0] row0, rd_row;
  logic [15:0] count;
  logic [63:0] rd_data;
  cfg_word_t word;
  logic [63:0] mem [64];
  bit random_gnt;

  amber_glb_pcfg dut (.clk, .rst_n, .start, .row0, .count, .rd_req, .gnt, .rd_row, .rd_data,
    .word, .word_v, .busy);
  always_comb gnt = random_gnt ? ($urandom_range(0, 2) != 0) : 1'b1;
  always_ff @(posedge clk) if (rd_req && gnt) rd_data <= mem[rd_row[5:0]];

  task automatic run(input bit rg);
    int n, first, last;
    random_gnt = rg;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 0; first = -1; last = -1;
    for (int c = 0; c < 300 && n < 37; c++) begin
      @(posedge clk); #1;
      if (word_v) begin
        logic [27:0] e;
        e = ((n % 2) == 0) ? mem[3 + n / 2][27:0] : mem[3 + n / 2][59:32];
        checks++;
        if (word !== cfg_word_t'(e)) begin failures++; $display("FAIL: word %0d", n); end
        if (first < 0) first = c;
        last = c;
        n++;
      end
    end
    checks++;
    if (n != 37) begin failures++; $display("FAIL: count %0d", n); end
    if (!rg) begin
      checks++;
      if (last - first != 36) begin failures++; $display("FAIL: rate, %0d cycles", last - first + 1); end
    end
    @(posedge clk); #1;
    checks++;
    if (busy || word_v) begin failures++; $display("FAIL: not idle at end"); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = {$urandom, $urandom};
    start = 0; row0 = 3; count = 37; random_gnt = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
