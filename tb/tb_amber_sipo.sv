// Self-checking testbench for the 16-to-64-bit SIPO.
// Feeds random words with random gaps, takes completed words with a delay,
// checks lane order against a model, and checks that a word completed while
// the previous one is still held raises `overflow`.
module tb_amber_sipo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, in_valid, take, full, overflow;
  logic [15:0] in_data;
  logic [63:0] out_data;
  logic [15:0] q[$];

  amber_sipo dut (.clk, .rst_n, .clr, .in_valid, .in_data, .take, .full, .out_data, .overflow);

  initial begin
    logic [63:0] exp_w;
    clr = 0; in_valid = 0; take = 0; in_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      for (int i = 0; i < 4; i++) begin
        while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = 16'($urandom); q.push_back(in_data);
        @(negedge clk);
      end
      in_valid = 0;
      checks++;
      if (!full) begin failures++; $display("FAIL: not full after word %0d", w); end
      exp_w = {q[3], q[2], q[1], q[0]};
      repeat (4) void'(q.pop_front());
      checks++;
      if (out_data !== exp_w) begin failures++; $display("FAIL: word %0d %h vs %h", w, out_data, exp_w); end
      take = 1; @(negedge clk); take = 0;
      checks++;
      if (full) begin failures++; $display("FAIL: full after take"); end
    end
    checks++;
    if (overflow) begin failures++; $display("FAIL: spurious overflow"); end
    // two words without a take -> overflow
    for (int i = 0; i < 8; i++) begin in_valid = 1; in_data = 16'(i); @(negedge clk); end
    in_valid = 0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL: overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
