// Self-checking testbench for the 64-to-16-bit PISO.
// A producer loads wide words whenever `need` is high (one-cycle latency, as
// from the SRAM); a consumer pops lanes at random. Checks lane order and that
// a consumer popping every cycle sees no gap (one 16-bit word per cycle).
module tb_amber_piso;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr, load, out_ready, out_valid, need, pend;
  logic [63:0] in_data;
  logic [15:0] out_data;
  logic [15:0] q[$];
  int n_out = 0, gaps = 0;
  logic full_rate;

  amber_piso dut (.clk, .rst_n, .clr, .load, .in_data, .out_ready, .out_valid, .out_data, .need);

  // producer: request when need and none pending; data one cycle later
  always_ff @(posedge clk) begin
    if (!rst_n) pend <= 0;
    else pend <= need && !pend;
  end
  always_comb load = pend;
  always @(posedge clk) if (rst_n && pend) begin
    for (int l = 0; l < 4; l++) q.push_back(in_data[16*l +: 16]);
  end
  always @(negedge clk) in_data <= {$urandom, $urandom};

  always @(posedge clk) if (rst_n) begin
    if (out_ready && out_valid) begin
      checks++;
      if (out_data !== q[0]) begin failures++; $display("FAIL: out %h vs %h", out_data, q[0]); end
      void'(q.pop_front());
      n_out++;
    end
    if (full_rate && out_ready && !out_valid && n_out > 0) gaps++;
  end

  initial begin
    clr = 0; out_ready = 0; full_rate = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (400) begin out_ready = ($urandom_range(0, 1) == 1); @(negedge clk); end
    full_rate = 1;
    repeat (400) begin out_ready = 1; @(negedge clk); end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL: %0d gaps at full rate", gaps); end
    // at full rate every one of the last 400 cycles must deliver a word
    checks++;
    if (n_out < 500) begin failures++; $display("FAIL: only %0d words delivered", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
