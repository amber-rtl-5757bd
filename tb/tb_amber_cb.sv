// Self-checking testbench for the connection box: every select value picks
// its track, and out-of-range selects give zero.
module tb_amber_cb;
  int checks = 0, failures = 0;
  logic [19:0][15:0] tracks;
  logic [4:0] sel;
  logic [15:0] out;
  amber_cb #(.W(16), .NIN(20)) dut (.tracks, .sel, .out);
  initial begin
    repeat (10) begin
      for (int i = 0; i < 20; i++) tracks[i] = 16'($urandom);
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s); #1;
        checks++;
        if (out !== ((s < 20) ? tracks[s] : 16'h0)) begin failures++; $display("FAIL: sel %0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
