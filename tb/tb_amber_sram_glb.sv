// Self-checking testbench for the GLB bank (16384 x 64 = 128 KB).
// Writes random rows, overwrites single 16-bit lanes through the write mask,
// reads everything back against a model array, and checks the one-cycle
// read latency.
module tb_amber_sram_glb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic en, we;
  logic [3:0] wmask;
  logic [13:0] addr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [16384];

  amber_sram_sp #(.DEPTH(16384)) dut (.clk, .en, .we, .wmask, .addr, .wdata, .rdata);

  initial begin
    en = 0; we = 0; wmask = '1; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 16384; i++) begin
      en = 1; we = 1; wmask = '1; addr = 14'(i); wdata = {$urandom, $urandom};
      model[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 100; i++) begin
      en = 1; we = 1; addr = 14'($urandom_range(0, 16383)); wmask = 4'b1 << $urandom_range(0, 3);
      wdata = {$urandom, $urandom};
      for (int l = 0; l < 4; l++) if (wmask[l]) model[addr][16*l +: 16] = wdata[16*l +: 16];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 16384; i++) begin
      en = 1; addr = 14'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL: row %0d %h vs %h", i, rdata, model[i]); end
      @(negedge clk);
    end
    // data holds when not reading
    en = 0; addr = 0;
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[16383]) begin failures++; $display("FAIL: hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
