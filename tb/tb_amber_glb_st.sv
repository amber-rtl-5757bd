// Self-checking testbench for the GLB store unit: words arriving with random
// gaps are written into a bank model at a 2-level affine address sequence;
// the model is compared afterwards word by word.
module tb_amber_glb_st;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, in_valid, wr_en, busy;
  logic [15:0] in_data;
  logic [13:0] wr_row;
  logic [63:0] wr_data;
  logic [3:0] wr_mask;
  affine_cfg_t cfg;
  logic [63:0] mem [64];
  logic [15:0] sent [24];

  amber_glb_st dut (.clk, .rst_n, .start, .cfg, .in_data, .in_valid, .wr_en, .wr_row, .wr_data, .wr_mask, .busy);
  always_ff @(posedge clk) if (wr_en)
    for (int l = 0; l < 4; l++) if (wr_mask[l]) mem[wr_row[5:0]][16*l +: 16] <= wr_data[16*l +: 16];

  initial begin
    int ea;
    for (int i = 0; i < 64; i++) mem[i] = '0;
    start = 0; in_valid = 0; in_data = 0; cfg = '0;
    // 6 x 4: x stride 1, y stride 8 (rows of a 2-D tile)
    cfg.dims = 2; cfg.extent[0] = 6; cfg.extent[1] = 4;
    cfg.addr_off = 2; cfg.addr_dlt[0] = 1; cfg.addr_dlt[1] = 16'(8 - 5);
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int n = 0; n < 24; n++) begin
      while ($urandom_range(0, 1) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = 16'($urandom); sent[n] = in_data;
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    for (int n = 0; n < 24; n++) begin
      ea = 2 + (n % 6) + 8 * (n / 6);
      checks++;
      if (mem[ea / 4][16 * (ea % 4) +: 16] !== sent[n]) begin failures++; $display("FAIL: word %0d", n); end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL: busy at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
