// Self-checking testbench for the GLB load unit: a 2-level pattern over a
// bank model (one-cycle read latency). Each word must match the model at the
// affine address and leave one cycle after its scheduled cycle.
module tb_amber_glb_ld;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, tc;
  logic start, rd_en, out_valid, busy;
  logic [13:0] rd_row;
  logic [63:0] rd_data;
  logic [15:0] out_data;
  affine_cfg_t cfg;
  logic [63:0] mem [256];

  amber_glb_ld dut (.clk, .rst_n, .start, .cfg, .rd_en, .rd_row, .rd_data, .out_data, .out_valid, .busy);
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_row[7:0]];
  always_ff @(posedge clk) tc <= start ? 0 : tc + 1;

  initial begin
    int n, ea, et;
    for (int i = 0; i < 256; i++) mem[i] = {$urandom, $urandom};
    start = 0; cfg = '0;
    // x: 0..9 stride 3, y: 0..3 stride 50; times x*1 + y*12, start 4
    cfg.dims = 2; cfg.extent[0] = 10; cfg.extent[1] = 4;
    cfg.addr_off = 5; cfg.addr_dlt[0] = 3; cfg.addr_dlt[1] = 16'(50 - 27);
    cfg.sch_off = 4; cfg.sch_dlt[0] = 1; cfg.sch_dlt[1] = 16'(12 - 9);
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 0;
    while (tc < 80) begin
      @(posedge clk); #1;
      if (out_valid) begin
        ea = 5 + 3 * (n % 10) + 50 * (n / 10);
        et = 4 + (n % 10) + 12 * (n / 10) + 1;
        checks += 2;
        if (out_data !== mem[ea / 4][16 * (ea % 4) +: 16]) begin failures++; $display("FAIL: word %0d", n); end
        if (tc != et) begin failures++; $display("FAIL: word %0d at %0d, expected %0d", n, tc, et); end
        n++;
      end
    end
    checks++;
    if (n != 40 || busy) begin failures++; $display("FAIL: count %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
