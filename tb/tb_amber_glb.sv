// Self-checking testbench for the global buffer (16 tiles, 4 MB).
// Host writes to random tiles, banks and rows are read back through the
// tile-select multiplexer; then tile 5 alone streams a 4-word bitstream and
// only lane 5 of the configuration outputs may be active.
module tb_amber_glb;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic host_reg_we, host_en, host_we, host_bank, host_gnt, host_rvalid, err;
  logic [3:0] host_reg_tile, host_tile;
  logic [5:0] host_reg_addr;
  logic [15:0] host_reg_data;
  logic [13:0] host_row;
  logic [63:0] host_wdata, host_rdata;
  logic [15:0][15:0] ld_data;
  logic [15:0] ld_valid, col_start, cfg_valid, ld_busy, st_busy, cfg_busy;
  cfg_word_t [15:0] cfg_word;

  amber_glb dut (.clk, .rst_n, .host_reg_we, .host_reg_tile, .host_reg_addr, .host_reg_data,
    .host_en, .host_we, .host_tile, .host_bank, .host_row, .host_wdata, .host_gnt, .host_rdata,
    .host_rvalid, .ld_data, .ld_valid, .st_data('0), .st_valid('0), .col_start, .cfg_word, .cfg_valid,
    .ld_busy, .st_busy, .cfg_busy, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int lane5 = 0, other = 0;
  always @(posedge clk) begin
    if (cfg_valid[5]) lane5++;
    if (rst_n && |(cfg_valid & ~16'h20)) other++;
  end

  initial begin
    int t[40], b[40], r[40];
    logic [63:0] d[40];
    host_reg_we = 0; host_en = 0; host_we = 0; host_bank = 0; host_reg_tile = 0; host_tile = 0;
    host_reg_addr = 0; host_reg_data = 0; host_row = 0; host_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      t[i] = i % 16; b[i] = $urandom_range(0, 1); r[i] = 50 + i; d[i] = {$urandom, $urandom};
      @(negedge clk); host_en = 1; host_we = 1; host_tile = 4'(t[i]); host_bank = b[i];
      host_row = 14'(r[i]); host_wdata = d[i];
      #1; check(host_gnt, "write grant");
    end
    @(negedge clk); host_en = 0; host_we = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); host_en = 1; host_tile = 4'(t[i]); host_bank = b[i]; host_row = 14'(r[i]);
      @(posedge clk); #1; host_en = 0;
      check(host_rvalid && host_rdata == d[i], $sformatf("read back %0d", i));
    end
    // tile 5: bitstream of 4 words from bank 0 row 50 (written above: i = 5 if bank 0)
    @(negedge clk); host_reg_we = 1; host_reg_tile = 5; host_reg_addr = 43; host_reg_data = 50;
    @(negedge clk); host_reg_addr = 44; host_reg_data = 4;
    @(negedge clk); host_reg_addr = 42; host_reg_data = 16'(b[5] << 2);
    @(negedge clk); host_reg_addr = 45; host_reg_data = 2;
    @(negedge clk); host_reg_we = 0;
    repeat (20) @(negedge clk);
    check(lane5 == 4, $sformatf("lane 5 words %0d", lane5));
    check(other == 0, "other lanes quiet");
    check(!err, "err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
