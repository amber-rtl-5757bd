// Self-checking testbench for a GLB tile.
// The host fills bank 0 with data and bank 1 with a 9-word bitstream, then
// programs the load unit (32 words from bank 0), the store unit (32 words into
// bank 1) and the configuration unit, and issues run and configure together.
// The load stream is looped back into the store port, so the store unit and
// the configuration unit contend for bank 1. Checks the load stream's timing,
// the bitstream words, the stored copy read back by the host, and no error.
module tb_amber_glb_tile;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic host_reg_we, host_en, host_we, host_bank, host_gnt, host_rvalid;
  logic [5:0] host_reg_addr;
  logic [15:0] host_reg_data, ld_data;
  logic [13:0] host_row;
  logic [63:0] host_wdata, host_rdata;
  logic ld_valid, col_start, cfg_valid, ld_busy, st_busy, cfg_busy, err;
  cfg_word_t cfg_word;
  logic [63:0] data_rows [8], cfg_rows [5];

  amber_glb_tile dut (.clk, .rst_n, .host_reg_we, .host_reg_addr, .host_reg_data, .host_en, .host_we,
    .host_bank, .host_row, .host_wdata, .host_gnt, .host_rdata, .host_rvalid,
    .ld_data, .ld_valid, .st_data(ld_data), .st_valid(ld_valid), .col_start,
    .cfg_word, .cfg_valid, .ld_busy, .st_busy, .cfg_busy, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic regw(input int a, input int d);
    @(negedge clk); host_reg_we = 1; host_reg_addr = 6'(a); host_reg_data = 16'(d);
    @(negedge clk); host_reg_we = 0;
  endtask
  task automatic memw(input logic b, input int row, input logic [63:0] d);
    @(negedge clk); host_en = 1; host_we = 1; host_bank = b; host_row = 14'(row); host_wdata = d;
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_en = 0; host_we = 0;
  endtask
  task automatic memr(input logic b, input int row, output logic [63:0] d);
    @(negedge clk); host_en = 1; host_we = 0; host_bank = b; host_row = 14'(row);
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(posedge clk); #1; host_en = 0;
    d = host_rdata;
  endtask

  int ld_n = 0, cfg_n = 0, t_run = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (col_start) t_run <= cyc;
    if (ld_valid) begin
      checks += 2;
      if (ld_data !== data_rows[ld_n / 4][16 * (ld_n % 4) +: 16]) begin failures++; $display("FAIL: ld %0d", ld_n); end
      if (cyc - t_run != ld_n + 2) begin failures++; $display("FAIL: ld %0d at %0d", ld_n, cyc - t_run); end
      ld_n <= ld_n + 1;
    end
    if (cfg_valid) begin
      checks++;
      if (cfg_word !== cfg_word_t'((cfg_n % 2 == 0) ? cfg_rows[cfg_n / 2][27:0] : cfg_rows[cfg_n / 2][59:32])) begin
        failures++; $display("FAIL: cfg word %0d", cfg_n);
      end
      cfg_n <= cfg_n + 1;
    end
  end

  initial begin
    logic [63:0] d;
    host_reg_we = 0; host_reg_addr = 0; host_reg_data = 0; host_en = 0; host_we = 0; host_bank = 0;
    host_row = 0; host_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin data_rows[i] = {$urandom, $urandom}; memw(0, i, data_rows[i]); end
    for (int i = 0; i < 5; i++) begin cfg_rows[i] = {$urandom, $urandom}; memw(1, 100 + i, cfg_rows[i]); end
    // load: 32 words, cycles 0..31
    regw(0, 1); regw(1, 32); regw(7, 0); regw(8, 1); regw(14, 0); regw(15, 1);
    // store: 32 words at 0..31
    regw(21, 1); regw(22, 32); regw(28, 0); regw(29, 1);
    regw(42, 3'b110);            // load bank 0, store bank 1, bitstream bank 1
    regw(43, 100); regw(44, 9);
    regw(45, 3);                 // run + configure
    repeat (60) @(negedge clk);
    check(ld_n == 32, $sformatf("load count %0d", ld_n));
    check(cfg_n == 9, $sformatf("bitstream count %0d", cfg_n));
    check(!ld_busy && !st_busy && !cfg_busy, "idle");
    for (int i = 0; i < 8; i++) begin
      memr(1, i, d);
      check(d == data_rows[i], $sformatf("stored row %0d", i));
    end
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
