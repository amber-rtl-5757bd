// Self-checking testbench for the PE core.
// Checks the three operand modes (bypass, one-cycle delay, constant), the
// 3-input LUT feeding the ALU carry (ADC) and the 1-bit output, the COND
// unit, and the 64-byte register file used as a reversing buffer: eight words
// written on cycles 0..7 must come back in reverse order, one cycle after
// their read cycles 10..17.
module tb_amber_pe_core;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, tc;
  logic start, cfg_we, cond_out, lut_out, rf_valid;
  logic [6:0] cfg_addr;
  logic [15:0] cfg_data, data0, data1, alu_out, rf_out;
  logic [2:0] bit_in;

  amber_pe_core dut (.clk, .rst_n, .start, .cfg_we, .cfg_addr, .cfg_data, .data0, .data1, .bit_in,
    .alu_out, .rf_out, .cond_out, .lut_out, .rf_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic cfgw(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 7'(a); cfg_data = 16'(d);
    @(negedge clk); cfg_we = 0;
  endtask
  function automatic int r0(input alu_op_e o, input int m0, input int m1, input int bd);
    return int'(o) | (m0 << 6) | (m1 << 8) | (bd << 10);
  endfunction

  always_ff @(posedge clk) tc <= start ? 0 : tc + 1;

  initial begin
    logic [15:0] prev, x, y;
    logic [2:0] bb;
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0; data0 = 0; data1 = 0; bit_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // ADD with constant operand 1
    cfgw(0, r0(OP_ADD, 0, 2, 0)); cfgw(3, 7);
    repeat (20) begin
      data0 = 16'($urandom); data1 = 16'($urandom); #1;
      check(alu_out == 16'(data0 + 7), "ADD const");
      @(negedge clk);
    end
    // SUB with operand 0 delayed by one cycle; COND = zero flag
    cfgw(0, r0(OP_SUB, 1, 0, 0)); cfgw(1, int'(C_Z));
    prev = data0;   // the delay register holds the last value driven
    repeat (20) begin
      x = 16'($urandom); data0 = x;
      data1 = ($urandom_range(0, 1) == 1) ? prev : 16'($urandom); #1;
      check(alu_out == 16'(prev - data1), "SUB delayed");
      check(cond_out == (prev == data1), "COND zero");
      @(negedge clk);
      prev = x;
    end
    // ADC: carry from LUT = XOR of the three bits; LUT also on COND (C_LUT)
    cfgw(0, r0(OP_ADC, 0, 0, 0)); cfgw(1, int'(C_LUT) | (8'h96 << 8));
    repeat (20) begin
      x = 16'($urandom); y = 16'($urandom); bb = 3'($urandom);
      data0 = x; data1 = y; bit_in = bb; #1;
      check(lut_out == ^bb && cond_out == ^bb, "LUT");
      check(alu_out == 16'(x + y + 16'(^bb)), "ADC with LUT carry");
      @(negedge clk);
    end
    // register file: write cycles 0..7 at 0..7, read 7..0 at cycles 10..17
    cfgw(4, 1); cfgw(5, 8); cfgw(11, 0); cfgw(12, 1); cfgw(18, 0); cfgw(19, 1);
    cfgw(25, 1); cfgw(26, 8); cfgw(32, 7); cfgw(33, 16'hFFFF); cfgw(39, 10); cfgw(40, 1);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    begin
      int n;
      n = 0;
      while (tc < 30) begin
        data0 = 16'(tc * 11 + 3);
        @(posedge clk); #1;
        if (rf_valid) begin
          check(rf_out == 16'((7 - n) * 11 + 3), $sformatf("RF word %0d = %0d", n, rf_out));
          check(tc == 11 + n, $sformatf("RF timing %0d at %0d", n, tc));
          n++;
        end
        @(negedge clk);
      end
      check(n == 8, "RF count");
    end
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
