// Self-checking testbench for a CGRA tile (PE variant).
// Configures the tile over the column bus: 16-bit CB 0 from north track 0,
// CB 1 from west track 2, ALU = ADD, south track 1 driven by the ALU, east
// 1-bit track 0 fed through from the west. Checks the routed sum and the
// feed-through, that a write addressed to another row changes nothing, and
// that enabling the switch-box register delays the output by one cycle.
module tb_amber_tile;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cfg_bus_t cfg;
  logic [3:0][4:0][15:0] in16, out16;
  logic [3:0][4:0] in1, out1;
  logic err;

  amber_tile #(.IS_MEM(1'b0)) dut (.clk, .rst_n, .start(1'b0), .tile_row(4'd3), .cfg, .in16, .in1,
    .out16, .out1, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic cfgw(input int row, input int a, input int d);
    @(negedge clk); cfg.we = 1; cfg.row = 4'(row); cfg.reg_a = 7'(a); cfg.data = 16'(d);
    @(negedge clk); cfg.we = 0;
  endtask

  initial begin
    logic [15:0] prev;
    cfg = '0; in16 = '0; in1 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    cfgw(3, 10, 0);                 // CB16 0 <- N track 0
    cfgw(3, 11, 3 * 5 + 2);         // CB16 1 <- W track 2
    cfgw(3, 16 + 0, int'(OP_ADD));  // core reg 0
    cfgw(3, 2, 4 << 12);            // wire 11 = S track 1 <- core 0
    cfgw(3, 6, 2 << 4);             // wire 25 = 1-bit E track 0 <- W
    cfgw(5, 2, 0);                  // other row: ignored
    repeat (50) begin
      for (int s = 0; s < 4; s++) for (int t = 0; t < 5; t++) in16[s][t] = 16'($urandom);
      in1 = 20'($urandom);
      #1;
      check(out16[2][1] == 16'(in16[0][0] + in16[3][2]), "routed ADD");
      check(out1[1][0] == in1[3][0], "1-bit feed-through");
      check(out16[0][0] == 0, "unused wire is zero");
      @(negedge clk);
    end
    cfgw(3, 2, (4 + 8) << 12);      // enable the register on S track 1
    prev = 16'(in16[0][0] + in16[3][2]);
    repeat (20) begin
      for (int s = 0; s < 4; s++) for (int t = 0; t < 5; t++) in16[s][t] = 16'($urandom);
      #1;
      check(out16[2][1] == prev, "registered wire");
      prev = 16'(in16[0][0] + in16[3][2]);
      @(negedge clk);
    end
    check(!err, "PE tile err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
