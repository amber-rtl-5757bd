// Self-checking testbench for the CGRA array (4 x 4 here: columns 0..2 PE,
// column 3 MEM). Configures a route through both halves of the column
// configuration buses: column 0's north port -> PE(0,0) adds 1 -> east to
// column 1 -> down to row 3 -> east to the MEM tile (3,3), which buffers
// 16 words as 4 wide rows and replays them on its output schedule -> north
// through (3,2..0) to column 3's north port, data on the 16-bit network and
// the MEM's valid on the 1-bit network. Checks every word and its cycle.
module tb_amber_cgra;
  import amber_pkg::*;
  localparam int NC = 4, NR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, tc;
  logic [NC-1:0] start;
  cfg_bus_t [NC-1:0] cfg_top, cfg_bot;
  logic [NC-1:0][15:0] io_in16, io_out16;
  logic [NC-1:0] io_in1, io_out1;
  logic err;
  logic [15:0] sh [NC][NR][10];

  amber_cgra #(.NCOL(NC), .NROW(NR)) dut (.clk, .rst_n, .start, .cfg_top, .cfg_bot, .io_in16, .io_in1,
    .io_out16, .io_out1, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic cfgw(input int c, input int r, input int a, input int d);
    @(negedge clk);
    cfg_top[c] = '{we: 1'b1, row: 4'(r), reg_a: 7'(a), data: 16'(d)};
    @(negedge clk);
    cfg_top[c] = '0;
    cfg_bot[c] = '{we: 1'b1, row: 4'(r), reg_a: 7'(a), data: 16'(d)};
    @(negedge clk);
    cfg_bot[c] = '0;
  endtask
  // switch-box wire: width 0 = 16 bit, 1 = 1 bit; sides 0..3 = N E S W
  task automatic sbw(input int c, input int r, input int w, input int side, input int trk, input int sel);
    int o;
    o = (w * 4 + side) * 5 + trk;
    sh[c][r][o / 4][4 * (o % 4) +: 4] = 4'(sel);
    cfgw(c, r, o / 4, sh[c][r][o / 4]);
  endtask

  always_ff @(posedge clk) tc <= start[3] ? 0 : tc + 1;

  initial begin
    int n;
    start = 0; cfg_top = '0; cfg_bot = '0; io_in16 = '0; io_in1 = '0;
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) for (int i = 0; i < 10; i++) sh[c][r][i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // PE (0,0): a = north track 0, b = constant 1, ADD; east track 0 <- ALU
    cfgw(0, 0, 10, 0);
    cfgw(0, 0, 16 + 0, int'(OP_ADD) | (2 << 8));
    cfgw(0, 0, 16 + 3, 1);
    sbw(0, 0, 0, 1, 0, 4);
    // column 1: (1,0) south <- west; (1,1),(1,2) south <- north; (1,3) east <- north
    sbw(1, 0, 0, 2, 0, 1);
    sbw(1, 1, 0, 2, 0, 2);
    sbw(1, 2, 0, 2, 0, 2);
    sbw(1, 3, 0, 1, 0, 3);
    sbw(2, 3, 0, 1, 0, 2);      // (2,3) east <- west
    // MEM (3,3): input 0 <- west track 0
    cfgw(3, 3, 10, 3 * 5 + 0);
    cfgw(3, 3, 16 + 1, 1);  cfgw(3, 3, 16 + 2, 16); cfgw(3, 3, 16 + 8, 2);  cfgw(3, 3, 16 + 9, 1);   // in0: 2..17
    cfgw(3, 3, 16 + 57, 1); cfgw(3, 3, 16 + 58, 4); cfgw(3, 3, 16 + 64, 0); cfgw(3, 3, 16 + 65, 1);  // rows 0..3
    cfgw(3, 3, 16 + 71, 1); cfgw(3, 3, 16 + 72, 4); cfgw(3, 3, 16 + 78, 0); cfgw(3, 3, 16 + 79, 1);
    cfgw(3, 3, 16 + 85, 20); cfgw(3, 3, 16 + 86, 4);                                                  // reads 20,24,..
    cfgw(3, 3, 16 + 29, 1); cfgw(3, 3, 16 + 30, 16); cfgw(3, 3, 16 + 36, 22); cfgw(3, 3, 16 + 37, 1); // out0: 22..37
    sbw(3, 3, 0, 0, 0, 4);      // north <- MEM output 0
    sbw(3, 3, 1, 0, 0, 4);      // 1-bit north <- valid 0
    for (int r = 0; r < 3; r++) begin
      sbw(3, r, 0, 0, 0, 2);    // north <- south
      sbw(3, r, 1, 0, 0, 2);
    end
    @(negedge clk); start = '1; @(negedge clk); start = '0;
    n = 0;
    while (tc < 60) begin
      io_in16[0] = 16'(tc * 7 + 3);
      #1;
      if (io_out1[3]) begin
        check(io_out16[3] == 16'((2 + n) * 7 + 3 + 1), $sformatf("word %0d: %0d", n, io_out16[3]));
        check(tc == 22 + n, $sformatf("word %0d cycle %0d", n, tc));
        n++;
      end
      @(negedge clk);
    end
    check(n == 16, $sformatf("word count %0d", n));
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
