// Self-checking testbench for the MEM tile core.
// Phase 1 (streaming): input 0 delivers 32 words and input 1 16 words on
// their schedules; the shared write generator stores them as 12 wide rows;
// the shared read controller fetches the rows on a schedule that collides
// with input 1's writes, so reads are delayed; output 0 must still deliver
// all 48 words in order, exactly on the cycles of its schedule.
// Phase 2 (chaining): output 0, idle, forwards the chain input.
// Phase 3 (ROM): a table is filled through input 0; input 1 then addresses it
// every cycle and output 0 must return the entry one cycle later.
// Phase 4 (dual): reads alternate between the two outputs.
module tb_amber_mem_core;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int tc;  // cycle index of the schedules (0 = first cycle after start)

  logic start, cfg_we, chain_valid_in, valid_out0, valid_out1, err;
  logic [6:0] cfg_addr;
  logic [15:0] cfg_data, data_in0, data_in1, chain_in, data_out0, data_out1;

  amber_mem_core dut (.clk, .rst_n, .start, .cfg_we, .cfg_addr, .cfg_data, .data_in0, .data_in1,
    .chain_in, .chain_valid_in, .data_out0, .data_out1, .valid_out0, .valid_out1, .err);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfgw(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 7'(a); cfg_data = 16'(d);
    @(negedge clk); cfg_we = 0;
  endtask
  // 14-register block: 1-level pattern
  task automatic half1(input int base, input int ext, input int off, input int dlt);
    cfgw(base, 1); cfgw(base + 1, ext); cfgw(base + 7, off); cfgw(base + 8, dlt);
  endtask
  // 21-register block: 1-level pattern with address and schedule
  task automatic full1(input int base, input int ext, input int aoff, input int adlt,
                       input int toff, input int tdlt);
    cfgw(base, 1); cfgw(base + 1, ext); cfgw(base + 7, aoff); cfgw(base + 8, adlt);
    cfgw(base + 14, toff); cfgw(base + 15, tdlt);
  endtask
  task automatic clear_cfg();
    for (int i = 0; i < 92; i++) cfgw(i, 0);
  endtask
  task automatic do_start();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
  endtask

  always_ff @(posedge clk) tc <= start ? 0 : tc + 1;

  int delayed = 0;
  always @(posedge clk) if (rst_n && dut.rd_fire && !dut.rd_go) delayed++;

  initial begin
    int n, exp_d, exp_t;
    logic [15:0] table_w [8];
    start = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0; chain_in = 0; chain_valid_in = 0;
    data_in0 = 0; data_in1 = 0;
    repeat (2) @(negedge clk); rst_n = 1;

    // ---------------- phase 1 ----------------
    half1(1, 32, 2, 1);      // input 0: cycles 2..33
    half1(15, 16, 38, 1);    // input 1: cycles 38..53
    half1(29, 48, 45, 1);    // output 0: cycles 45..92
    half1(57, 12, 16, 1);    // writes: rows 16..27
    full1(71, 12, 16, 1, 42, 4); // reads: rows 16..27 at 42, 46, ...
    do_start();
    n = 0;
    while (tc < 120) begin
      data_in0 = 16'(tc * 3 + 1);
      data_in1 = 16'(tc * 5 + 1000);
      @(posedge clk); #1;
      if (valid_out0) begin
        exp_d = (n < 32) ? (2 + n) * 3 + 1 : (38 + n - 32) * 5 + 1000;
        exp_t = 45 + n;
        check(data_out0 == 16'(exp_d), $sformatf("out %0d data %0d vs %0d", n, data_out0, exp_d));
        check(tc == exp_t, $sformatf("out %0d cycle %0d vs %0d", n, tc, exp_t));
        n++;
      end
      @(negedge clk);
    end
    check(n == 48, $sformatf("phase 1 word count %0d", n));
    check(delayed > 0, "no read was delayed by a write");
    check(!err, "phase 1 err");

    // ---------------- phase 2: chaining ----------------
    cfgw(0, 32'h4);          // chain on output 0
    chain_in = 16'hBEEF; chain_valid_in = 1;
    @(negedge clk);
    check(valid_out0 && data_out0 == 16'hBEEF, "chain forward");
    chain_valid_in = 0; chain_in = 0;

    // ---------------- phase 3: ROM ----------------
    clear_cfg();
    for (int i = 0; i < 8; i++) table_w[i] = 16'($urandom);
    cfgw(0, 1);              // ROM mode
    half1(1, 8, 0, 1);       // input 0: cycles 0..7
    half1(57, 2, 0, 1);      // rows 0..1
    do_start();
    while (tc < 10) begin
      data_in0 = (tc < 8) ? table_w[tc] : 16'd0;
      @(negedge clk);
    end
    for (int i = 0; i < 20; i++) begin
      int a;
      a = $urandom_range(0, 7);
      data_in1 = 16'(a);
      @(posedge clk); #1;
      @(negedge clk);
      check(valid_out0 && data_out0 == table_w[a], $sformatf("rom[%0d] %h vs %h", a, data_out0, table_w[a]));
    end

    // ---------------- phase 4: dual outputs ----------------
    clear_cfg();
    cfgw(0, 32'h10);         // dual
    half1(1, 16, 0, 1);      // input 0: cycles 0..15 -> rows 0..3
    half1(57, 4, 0, 1);
    full1(71, 4, 0, 1, 20, 1);  // reads at 20..23, alternating outputs
    half1(29, 8, 24, 1);     // output 0: rows 0,2
    half1(43, 8, 24, 1);     // output 1: rows 1,3
    do_start();
    n = 0;
    while (tc < 40) begin
      data_in0 = 16'(tc + 500);
      @(posedge clk); #1;
      if (valid_out0 && valid_out1) begin
        int r0, r1;
        r0 = (n / 4) * 2; r1 = r0 + 1;
        check(data_out0 == 16'(500 + r0 * 4 + n % 4), $sformatf("dual out0 %0d", n));
        check(data_out1 == 16'(500 + r1 * 4 + n % 4), $sformatf("dual out1 %0d", n));
        n++;
      end
      @(negedge clk);
    end
    check(n == 8, $sformatf("dual count %0d", n));
    check(!err, "phase 4 err");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
