// Self-checking testbench for the affine streaming controller.
// Runs a 3-level pattern with the schedule generator and compares every
// access's address and cycle with nested loops evaluated here with the
// plain (multiplying) affine formula; then runs the same domain stepped
// externally and checks the addresses and the end of the pattern.
module tb_amber_stream_ctrl;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  affine_cfg_t cfg;
  logic start, ext_step, v_sg, v_ext, busy_sg, busy_ext;
  logic [CNT_W-1:0] a_sg, a_ext;

  amber_stream_ctrl #(.USE_SG(1'b1)) dut_sg (.clk, .rst_n, .cfg, .start, .ext_step(1'b0),
    .valid(v_sg), .addr(a_sg), .busy(busy_sg));
  amber_stream_ctrl #(.USE_SG(1'b0)) dut_ext (.clk, .rst_n, .cfg, .start, .ext_step,
    .valid(v_ext), .addr(a_ext), .busy(busy_ext));

  // pattern: x in 0..3 (sx=1, tx=2), y in 0..2 (sy=16, ty=10), z in 0..1 (sz=100, tz=40)
  int ext[3] = '{4, 3, 2};
  int s[3]   = '{1, 16, 100};
  int t[3]   = '{2, 10, 40};
  int off = 7, t0 = 5;
  int exp_addr[$], exp_time[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n, t_start, da, dt;
    cfg = '0;
    cfg.dims = 3;
    for (int k = 0; k < 3; k++) cfg.extent[k] = 16'(ext[k]);
    cfg.addr_off = 16'(off);
    cfg.sch_off  = 16'(t0);
    // recurrence deltas: d_k = s_k - sum_{j<k} s_j*(ext_j-1)
    for (int k = 0; k < 3; k++) begin
      da = s[k]; dt = t[k];
      for (int j = 0; j < k; j++) begin da -= s[j]*(ext[j]-1); dt -= t[j]*(ext[j]-1); end
      cfg.addr_dlt[k] = 16'(da);
      cfg.sch_dlt[k]  = 16'(dt);
    end
    for (int z = 0; z < 2; z++) for (int y = 0; y < 3; y++) for (int x = 0; x < 4; x++) begin
      exp_addr.push_back(off + s[0]*x + s[1]*y + s[2]*z);
      exp_time.push_back(t0 + t[0]*x + t[1]*y + t[2]*z);
    end
    start = 0; ext_step = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    t_start = cyc;
    // scheduled run: check address and cycle of each access
    n = 0;
    while (n < 24) begin
      @(posedge clk);
      if (v_sg) begin
        check(a_sg == 16'(exp_addr[n]), $sformatf("sg addr %0d: %0d vs %0d", n, a_sg, exp_addr[n]));
        check(cyc - t_start == exp_time[n], $sformatf("sg time %0d: %0d vs %0d", n, cyc - t_start, exp_time[n]));
        n++;
      end
    end
    @(negedge clk);
    check(!busy_sg, "sg busy after last access");
    // externally stepped run, step on odd cycles only
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 0;
    for (int c = 0; c < 60; c++) begin
      ext_step = c[0];
      @(posedge clk);
      if (v_ext) begin
        if (n < 24) check(a_ext == 16'(exp_addr[n]), $sformatf("ext addr %0d: %0d vs %0d", n, a_ext, exp_addr[n]));
        n++;
      end
      @(negedge clk);
    end
    check(n == 24, $sformatf("ext access count %0d", n));
    check(!busy_ext, "ext busy after pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
