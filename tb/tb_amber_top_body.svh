// Shared body of the end-to-end testbenches (any size with at least two GLB tiles).
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              host_reg_we;
  logic [3:0]        host_reg_tile;
  logic [5:0]        host_reg_addr;
  logic [15:0]       host_reg_data;
  logic              host_en, host_we, host_bank, host_gnt, host_rvalid;
  logic [3:0]        host_tile;
  logic [13:0]       host_row;
  logic [63:0]       host_wdata, host_rdata;
  logic              host_cfg_v, host_cfg_ready;
  logic [31:0]       host_cfg_word;
  logic [NG-1:0]     ld_busy, st_busy, cfg_busy;
  logic              err;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- host helpers ----------------
  task automatic regw(input int t, input int a, input int d);
    @(negedge clk); host_reg_we = 1; host_reg_tile = 4'(t); host_reg_addr = 6'(a); host_reg_data = 16'(d);
    @(negedge clk); host_reg_we = 0;
  endtask
  task automatic memw(input int t, input logic b, input int row, input logic [63:0] d);
    @(negedge clk); host_en = 1; host_we = 1; host_tile = 4'(t); host_bank = b; host_row = 14'(row);
    host_wdata = d;
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(negedge clk); host_en = 0; host_we = 0;
  endtask
  task automatic memr(input int t, input logic b, input int row, output logic [63:0] d);
    @(negedge clk); host_en = 1; host_we = 0; host_tile = 4'(t); host_bank = b; host_row = 14'(row);
    #1; while (!host_gnt) begin @(negedge clk); #1; end
    @(posedge clk); #1; host_en = 0;
    d = host_rdata;
  endtask

  // ---------------- bitstream building ----------------
  cfg_word_t bs [2][$];
  logic [15:0] sh [4][16][10];   // switch-box register shadows, columns 0..3
  task automatic cw(input int c, input int r, input int a, input int d);
    bs[c / 2].push_back('{col: 1'(c % 2), row: 4'(r), reg_a: 7'(a), data: 16'(d)});
  endtask
  task automatic sbw(input int c, input int r, input int w, input int side, input int trk, input int sel);
    int o;
    o = (w * 4 + side) * 5 + trk;
    sh[c][r][o / 4][4 * (o % 4) +: 4] = 4'(sel);
    cw(c, r, o / 4, sh[c][r][o / 4]);
  endtask
  // write tile t's bitstream to bank 1 from row 200, return its length
  task automatic put_bitstream(input int t, output int len);
    len = bs[t].size();
    for (int i = 0; i < len; i += 2) begin
      logic [63:0] row;
      row = '0;
      row[27:0] = bs[t][i];
      if (i + 1 < len) row[59:32] = bs[t][i + 1];
      memw(t, 1, 200 + i / 2, row);
    end
    bs[t].delete();
  endtask

  // ---------------- mechanism counters ----------------
  int n_dpr0 = 0, n_dpr1 = 0, n_dpr_par = 0, n_host_acc = 0, n_host_ref = 0;
  int n_ld = 0, n_st = 0, n_delay = 0, n_memw = 0, n_sbreg = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_glb.cfg_valid[0]) n_dpr0++;
    if (dut.u_glb.cfg_valid[1]) n_dpr1++;
    if (dut.u_glb.cfg_valid[0] && dut.u_glb.cfg_valid[1]) n_dpr_par++;
    if (host_cfg_v && host_cfg_ready) n_host_acc++;
    if (host_cfg_v && !host_cfg_ready) n_host_ref++;
    if (dut.u_glb.ld_valid[0]) n_ld++;
    if (dut.u_glb.st_valid[0]) n_st++;
    if (dut.u_cgra.g_col[3].g_row[0].u_tile.g_mem.u_mem.rd_fire &&
        !dut.u_cgra.g_col[3].g_row[0].u_tile.g_mem.u_mem.rd_go) n_delay++;
    if (dut.u_cgra.g_col[3].g_row[0].u_tile.g_mem.u_mem.s_we) n_memw++;
  end

  task automatic run_and_check(input int k, input int store_row);
    logic [63:0] d;
    int st0;
    st0 = n_st;
    // store: 32 words at word address store_row*4..
    regw(0, 21, 1); regw(0, 22, 32); regw(0, 28, store_row * 4); regw(0, 29, 1);
    // start the MEM's region one cycle ahead of the load's region
    @(negedge clk); host_reg_we = 1; host_reg_tile = 1; host_reg_addr = 45; host_reg_data = 1;
    @(negedge clk); host_reg_tile = 0;
    @(negedge clk); host_reg_we = 0;
    repeat (80) @(negedge clk);
    check(n_st - st0 == 32, $sformatf("stored %0d words", n_st - st0));
    for (int i = 0; i < 8; i++) begin
      memr(0, 1, store_row + i, d);
      for (int l = 0; l < 4; l++)
        check(d[16*l +: 16] == 16'((4 * i + l) * 13 + 7 + k), $sformatf("result %0d = %0d", 4 * i + l, d[16*l +: 16]));
    end
  endtask

  initial begin
    int len0, len1, t0;
    host_reg_we = 0; host_reg_tile = 0; host_reg_addr = 0; host_reg_data = 0;
    host_en = 0; host_we = 0; host_tile = 0; host_bank = 0; host_row = 0; host_wdata = 0;
    host_cfg_v = 0; host_cfg_word = 0;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 16; r++) for (int i = 0; i < 10; i++) sh[c][r][i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // input data: word i = i*13 + 7, bank 0 rows 0..7 of GLB tile 0
    for (int i = 0; i < 8; i++)
      memw(0, 0, i, {16'((4*i+3)*13+7), 16'((4*i+2)*13+7), 16'((4*i+1)*13+7), 16'((4*i)*13+7)});

    // ---- bitstream, GLB tile 0: columns 0 and 1 ----
    cw(0, 0, 10, 0);                                 // PE(0,0): a <- north track 0
    cw(0, 0, 16 + 0, int'(OP_ADD) | (2 << 8));       // ADD, b = constant
    sbw(0, 0, 0, 1, 0, 4);                           // east <- ALU
    sbw(1, 0, 0, 1, 0, 2 + 8);                       // (1,0) east <- west, registered
    sbw(1, 0, 0, 0, 0, 1);                           // (1,0) north <- east
    sbw(1, 0, 1, 0, 0, 1);                           // 1-bit north <- east
    // ---- bitstream, GLB tile 1: columns 2 and 3 ----
    sbw(2, 0, 0, 1, 0, 2);                           // (2,0) east <- west
    sbw(2, 0, 0, 3, 0, 2);                           // (2,0) west <- east
    sbw(2, 0, 1, 3, 0, 2);                           // 1-bit west <- east
    cw(3, 0, 10, 3 * 5);                             // MEM(3,0): input 0 <- west track 0
    cw(3, 0, 16 + 1, 1);  cw(3, 0, 16 + 2, 32); cw(3, 0, 16 + 8, 3);  cw(3, 0, 16 + 9, 1);   // in0 at 3..34
    cw(3, 0, 16 + 57, 1); cw(3, 0, 16 + 58, 8); cw(3, 0, 16 + 64, 0); cw(3, 0, 16 + 65, 1);  // rows 0..7
    cw(3, 0, 16 + 71, 1); cw(3, 0, 16 + 72, 8); cw(3, 0, 16 + 78, 0); cw(3, 0, 16 + 79, 1);
    cw(3, 0, 16 + 85, 15); cw(3, 0, 16 + 86, 4);                                              // reads 15,19,..
    cw(3, 0, 16 + 29, 1); cw(3, 0, 16 + 30, 32); cw(3, 0, 16 + 36, 19); cw(3, 0, 16 + 37, 1); // out0 19..50
    sbw(3, 0, 0, 3, 0, 4);                           // west <- MEM output 0
    sbw(3, 0, 1, 3, 0, 4);                           // 1-bit west <- valid 0
    put_bitstream(0, len0);
    put_bitstream(1, len1);
    regw(0, 42, 3'b110); regw(0, 43, 200); regw(0, 44, len0);   // store and bitstream in bank 1
    regw(1, 42, 3'b100); regw(1, 43, 200); regw(1, 44, len1);
    // load unit: 32 words, cycles 0..31, from bank 0 (results go to bank 1)
    regw(0, 0, 1); regw(0, 1, 32); regw(0, 7, 0); regw(0, 8, 1); regw(0, 14, 0); regw(0, 15, 1);
    // configure both regions at once
    t0 = n_dpr0;
    @(negedge clk); host_reg_we = 1; host_reg_tile = 0; host_reg_addr = 45; host_reg_data = 2;
    @(negedge clk); host_reg_tile = 1;
    @(negedge clk); host_reg_we = 0;
    // direct host word into column 2 while GLB tile 1's lane is busy
    repeat (3) @(negedge clk);   // lanes are streaming by now
    host_cfg_v = 1; host_cfg_word = {5'd2, 4'd0, 7'(16 + 2), 16'h1234};   // PE(2,0) constant, unused
    do @(posedge clk); while (!host_cfg_ready);
    @(negedge clk); host_cfg_v = 0;
    repeat (len0 + len1 + 10) @(negedge clk);
    check(n_dpr0 - t0 == len0 && n_dpr1 == len1, "bitstream lengths");
    check(!(|cfg_busy), "configuration finished");

    run_and_check(0, 64);

    // ---- partial reconfiguration of region 0 only: constant = 9 ----
    cw(0, 0, 16 + 3, 9);
    put_bitstream(0, len0);
    regw(0, 43, 200); regw(0, 44, len0); regw(0, 45, 2);
    repeat (10) @(negedge clk);
    run_and_check(9, 96);

    check(dut.u_cgra.g_col[2].g_row[0].u_tile.g_pe.u_pe.regs[2] == 16'h1234, "host word landed");
    check(!err, "error flag");
    check(n_dpr0 > 0 && n_dpr1 > 0, "DPR from both GLB tiles");
    check(n_dpr_par > 0, "parallel DPR lanes");
    check(n_host_acc == 1, "host configuration accepted once");
    check(n_host_ref > 0, "host configuration refused while lane busy");
    check(n_ld == 64, $sformatf("load words %0d", n_ld));
    check(n_memw == 16, $sformatf("MEM wide writes %0d", n_memw));
    check(n_delay > 0, "MEM read delayed by write");
    $display("mechanisms: dpr0=%0d dpr1=%0d parallel=%0d host_acc=%0d host_ref=%0d ld=%0d st=%0d memw=%0d delayed=%0d",
             n_dpr0, n_dpr1, n_dpr_par, n_host_acc, n_host_ref, n_ld, n_st, n_memw, n_delay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
