// End-to-end BFloat16 division workload on the accelerator subsystem
// (reduced size: 2 GLB tiles, 4 x 4 array, 1K-row banks).
// Division is built from ordinary tiles: for b = 1.f * 2^x, a PE extracts the
// mantissa f (GETMAN), a MEM tile in lookup-ROM mode maps f to 1/1.f, a
// second PE re-inserts the exponent (SUBEXP gives 1/b), and a third PE
// multiplies by the dividend (FMUL with a constant operand a = 2.0).
// Phase 1: both regions are configured from GLB bitstreams; the GLB load
//   streams the 128-entry reciprocal table through PE(0,0) into MEM(3,0),
//   which packs it into 32 wide rows while in ROM mode.
// Phase 2: both regions are reconfigured (dynamic partial reconfiguration,
//   the MEM keeps its contents) for the division dataflow:
//     GLB load -> PE(0,0) GETMAN -> east on track 1 -> MEM(3,0) input 1
//     (ROM address); b also travels east on track 0 to PE(2,0), delayed one
//     cycle there to meet the ROM output; PE(2,0) SUBEXP -> west on track 1
//     -> PE(1,0) FMUL -> column 1 north -> GLB store. The 1-bit valid follows
//     on the 1-bit network through one switch-box register.
// The stored quotients are compared with 2/b computed in real arithmetic;
// the table truncates to 7 mantissa bits, so the allowed relative error is
// 2^-7. The reciprocal table is worked out here from its formula
// (entry f = 1/(1 + f/128) truncated), not read from a file.
module tb_amber_top_div;
  import amber_pkg::*;
  localparam int NG = 2, NRW = 4, BD = 1024, N = 32;

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

  amber_top #(.NGLB(NG), .NROW(NRW), .BANK_DEPTH(BD)) dut (.*);

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
  task automatic run_tile(input int t);
    @(negedge clk); host_reg_we = 1; host_reg_tile = 4'(t); host_reg_addr = 45; host_reg_data = 1;
    @(negedge clk); host_reg_we = 0;
  endtask

  // ---------------- bitstream building ----------------
  cfg_word_t bs [2][$];
  logic [15:0] sh [4][4][10];   // switch-box register shadows
  task automatic cw(input int c, input int r, input int a, input int d);
    bs[c / 2].push_back('{col: 1'(c % 2), row: 4'(r), reg_a: 7'(a), data: 16'(d)});
  endtask
  // switch box of tile (c,r), width w (0 = 16 bit), outgoing side/track
  task automatic sbw(input int c, input int r, input int w, input int side, input int trk, input int sel);
    int o;
    o = (w * 4 + side) * 5 + trk;
    sh[c][r][o / 4][4 * (o % 4) +: 4] = 4'(sel);
    cw(c, r, o / 4, sh[c][r][o / 4]);
  endtask
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
  task automatic configure_both(input int len0, input int len1);
    regw(0, 43, 200); regw(0, 44, len0);
    regw(1, 43, 200); regw(1, 44, len1);
    @(negedge clk); host_reg_we = 1; host_reg_tile = 0; host_reg_addr = 45; host_reg_data = 2;
    @(negedge clk); host_reg_tile = 1;
    @(negedge clk); host_reg_we = 0;
    repeat (len0 + len1 + 10) @(negedge clk);
    check(!(|cfg_busy), "configuration finished");
  endtask

  // ---------------- reference arithmetic ----------------
  function automatic logic [15:0] table_entry(input int f);   // 1/(1 + f/128), truncated
    if (f == 0) return 16'h3F80;
    return {1'b0, 8'd126, 7'((32768 / (128 + f)) - 128)};
  endfunction
  function automatic real bf2real(input logic [15:0] v);
    real m;
    int e;
    m = 1.0 + real'(v[6:0]) / 128.0;
    e = int'(v[14:7]) - 127;
    while (e > 0) begin m = m * 2.0; e--; end
    while (e < 0) begin m = m / 2.0; e++; end
    return v[15] ? -m : m;
  endfunction
  function automatic logic [15:0] b_val(input int i);   // divisors, both signs, many exponents
    return {1'(i % 2), 8'(120 + i % 15), 7'((i * 37) % 128)};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_rom = 0, n_memw = 0, n_st = 0, n_cfg = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cgra.g_col[3].g_row[0].u_tile.g_mem.u_mem.rom_v) n_rom++;
    if (dut.u_cgra.g_col[3].g_row[0].u_tile.g_mem.u_mem.s_we) n_memw++;
    if (dut.u_glb.st_valid[0]) n_st++;
    if (|dut.u_glb.cfg_valid) n_cfg++;
  end

  initial begin
    int len0, len1, memw0;
    logic [63:0] d;
    host_reg_we = 0; host_reg_tile = 0; host_reg_addr = 0; host_reg_data = 0;
    host_en = 0; host_we = 0; host_tile = 0; host_bank = 0; host_row = 0; host_wdata = 0;
    host_cfg_v = 0; host_cfg_word = 0;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) for (int i = 0; i < 10; i++) sh[c][r][i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // reciprocal table at bank 0 rows 0..31, divisors at rows 40..47
    for (int i = 0; i < 32; i++)
      memw(0, 0, i, {table_entry(4*i+3), table_entry(4*i+2), table_entry(4*i+1), table_entry(4*i)});
    for (int i = 0; i < N / 4; i++)
      memw(0, 0, 40 + i, {b_val(4*i+3), b_val(4*i+2), b_val(4*i+1), b_val(4*i)});
    regw(0, 42, 3'b110);   // tile 0: load bank 0, store and bitstream bank 1
    regw(1, 42, 3'b100);

    // ---- phase 1: fill the ROM ----
    cw(0, 0, 16 + 0, int'(OP_ADD) | (2 << 8));       // PE(0,0): a + 0
    sbw(0, 0, 0, 1, 0, 4);                           // east t0 <- ALU
    sbw(1, 0, 0, 1, 0, 2 + 8);                       // (1,0) east t0 <- west, registered
    sbw(2, 0, 0, 1, 0, 2);                           // (2,0) east t0 <- west
    cw(3, 0, 10, 3 * 5);                             // MEM input 0 <- west t0
    cw(3, 0, 16 + 0, int'(MEM_ROM));
    cw(3, 0, 16 + 1, 1);  cw(3, 0, 16 + 2, 128); cw(3, 0, 16 + 8, 4); cw(3, 0, 16 + 9, 1);   // in0 at 4..131
    cw(3, 0, 16 + 57, 1); cw(3, 0, 16 + 58, 32); cw(3, 0, 16 + 64, 0); cw(3, 0, 16 + 65, 1); // rows 0..31
    put_bitstream(0, len0);
    put_bitstream(1, len1);
    configure_both(len0, len1);
    regw(0, 0, 1); regw(0, 1, 128); regw(0, 7, 0); regw(0, 8, 1); regw(0, 14, 0); regw(0, 15, 1);
    memw0 = n_memw;
    run_tile(1); run_tile(0);                        // MEM region starts two cycles ahead
    repeat (200) @(negedge clk);
    check(n_memw - memw0 == 32, $sformatf("ROM rows written %0d", n_memw - memw0));

    // ---- phase 2: reconfigure both regions for division ----
    cw(0, 0, 16 + 0, int'(OP_GETMAN));               // PE(0,0): f = mantissa of b
    sbw(0, 0, 0, 1, 1, 4);                           // east t1 <- f
    sbw(0, 0, 0, 1, 0, 3);                           // east t0 <- north (b)
    sbw(0, 0, 1, 1, 0, 3);                           // 1-bit east t0 <- north (valid)
    sbw(1, 0, 0, 1, 0, 2);                           // (1,0) east t0 <- west, now combinational
    sbw(1, 0, 0, 1, 1, 2);                           // (1,0) east t1 <- west
    cw(1, 0, 10, 1 * 5 + 1);                         // PE(1,0) a <- east t1
    cw(1, 0, 16 + 0, int'(OP_FMUL) | (2 << 8));      // PE(1,0): a * const
    cw(1, 0, 16 + 3, 16'h4000);                      // dividend 2.0
    sbw(1, 0, 0, 0, 0, 4);                           // north t0 <- ALU (to GLB store)
    sbw(1, 0, 1, 0, 0, 3 + 8);                       // 1-bit north t0 <- west, registered
    sbw(2, 0, 0, 1, 1, 2);                           // (2,0) east t1 <- west (f)
    cw(2, 0, 10, 1 * 5 + 0);                         // PE(2,0) a <- east t0 (ROM output)
    cw(2, 0, 11, 3 * 5 + 0);                         // PE(2,0) b <- west t0 (b)
    cw(2, 0, 16 + 0, int'(OP_SUBEXP) | (1 << 8));    // SUBEXP, b delayed one cycle
    sbw(2, 0, 0, 3, 1, 4);                           // west t1 <- 1/b
    cw(3, 0, 11, 3 * 5 + 1);                         // MEM input 1 (ROM address) <- west t1
    sbw(3, 0, 0, 3, 0, 4);                           // west t0 <- MEM output 0
    put_bitstream(0, len0);
    put_bitstream(1, len1);
    configure_both(len0, len1);
    // load N divisors from word 160, store N quotients to bank 1 row 64
    regw(0, 1, N); regw(0, 7, 160);
    regw(0, 21, 1); regw(0, 22, N); regw(0, 28, 64 * 4); regw(0, 29, 1);
    run_tile(0);
    repeat (N + 40) @(negedge clk);
    check(n_st == N, $sformatf("quotients stored %0d", n_st));

    for (int i = 0; i < N / 4; i++) begin
      memr(0, 1, 64 + i, d);
      for (int l = 0; l < 4; l++) begin
        real want, got, tol;
        want = 2.0 / bf2real(b_val(4 * i + l));
        got  = bf2real(d[16*l +: 16]);
        tol  = (want < 0.0 ? -want : want) / 128.0;
        check(got - want <= tol && want - got <= tol && (got < 0.0) == (want < 0.0),
              $sformatf("2 / %h = %h (%f, want %f)", b_val(4*i+l), d[16*l +: 16], got, want));
      end
    end
    check(!err, "error flag");
    check(n_rom > 0, "ROM lookups");
    check(n_cfg > 0, "configuration words");
    $display("mechanisms: rom_lookups=%0d rom_rows=%0d stored=%0d cfg_words=%0d", n_rom, n_memw, n_st, n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
