// Global buffer (GLB) tile: two 128 KB SRAM banks with a load unit, a store
// unit and a configuration unit.
//
// The tile serves two neighbouring CGRA columns. The load unit streams words
// from one bank into the first column's north port; the store unit writes the
// stream coming out of the second column's north port into a bank; the
// configuration unit streams a bitstream kept in a bank into the
// configuration network for those two columns. Application data and
// bitstreams share the same banks. The host reaches the banks (64-bit rows)
// and the tile registers through simple request ports.
// Bank arbitration, per bank: load > store > configuration > host. Load and
// store are expected to use different banks; a store that loses to the load is
// dropped and sets `err`.
// Registers (16 bit, host_reg_addr):
//   0..20   load controller (affine, see amber_pkg)
//   21..41  store controller (address generator and iteration domain)
//   42      [0] load bank, [1] store bank, [2] bitstream bank
//   43      bitstream start row       44  bitstream length in words
//   45      command, write-only pulses: [0] run (starts load, store and the
//           two columns' controllers together), [1] configure
// Timing: host reads return `host_rdata` with `host_rvalid` one cycle after
// they are granted (`host_gnt`).
// Bank sizes and the load/store/configuration units follow the design
// description; register map and arbitration are this design's choices.
module amber_glb_tile
  import amber_pkg::*;
#(
  parameter int unsigned BANK_DEPTH = 16384   // 16384 x 64 bit = 128 KB
) (
  input  logic        clk,
  input  logic        rst_n,
  // host register port
  input  logic        host_reg_we,
  input  logic [5:0]  host_reg_addr,
  input  logic [15:0] host_reg_data,
  // host memory port
  input  logic        host_en,
  input  logic        host_we,
  input  logic        host_bank,
  input  logic [13:0] host_row,
  input  logic [63:0] host_wdata,
  output logic        host_gnt,
  output logic [63:0] host_rdata,
  output logic        host_rvalid,
  // CGRA side
  output logic [15:0] ld_data,
  output logic        ld_valid,
  input  logic [15:0] st_data,
  input  logic        st_valid,
  output logic        col_start,
  // configuration network lane
  output cfg_word_t   cfg_word,
  output logic        cfg_valid,
  // status
  output logic        ld_busy,
  output logic        st_busy,
  output logic        cfg_busy,
  output logic        err
);
  localparam int unsigned AW = $clog2(BANK_DEPTH);
  localparam int unsigned NREGS = 45;

  logic [15:0] regs [NREGS];
  logic        run_p, cfg_p;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
      run_p <= 1'b0; cfg_p <= 1'b0;
    end else begin
      run_p <= host_reg_we && host_reg_addr == 6'd45 && host_reg_data[0];
      cfg_p <= host_reg_we && host_reg_addr == 6'd45 && host_reg_data[1];
      if (host_reg_we && int'(host_reg_addr) < int'(NREGS)) regs[host_reg_addr] <= host_reg_data;
    end
  end
  assign col_start = run_p;

  function automatic logic [AFFINE_REGS*16-1:0] blk(input int base);
    logic [AFFINE_REGS*16-1:0] r;
    for (int i = 0; i < int'(AFFINE_REGS); i++) r[16*i +: 16] = regs[base+i];
    return r;
  endfunction

  affine_cfg_t ld_cfg, st_cfg;
  logic        ld_bank, st_bank, pc_bank;
  always_comb begin
    ld_cfg  = unpack_affine(blk(0));
    st_cfg  = unpack_affine(blk(21));
    ld_bank = regs[42][0];
    st_bank = regs[42][1];
    pc_bank = regs[42][2];
  end

  // units
  logic        ld_rd;
  logic [13:0] ld_row;
  logic        st_wr;
  logic [13:0] st_row;
  logic [63:0] st_wdata;
  logic [3:0]  st_mask;
  logic        pc_req, pc_gnt;
  logic [13:0] pc_row;
  logic [63:0] bank_q [2];
  logic [63:0] ld_q, pc_q;

  amber_glb_ld u_ld (.clk, .rst_n, .start(run_p), .cfg(ld_cfg), .rd_en(ld_rd), .rd_row(ld_row),
    .rd_data(ld_q), .out_data(ld_data), .out_valid(ld_valid), .busy(ld_busy));
  amber_glb_st u_st (.clk, .rst_n, .start(run_p), .cfg(st_cfg), .in_data(st_data),
    .in_valid(st_valid), .wr_en(st_wr), .wr_row(st_row), .wr_data(st_wdata), .wr_mask(st_mask),
    .busy(st_busy));
  amber_glb_pcfg u_pc (.clk, .rst_n, .start(cfg_p), .row0(regs[43][13:0]), .count(regs[44]),
    .rd_req(pc_req), .gnt(pc_gnt), .rd_row(pc_row), .rd_data(pc_q), .word(cfg_word),
    .word_v(cfg_valid), .busy(cfg_busy));

  assign ld_q = bank_q[ld_bank];
  assign pc_q = bank_q[pc_bank];

  // per-bank arbitration
  logic [1:0] b_en, b_we, st_lost;
  logic [1:0] host_win;
  logic [AW-1:0] b_addr [2];
  logic [63:0]   b_wd [2];
  logic [3:0]    b_mask [2];
  always_comb begin
    pc_gnt = 1'b0;
    for (int b = 0; b < 2; b++) begin
      b_en[b] = 1'b0; b_we[b] = 1'b0; b_addr[b] = '0; b_wd[b] = host_wdata; b_mask[b] = '1;
      st_lost[b] = 1'b0; host_win[b] = 1'b0;
      if (ld_rd && ld_bank == 1'(b)) begin
        b_en[b] = 1'b1; b_addr[b] = AW'(ld_row);
        st_lost[b] = st_wr && st_bank == 1'(b);
      end else if (st_wr && st_bank == 1'(b)) begin
        b_en[b] = 1'b1; b_we[b] = 1'b1; b_addr[b] = AW'(st_row);
        b_wd[b] = st_wdata; b_mask[b] = st_mask;
      end else if (pc_req && pc_bank == 1'(b)) begin
        b_en[b] = 1'b1; b_addr[b] = AW'(pc_row); pc_gnt = 1'b1;
      end else if (host_en && host_bank == 1'(b)) begin
        b_en[b] = 1'b1; b_we[b] = host_we; b_addr[b] = AW'(host_row); host_win[b] = 1'b1;
      end
    end
  end
  assign host_gnt = |host_win;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    amber_sram_sp #(.DEPTH(BANK_DEPTH), .WIDTH(64)) u_bank (.clk, .en(b_en[b]), .we(b_we[b]),
      .wmask(b_mask[b]), .addr(b_addr[b]), .wdata(b_wd[b]), .rdata(bank_q[b]));
  end

  logic hb_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host_rvalid <= 1'b0; hb_q <= 1'b0; err <= 1'b0;
    end else begin
      host_rvalid <= host_gnt && !host_we;
      hb_q        <= host_bank;
      if (|st_lost) err <= 1'b1;
    end
  end
  assign host_rdata = bank_q[hb_q];
endmodule
