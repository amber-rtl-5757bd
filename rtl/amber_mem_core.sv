// MEM tile core: a 4 KB streaming memory with affine controllers.
//
// Two 16-bit input streams are packed four words at a time by serial-in
// parallel-out registers (SIPO) and written into a single-port 512 x 64-bit
// SRAM; two 16-bit output streams are unpacked from 64-bit reads by
// parallel-in serial-out registers (PISO). Fetching 64 bits at a time lets one
// SRAM port serve all four streams. When the input schedule generators say a
// word arrives, the SIPO takes it; a full SIPO requests a wide write, and the
// write address comes from one write address generator shared by both inputs
// (an encoder picks the SIPO, input 0 first). Each output has a read address
// generator stepped once per wide read, and an output schedule generator that
// says on which cycles a 16-bit word leaves. Wide reads are scheduled by one
// read controller shared by both outputs (address and schedule generators);
// with `dual` set successive reads alternate between output 0 and output 1.
// Writes win the single port; a read that meets a write is delayed by one
// cycle in a holding slot.
// Chaining: an output may forward the neighbour's `chain_in` stream on cycles
// its own stream is idle, so several MEM tiles act as one larger buffer.
// ROM mode (lookup table, e.g. for BFloat16 division): input 0 still fills
// the SRAM; afterwards each cycle input 1 is taken as a 16-bit word address
// (bits 10:2 pick the 64-bit row, 1:0 the lane) and output 0 returns the
// entry one cycle later.
//
// Configuration registers (16 bit, address cfg_addr):
//   0        ctrl: [1:0] mode, [2] chain out0, [3] chain out1, [4] dual
//   1..14    input 0 schedule    (dims, extents[6], start cycle, deltas[6])
//   15..28   input 1 schedule
//   29..42   output 0 schedule
//   43..56   output 1 schedule
//   57..70   shared write address generator (dims, extents, offset, deltas)
//   71..91   shared read controller (21 registers, full layout of amber_pkg)
// Timing: `start` clears the tile and starts all controllers together.
// Output word k leaves on the cycle its schedule names; data must have been
// written at least a few cycles earlier (one SIPO fill + write + read).
// `err` is sticky: SIPO overflow, a read delayed twice, or an output
// scheduled with no data ready.
// The SIPO/PISO, wide SRAM, shared write generator, delayed read, chain
// inputs and ROM use follow the MEM tile description; register map,
// arbitration order and chaining rule are this design's choices.
module amber_mem_core
  import amber_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = 512,
  parameter int unsigned NREGS      = 92
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              cfg_we,
  input  logic [6:0]        cfg_addr,
  input  logic [15:0]       cfg_data,
  input  logic [15:0]       data_in0,
  input  logic [15:0]       data_in1,
  input  logic [15:0]       chain_in,
  input  logic              chain_valid_in,
  output logic [15:0]       data_out0,
  output logic [15:0]       data_out1,
  output logic              valid_out0,
  output logic              valid_out1,
  output logic              err
);
  localparam int unsigned AW = $clog2(SRAM_DEPTH);

  // ---------------- configuration ----------------
  logic [15:0] regs [NREGS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (cfg_we && int'(cfg_addr) < int'(NREGS)) begin
      regs[cfg_addr] <= cfg_data;
    end
  end

  function automatic logic [HALF_REGS*16-1:0] blk(input int base);
    logic [HALF_REGS*16-1:0] r;
    for (int i = 0; i < int'(HALF_REGS); i++) r[16*i +: 16] = regs[base+i];
    return r;
  endfunction

  function automatic logic [AFFINE_REGS*16-1:0] blk21(input int base);
    logic [AFFINE_REGS*16-1:0] r;
    for (int i = 0; i < int'(AFFINE_REGS); i++) r[16*i +: 16] = regs[base+i];
    return r;
  endfunction

  mem_mode_e   mode;
  logic [1:0]  chain_en;
  logic        dual;
  affine_cfg_t c_in0, c_in1, c_out0, c_out1, c_wr, c_rd;
  always_comb begin
    mode     = mem_mode_e'(regs[0][1:0]);
    chain_en = regs[0][3:2];
    dual     = regs[0][4];
    c_in0  = unpack_half(blk(1),  1'b1);
    c_in1  = unpack_half(blk(15), 1'b1);
    c_out0 = unpack_half(blk(29), 1'b1);
    c_out1 = unpack_half(blk(43), 1'b1);
    c_wr   = unpack_half(blk(57), 1'b0);
    c_rd   = unpack_affine(blk21(71));
  end

  // ---------------- input side ----------------
  logic in0_v, in1_v, in0_busy, in1_busy;
  logic [CNT_W-1:0] unused_a0, unused_a1;
  amber_stream_ctrl #(.USE_SG(1'b1)) u_in0 (.clk, .rst_n, .cfg(c_in0), .start,
    .ext_step(1'b0), .valid(in0_v), .addr(unused_a0), .busy(in0_busy));
  amber_stream_ctrl #(.USE_SG(1'b1)) u_in1 (.clk, .rst_n, .cfg(c_in1), .start,
    .ext_step(1'b0), .valid(in1_v), .addr(unused_a1), .busy(in1_busy));

  logic        s0_full, s1_full, s0_take, s1_take, s0_ovf, s1_ovf;
  logic [63:0] s0_data, s1_data;
  logic        rom;
  assign rom = (mode == MEM_ROM);

  amber_sipo u_sipo0 (.clk, .rst_n, .clr(start), .in_valid(in0_v), .in_data(data_in0),
    .take(s0_take), .full(s0_full), .out_data(s0_data), .overflow(s0_ovf));
  amber_sipo u_sipo1 (.clk, .rst_n, .clr(start), .in_valid(in1_v && !rom), .in_data(data_in1),
    .take(s1_take), .full(s1_full), .out_data(s1_data), .overflow(s1_ovf));

  // encoder: which SIPO writes
  logic wr_req;
  assign wr_req  = s0_full || s1_full;
  assign s0_take = s0_full;
  assign s1_take = s1_full && !s0_full;

  logic wr_v, wr_busy;
  logic [CNT_W-1:0] wr_addr;
  amber_stream_ctrl #(.USE_SG(1'b0)) u_wr (.clk, .rst_n, .cfg(c_wr), .start,
    .ext_step(wr_req), .valid(wr_v), .addr(wr_addr), .busy(wr_busy));

  // ---------------- output side ----------------
  logic o0_fire, o1_fire, o0_busy, o1_busy;
  logic [CNT_W-1:0] unused_a2, unused_a3;
  amber_stream_ctrl #(.USE_SG(1'b1)) u_out0 (.clk, .rst_n, .cfg(c_out0), .start,
    .ext_step(1'b0), .valid(o0_fire), .addr(unused_a2), .busy(o0_busy));
  amber_stream_ctrl #(.USE_SG(1'b1)) u_out1 (.clk, .rst_n, .cfg(c_out1), .start,
    .ext_step(1'b0), .valid(o1_fire), .addr(unused_a3), .busy(o1_busy));

  logic        p0_need, p1_need, p0_v, p1_v, p0_load, p1_load;
  logic [15:0] p0_d, p1_d;
  logic [63:0] sram_q;

  // shared read controller: schedules the wide reads; with `dual` set the
  // reads alternate between the two outputs, otherwise all feed output 0
  logic             rd_fire, rd_busy, rd_dst;
  logic [CNT_W-1:0] rd_addr;
  amber_stream_ctrl #(.USE_SG(1'b1)) u_rd (.clk, .rst_n, .cfg(c_rd), .start,
    .ext_step(1'b0), .valid(rd_fire), .addr(rd_addr), .busy(rd_busy));

  // a read that meets a write waits one cycle in a holding slot
  logic             hold_v, hold_dst, rd_go, go_dst, rd_lost;
  logic [CNT_W-1:0] hold_addr, go_addr;
  always_comb begin
    rd_go   = !rom && !wr_req && (hold_v || rd_fire);
    go_dst  = hold_v ? hold_dst  : rd_dst;
    go_addr = hold_v ? hold_addr : rd_addr;
    rd_lost = rd_fire && hold_v && !rd_go;   // no room for a second delayed read
  end

  // ROM lookup: input 1 is the address every cycle once filled
  logic rom_rd;
  assign rom_rd = rom && !wr_req;

  // ---------------- SRAM port ----------------
  logic          s_en, s_we;
  logic [AW-1:0] s_addr;
  logic [63:0]   s_wdata;
  always_comb begin
    s_en = 1'b0; s_we = 1'b0; s_addr = '0; s_wdata = s0_full ? s0_data : s1_data;
    if (wr_req) begin
      s_en = 1'b1; s_we = 1'b1; s_addr = AW'(wr_addr);
    end else if (rom_rd) begin
      s_en = 1'b1; s_addr = AW'(data_in1[15:2]);
    end else if (rd_go) begin
      s_en = 1'b1; s_addr = AW'(go_addr);
    end
  end

  amber_sram_sp #(.DEPTH(SRAM_DEPTH), .WIDTH(64)) u_sram (.clk, .en(s_en), .we(s_we),
    .wmask('1), .addr(s_addr), .wdata(s_wdata), .rdata(sram_q));

  logic       rom_v, pend0, pend1;
  logic [1:0] rom_lane;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend0 <= 1'b0; pend1 <= 1'b0; rom_v <= 1'b0; rom_lane <= '0;
      hold_v <= 1'b0; hold_dst <= 1'b0; hold_addr <= '0; rd_dst <= 1'b0;
    end else if (start) begin
      hold_v <= 1'b0; rd_dst <= 1'b0; pend0 <= 1'b0; pend1 <= 1'b0;
    end else begin
      pend0    <= rd_go && !go_dst;
      pend1    <= rd_go && go_dst;
      rom_v    <= rom_rd;
      rom_lane <= data_in1[1:0];
      if (rd_fire && dual) rd_dst <= !rd_dst;
      // delayed read: the scheduled read lost the port, or queued behind one
      if (rd_fire && !(rd_go && !hold_v)) begin
        hold_v <= 1'b1; hold_addr <= rd_addr; hold_dst <= rd_dst;
      end else if (rd_go && hold_v) begin
        hold_v <= 1'b0;
      end
    end
  end
  assign p0_load = pend0;
  assign p1_load = pend1;

  amber_piso u_piso0 (.clk, .rst_n, .clr(start), .load(p0_load), .in_data(sram_q),
    .out_ready(o0_fire), .out_valid(p0_v), .out_data(p0_d), .need(p0_need));
  amber_piso u_piso1 (.clk, .rst_n, .clr(start), .load(p1_load), .in_data(sram_q),
    .out_ready(o1_fire), .out_valid(p1_v), .out_data(p1_d), .need(p1_need));

  // ---------------- outputs, chaining ----------------
  logic own0, own1;
  assign own0 = rom ? rom_v : (o0_fire && p0_v);
  assign own1 = !rom && o1_fire && p1_v;
  always_comb begin
    data_out0  = rom ? sram_q[16*rom_lane +: 16] : p0_d;
    valid_out0 = own0;
    if (!own0 && chain_en[0]) begin
      data_out0 = chain_in; valid_out0 = chain_valid_in;
    end
    data_out1  = p1_d;
    valid_out1 = own1;
    if (!own1 && chain_en[1]) begin
      data_out1 = chain_in; valid_out1 = chain_valid_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     err <= 1'b0;
    else if (start) err <= 1'b0;
    else if (s0_ovf || s1_ovf || rd_lost || (o0_fire && !p0_v && !rom) || (o1_fire && !p1_v && !rom))
      err <= 1'b1;
  end

  // the 16-bit side needs no address; wide-side valids equal their steps
  logic unused;
  assign unused = ^{unused_a0, unused_a1, unused_a2, unused_a3, wr_v, wr_busy, rd_busy,
                    in0_busy, in1_busy, o0_busy, o1_busy, p0_need, p1_need};
endmodule
