// Processing element (PE) core.
//
// Two 16-bit operands arrive from connection boxes. Each goes through an input
// register stage selectable per operand: pass straight through, delay by one
// cycle, or replace by a configured constant. Three 1-bit inputs, each
// optionally delayed one cycle, address an 8-entry lookup table (LUT); the LUT
// output is the ALU's carry/select input and a 1-bit output. The ALU result
// is the 16-bit output; the COND unit turns the ALU flags (or the LUT bit)
// into the second 1-bit output. Operand 0 also feeds the 64-byte register
// file, whose read stream is the PE's second 16-bit output.
//
// Configuration registers (16 bit):
//   0  [4:0] opcode, [5] signed, [7:6] operand 0 mode, [9:8] operand 1 mode,
//      [12:10] delay the 1-bit inputs
//   1  [3:0] condition code, [15:8] LUT truth table (entry {b2,b1,b0})
//   2  operand 0 constant      3  operand 1 constant
//   4..24   register-file write controller (21 registers, see amber_pkg)
//   25..45  register-file read controller
// Timing: ALU, LUT and COND are combinational from the (possibly registered)
// operands, so a PE adds no cycle unless a delay register is enabled; the
// switch boxes supply pipeline registers.
// Block structure follows the PE diagram; register map, condition codes and
// the LUT indexing are this design's choices.
module amber_pe_core
  import amber_pkg::*;
#(
  parameter int unsigned NREGS = 46
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        cfg_we,
  input  logic [6:0]  cfg_addr,
  input  logic [15:0] cfg_data,
  input  logic [15:0] data0,
  input  logic [15:0] data1,
  input  logic [2:0]  bit_in,
  output logic [15:0] alu_out,
  output logic [15:0] rf_out,
  output logic        cond_out,
  output logic        lut_out,
  output logic        rf_valid
);
  logic [15:0] regs [NREGS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (cfg_we && int'(cfg_addr) < int'(NREGS)) begin
      regs[cfg_addr] <= cfg_data;
    end
  end

  function automatic logic [AFFINE_REGS*16-1:0] blk(input int base);
    logic [AFFINE_REGS*16-1:0] r;
    for (int i = 0; i < int'(AFFINE_REGS); i++) r[16*i +: 16] = regs[base+i];
    return r;
  endfunction

  alu_op_e     op;
  logic        sgn;
  in_mode_e    m0, m1;
  logic [2:0]  bdly;
  cond_e       cc;
  logic [7:0]  lut;
  affine_cfg_t rf_w, rf_r;
  always_comb begin
    op   = alu_op_e'(regs[0][4:0]);
    sgn  = regs[0][5];
    m0   = in_mode_e'(regs[0][7:6]);
    m1   = in_mode_e'(regs[0][9:8]);
    bdly = regs[0][12:10];
    cc   = cond_e'(regs[1][3:0]);
    lut  = regs[1][15:8];
    rf_w = unpack_affine(blk(4));
    rf_r = unpack_affine(blk(25));
  end

  // input registers
  logic [15:0] d0_q, d1_q, a, b;
  logic [2:0]  bit_q, bits;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin d0_q <= '0; d1_q <= '0; bit_q <= '0; end
    else begin d0_q <= data0; d1_q <= data1; bit_q <= bit_in; end
  end

  always_comb begin
    unique case (m0)
      IN_DELAY: a = d0_q;
      IN_CONST: a = regs[2];
      default:  a = data0;
    endcase
    unique case (m1)
      IN_DELAY: b = d1_q;
      IN_CONST: b = regs[3];
      default:  b = data1;
    endcase
    for (int i = 0; i < 3; i++) bits[i] = bdly[i] ? bit_q[i] : bit_in[i];
  end

  assign lut_out = lut[bits];

  logic fn, fz, fc, fv;
  amber_alu u_alu (.op, .is_signed(sgn), .a, .b, .d(lut_out), .res(alu_out),
                   .fn, .fz, .fc, .fv);

  always_comb begin
    unique case (cc)
      C_Z:     cond_out = fz;
      C_NZ:    cond_out = !fz;
      C_C:     cond_out = fc;
      C_NC:    cond_out = !fc;
      C_N:     cond_out = fn;
      C_NN:    cond_out = !fn;
      C_V:     cond_out = fv;
      C_NV:    cond_out = !fv;
      C_GE:    cond_out = (fn == fv);
      C_LT:    cond_out = (fn != fv);
      C_LUT:   cond_out = lut_out;
      C_TRUE:  cond_out = 1'b1;
      default: cond_out = 1'b0;
    endcase
  end

  amber_pe_rf u_rf (.clk, .rst_n, .start, .wr_cfg(rf_w), .rd_cfg(rf_r),
                    .wdata(data0), .rdata(rf_out), .rvalid(rf_valid));
endmodule
