// PE arithmetic logic unit: 16-bit integer/bitwise and BFloat16 operations.
//
// Integer/bit operations: ADD, SUB, ADC and SBC (carry in on `d`), ABS, GTE
// and LTE (output the larger / smaller operand, flag the comparison), SEL
// (`d` ? a : b), MUL (low 16 bits), SHR (arithmetic when `is_signed`), SHL,
// OR, AND, XOR.
// BFloat16 operations: FADD, FSUB, FCMP (a-b with flags), FMUL, and the
// building blocks that let a PE-MEM chain evaluate division, logarithm,
// exponential and sine with a table in a MEM tile:
//   GETMAN  : mantissa bits of a (7 bits, zero-extended) -> table address
//   SUBEXP  : {a.s^b.s, a.e - b.e + 127, a.m}; with a = table(1/1.f) this
//             gives 1/b up to the final multiply (a/b = a * SUBEXP)
//   ADDIEXP : a with b added to its exponent (a * 2^b)
//   EXP2F   : unbiased exponent of a as a BFloat16 value
//   F2INT   : integer part of a (round toward zero, saturating)
//   GETFR   : fractional part of a, a - trunc(a), as BFloat16
//   INT2F   : signed 16-bit integer to BFloat16
// Floating point is simplified: subnormals flush to zero, results are
// truncated (round toward zero), overflow gives infinity, NaN is not
// propagated specially. The operation list follows the design description;
// encodings, the flag rules and the exact semantics of the helper operations
// are this design's choices.
// Interface/timing: purely combinational; the PE registers around it.
module amber_alu
  import amber_pkg::*;
(
  input  alu_op_e     op,
  input  logic        is_signed,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        d,
  output logic [15:0] res,
  output logic        fn,   // negative
  output logic        fz,   // zero
  output logic        fc,   // carry / comparison result
  output logic        fv    // overflow
);
  // ---------------- BFloat16 helpers ----------------
  function automatic logic [15:0] bf_add(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] p, q, r;
    logic [10:0] mp, mq;
    logic [11:0] s;
    int          ep, eq, dd, e;
    if (x[14:7] == 0) return (y[14:7] == 0) ? 16'h0000 : y;
    if (y[14:7] == 0) return x;
    if (x[14:0] >= y[14:0]) begin p = x; q = y; end else begin p = y; q = x; end
    ep = int'(p[14:7]); eq = int'(q[14:7]); dd = ep - eq;
    mp = {1'b1, p[6:0], 3'b000};
    mq = (dd > 10) ? 11'd0 : ({1'b1, q[6:0], 3'b000} >> dd);
    e  = ep;
    if (p[15] == q[15]) begin
      s = {1'b0, mp} + {1'b0, mq};
      if (s[11]) begin s = s >> 1; e = e + 1; end
    end else begin
      s = {1'b0, mp} - {1'b0, mq};
      if (s == 0) return 16'h0000;
      for (int i = 0; i < 11; i++)
        if (!s[10]) begin s = s << 1; e = e - 1; end
    end
    if (e >= 255) r = {p[15], 8'hFF, 7'd0};
    else if (e <= 0) r = 16'h0000;
    else r = {p[15], 8'(e), s[9:3]};
    return r;
  endfunction

  function automatic logic [15:0] bf_mul(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] pr;
    logic        sg;
    int          e;
    sg = x[15] ^ y[15];
    if (x[14:7] == 0 || y[14:7] == 0) return {sg, 15'd0};
    pr = {1'b1, x[6:0]} * {1'b1, y[6:0]};
    e  = int'(x[14:7]) + int'(y[14:7]) - 127;
    if (pr[15]) begin e = e + 1; return clamp(sg, e, pr[14:8]); end
    return clamp(sg, e, pr[13:7]);
  endfunction

  function automatic logic [15:0] clamp(input logic sg, input int e, input logic [6:0] m);
    if (e >= 255) return {sg, 8'hFF, 7'd0};
    if (e <= 0)   return {sg, 15'd0};
    return {sg, 8'(e), m};
  endfunction

  function automatic logic [15:0] i2f(input logic [15:0] x);
    logic [15:0] mag;
    int          msb;
    logic [15:0] norm;
    if (x == 0) return 16'h0000;
    mag = x[15] ? (~x + 16'd1) : x;
    msb = 0;
    for (int i = 0; i < 16; i++) if (mag[i]) msb = i;
    norm = mag << (15 - msb);             // leading one at bit 15
    return {x[15], 8'(127 + msb), norm[14:8]};
  endfunction

  function automatic logic [15:0] f2i(input logic [15:0] x);
    int          e;
    logic [31:0] m;
    logic [15:0] mag;
    e = int'(x[14:7]) - 127;
    if (x[14:7] == 0 || e < 0) return 16'h0000;
    if (e >= 15) return x[15] ? 16'h8000 : 16'h7FFF;
    m   = {24'd0, 1'b1, x[6:0]} << e;      // value * 2^7
    mag = m[22:7];
    return x[15] ? (~mag + 16'd1) : mag;
  endfunction

  // ---------------- integer datapath ----------------
  logic [16:0] sum;
  logic        cin;
  logic [15:0] bop;
  logic        a_ge_b, a_le_b;
  logic [31:0] prod;
  logic [15:0] ipart;    // trunc(a) as BFloat16, for GETFR

  always_comb begin
    bop = b;
    cin = 1'b0;
    unique case (op)
      OP_SUB: begin bop = ~b; cin = 1'b1; end
      OP_ADC: begin bop = b;  cin = d;    end
      OP_SBC: begin bop = ~b; cin = d;    end
      default: ;
    endcase
    sum    = {1'b0, a} + {1'b0, bop} + 17'(cin);
    a_ge_b = is_signed ? ($signed(a) >= $signed(b)) : (a >= b);
    a_le_b = is_signed ? ($signed(a) <= $signed(b)) : (a <= b);
    ipart  = i2f(f2i(a));
    prod   = is_signed ? 32'($signed(a) * $signed(b)) : 32'(a * b);
  end

  always_comb begin
    res = '0;
    fc  = 1'b0;
    fv  = 1'b0;
    unique case (op)
      OP_ADD, OP_SUB, OP_ADC, OP_SBC: begin
        res = sum[15:0];
        fc  = sum[16];
        fv  = (a[15] == bop[15]) && (sum[15] != a[15]);
      end
      OP_ABS:  res = a[15] ? (~a + 16'd1) : a;
      OP_GTE:  begin res = a_ge_b ? a : b; fc = a_ge_b; end
      OP_LTE:  begin res = a_le_b ? a : b; fc = a_le_b; end
      OP_SEL:  res = d ? a : b;
      OP_MUL:  res = prod[15:0];
      OP_SHR:  res = is_signed ? 16'($signed(a) >>> b[3:0]) : (a >> b[3:0]);
      OP_SHL:  res = a << b[3:0];
      OP_OR:   res = a | b;
      OP_AND:  res = a & b;
      OP_XOR:  res = a ^ b;
      OP_FADD: res = bf_add(a, b);
      OP_FSUB, OP_FCMP: begin
        res = bf_add(a, {~b[15], b[14:0]});
        fc  = !res[15] || (res[14:7] == 0);   // a >= b
      end
      OP_FMUL:    res = bf_mul(a, b);
      OP_GETMAN:  res = {9'd0, a[6:0]};
      OP_ADDIEXP: res = clamp(a[15], int'(a[14:7]) + int'($signed(b)), a[6:0]);
      OP_SUBEXP:  res = (b[14:7] == 0) ? {a[15] ^ b[15], 8'hFF, 7'd0}
                        : clamp(a[15] ^ b[15], int'(a[14:7]) - int'(b[14:7]) + 127, a[6:0]);
      OP_EXP2F:   res = i2f(16'(int'(a[14:7]) - 127));
      OP_F2INT:   res = f2i(a);
      OP_GETFR:   res = bf_add(a, {~ipart[15], ipart[14:0]});
      OP_INT2F:   res = i2f(a);
      default:    res = '0;
    endcase
    fn = res[15];
    fz = (op inside {OP_FADD, OP_FSUB, OP_FCMP, OP_FMUL}) ? (res[14:0] == 0) : (res == 0);
  end
endmodule
