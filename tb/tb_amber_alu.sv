// Self-checking testbench for the PE ALU.
// Integer operations are compared bit-exactly with expressions evaluated
// here. BFloat16 results are compared with real-number arithmetic truncated
// to BFloat16, allowing one unit in the last place. The division recipe
// (GETMAN -> reciprocal table -> SUBEXP -> FMUL) is checked against a/b.
module tb_amber_alu;
  import amber_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic is_signed, d, fn, fz, fc, fv;
  logic [15:0] a, b, res;

  amber_alu dut (.op, .is_signed, .a, .b, .d, .res, .fn, .fz, .fc, .fv);

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction
  function automatic real bf2r(input logic [15:0] x);
    if (x[14:7] == 0) return 0.0;
    return (x[15] ? -1.0 : 1.0) * (1.0 + real'(x[6:0]) / 128.0) * pow2(int'(x[14:7]) - 127);
  endfunction
  function automatic logic [15:0] r2bf(input real v);
    real m;
    int e;
    logic s;
    if (v == 0.0) return 16'h0000;
    s = (v < 0.0); m = s ? -v : v; e = 127;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    return {s, 8'(e), 7'($rtoi((m - 1.0) * 128.0))};
  endfunction
  function automatic logic [15:0] rnd_bf();
    return {1'($urandom), 8'($urandom_range(118, 136)), 7'($urandom)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic near(input logic [15:0] got, input logic [15:0] exp, input int ulp, input string what);
    int dlt;
    dlt = int'(got[14:0]) - int'(exp[14:0]);
    check((got == exp) || (got[14:0] == 0 && exp[14:0] == 0) ||
          (got[15] == exp[15] && dlt <= ulp && dlt >= -ulp),
          $sformatf("%s: got %h exp %h", what, got, exp));
  endtask
  task automatic run(input alu_op_e o, input logic [15:0] x, input logic [15:0] y, input logic dd);
    op = o; a = x; b = y; d = dd; #1;
  endtask

  initial begin
    logic [16:0] s17;
    logic [15:0] lut, rcp, q;
    is_signed = 0;
    repeat (300) begin
      logic [15:0] x, y;
      logic dd;
      x = 16'($urandom); y = 16'($urandom); dd = 1'($urandom);
      is_signed = 1'($urandom);
      run(OP_ADD, x, y, dd); s17 = {1'b0, x} + {1'b0, y};
      check(res == s17[15:0] && fc == s17[16], "ADD");
      check(fv == ((x[15] == y[15]) && (s17[15] != x[15])), "ADD overflow");
      run(OP_SUB, x, y, dd); check(res == 16'(x - y) && fc == (x >= y), "SUB");
      run(OP_ADC, x, y, dd); check(res == 16'(x + y + 16'(dd)), "ADC");
      run(OP_SBC, x, y, dd); check(res == 16'(x - y - 16'(!dd)), "SBC");
      run(OP_ABS, x, y, dd); check(res == (x[15] ? 16'(-x) : x), "ABS");
      run(OP_GTE, x, y, dd);
      if (is_signed) check(res == (($signed(x) >= $signed(y)) ? x : y) && fc == ($signed(x) >= $signed(y)), "GTE s");
      else           check(res == ((x >= y) ? x : y) && fc == (x >= y), "GTE u");
      run(OP_LTE, x, y, dd);
      if (is_signed) check(res == (($signed(x) <= $signed(y)) ? x : y), "LTE s");
      else           check(res == ((x <= y) ? x : y), "LTE u");
      run(OP_SEL, x, y, dd); check(res == (dd ? x : y), "SEL");
      run(OP_MUL, x, y, dd); check(res == 16'(x * y), "MUL");
      run(OP_SHR, x, y, dd);
      check(res == ((x >> y[3:0]) | ((is_signed && x[15]) ? ~(16'hFFFF >> y[3:0]) : 16'h0)), $sformatf("SHR s=%0d %h>>%0d = %h", is_signed, x, y[3:0], res));
      run(OP_SHL, x, y, dd); check(res == 16'(x << y[3:0]), "SHL");
      run(OP_OR,  x, y, dd); check(res == (x | y), "OR");
      run(OP_AND, x, y, dd); check(res == (x & y) && fz == ((x & y) == 0), "AND");
      run(OP_XOR, x, y, dd); check(res == (x ^ y), "XOR");
    end
    repeat (300) begin
      logic [15:0] x, y;
      int iv;
      x = rnd_bf(); y = rnd_bf();
      run(OP_FADD, x, y, 0); near(res, r2bf(bf2r(x) + bf2r(y)), 1, "FADD");
      run(OP_FSUB, x, y, 0); near(res, r2bf(bf2r(x) - bf2r(y)), 1, "FSUB");
      run(OP_FCMP, x, y, 0); check(fc == (bf2r(x) >= bf2r(y)), "FCMP flag");
      run(OP_FMUL, x, y, 0); near(res, r2bf(bf2r(x) * bf2r(y)), 0, "FMUL");
      run(OP_GETMAN, x, y, 0); check(res == {9'd0, x[6:0]}, "GETMAN");
      run(OP_EXP2F, x, y, 0); near(res, r2bf(real'(int'(x[14:7]) - 127)), 0, "EXP2F");
      iv = $urandom_range(0, 6000) - 3000;
      run(OP_INT2F, 16'(iv), y, 0); near(res, r2bf(real'(iv)), 0, "INT2F");
      run(OP_F2INT, x, y, 0); check(res == 16'($rtoi(bf2r(x))), $sformatf("F2INT %h -> %h", x, res));
      run(OP_GETFR, x, y, 0); near(res, r2bf(bf2r(x) - real'($rtoi(bf2r(x)))), 1, "GETFR");
      run(OP_ADDIEXP, x, 16'(3), 0); near(res, r2bf(bf2r(x) * 8.0), 0, "ADDIEXP");
      // division: reciprocal table holds 1/(1.f) for f = GETMAN(b)
      run(OP_GETMAN, y, 0, 0);
      lut = r2bf(1.0 / (1.0 + real'(res[6:0]) / 128.0));
      run(OP_SUBEXP, lut, y, 0); rcp = res;
      run(OP_FMUL, x, rcp, 0); q = res;
      near(q, r2bf(bf2r(x) / bf2r(y)), 2, "DIV");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
