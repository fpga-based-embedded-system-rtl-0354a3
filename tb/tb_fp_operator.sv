// Self-checking test of fp_operator in all of its configurations.
//
// Random single-precision operands (exponents kept within a band where the
// double-precision reference sum and product are exact) and a set of special
// cases are applied to one instance of each operation. Expected results come
// from the simulator's double-precision real arithmetic, rounded to single
// precision (nearest, ties to even) by a conversion function in this file,
// and from plain integer reasoning for the comparators.
module tb_fp_operator;
  import ekart_pkg::*;

  logic [31:0] a, b;
  logic [31:0] r_mul, r_add, r_sub, r_lt, r_gt, r_f2x, r_x2f;
  int checks = 0, failures = 0;

  fp_operator #(.OP(FP_MUL))                   u_mul (.a(a), .b(b), .result(r_mul));
  fp_operator #(.OP(FP_ADD))                   u_add (.a(a), .b(b), .result(r_add));
  fp_operator #(.OP(FP_SUB))                   u_sub (.a(a), .b(b), .result(r_sub));
  fp_operator #(.OP(FP_LT))                    u_lt  (.a(a), .b(b), .result(r_lt));
  fp_operator #(.OP(FP_GT))                    u_gt  (.a(a), .b(b), .result(r_gt));
  fp_operator #(.OP(FP_FLT2FIX), .FRAC(29))    u_f2x (.a(a), .b(b), .result(r_f2x));
  fp_operator #(.OP(FP_FIX2FLT), .FRAC(29))    u_x2f (.a(a), .b(b), .result(r_x2f));

  // single -> double by re-biasing the exponent (subnormals read as zero)
  function automatic real f2r(input logic [31:0] x);
    if (x[30:23] == 0) return 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction
  // double -> single, round to nearest even, flush tiny results to zero
  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    d = $realtobits(x);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((d[27:0] != 0) || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction
  function automatic logic [31:0] rnd_float(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  function automatic longint round_even(input real x);
    real    fl, fr;
    longint n;
    fl = $floor(x);
    fr = x - fl;
    n  = longint'(fl);
    if (fr > 0.5 || (fr == 0.5 && n[0])) n = n + 1;
    return n;
  endfunction

  task automatic check_arith();
    real ra, rb, rx;
    ra = f2r(a);
    rb = f2r(b);
    #1;
    check("mul", r_mul, r2f(ra * rb));
    check("add", r_add, r2f(ra + rb));
    check("sub", r_sub, r2f(ra - rb));
    check("lt",  r_lt,  {31'd0, ra < rb});
    check("gt",  r_gt,  {31'd0, ra > rb});
    rx = ra * 536870912.0;  // 2^29
    if (rx < 2147483647.0 && rx > -2147483648.0)
      check("f2x", r_f2x, 32'(round_even(rx)));
  endtask

  initial begin
    // special cases
    a = F32_ONE; b = F32_ZERO;           check_arith();
    a = F32_HALF; b = F32_M_HALF;        check_arith();  // exact cancellation
    a = 32'h3F80_0001; b = 32'hBF80_0000; check_arith(); // one-ulp difference
    a = 32'h4B00_0000; b = 32'h3F00_0000; check_arith(); // tie in addition
    a = 32'h7F00_0000; b = 32'h4100_0000; #1;
    check("overflow", r_mul, 32'h7F80_0000);
    a = 32'h7F80_0000; b = F32_ZERO; #1;
    check("inf*0", r_mul, F32_QNAN);
    a = 32'h4100_0000; b = 32'h4100_0000; #1;   // 8.0 saturates Q3.29
    check("f2x sat", r_f2x, 32'h7FFF_FFFF);
    a = 32'hC100_0000; #1;
    check("f2x satn", r_f2x, 32'h8000_0001);
    // random arithmetic, exponents within a band of 20
    repeat (3000) begin
      a = rnd_float(117, 137);
      b = rnd_float(117, 137);
      check_arith();
    end
    // random fixed-to-float
    repeat (1000) begin
      a = $urandom;
      if ($urandom_range(0, 1) == 1) a = a >>> $urandom_range(0, 30);
      #1;
      check("x2f", r_x2f, r2f(real'(signed'(a)) / 536870912.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
