// IEEE-754 single-precision operator, one operation per instance.
//
// The coprocessors do all their arithmetic in single precision and need a
// multiplier, an adder/subtractor, less-than and greater-than comparators
// and conversions between float and signed fixed point. This module provides
// any one of these, chosen by the OP parameter, as purely combinational
// logic: the calling sequencer applies operands and registers the result in
// the same clock cycle, so every operation of a coprocessor costs one clock.
//
// Numerics: round to nearest, ties to even. Subnormal inputs are read as
// zero and subnormal results are flushed to zero. A NaN operand, 0 * inf or
// inf - inf gives a quiet NaN; overflow gives a signed infinity. Comparisons
// are false if either operand is NaN, and +0 equals -0.
// FP_FLT2FIX rounds to nearest and saturates to the signed 32-bit range;
// FP_FIX2FLT rounds to nearest. FRAC is the number of fraction bits of the
// fixed-point side.
//
// Interface: a, b operands (b unused for conversions); result. For the
// comparators only result[0] is meaningful, the other bits are zero.
module fp_operator
  import ekart_pkg::*;
#(
  parameter fp_op_e      OP   = FP_MUL,
  parameter int unsigned FRAC = 29
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result
);

  // Round a normalised significand and pack. sig[49] is the leading one,
  // sig[48:26] the stored fraction, sig[25] the guard bit, sig[24:0] sticky.
  function automatic logic [31:0] round_pack(input logic s, input int e,
                                             input logic [49:0] sig);
    logic [24:0] m;
    logic        g, st, inc;
    int          ee;
    m   = {1'b0, sig[49:26]};
    g   = sig[25];
    st  = |sig[24:0];
    inc = g & (st | m[0]);
    m   = m + 25'(inc);
    ee  = e;
    if (m[24]) begin
      m  = m >> 1;
      ee = ee + 1;
    end
    if (ee >= 255)    return {s, 8'hFF, 23'd0};
    else if (ee <= 0) return {s, 31'd0};
    else              return {s, ee[7:0], m[22:0]};
  endfunction

  function automatic logic is_nan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction
  function automatic logic is_inf(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 0);
  endfunction
  function automatic logic is_zero(input logic [31:0] x);  // subnormals too
    return x[30:23] == 8'h00;
  endfunction

  function automatic logic [31:0] f_mul(input logic [31:0] x, input logic [31:0] y);
    logic        s;
    logic [47:0] prod;
    logic [49:0] sig;
    int          e;
    s = x[31] ^ y[31];
    if (is_nan(x) || is_nan(y)) return F32_QNAN;
    if (is_inf(x) || is_inf(y)) begin
      if (is_zero(x) || is_zero(y)) return F32_QNAN;
      return {s, 8'hFF, 23'd0};
    end
    if (is_zero(x) || is_zero(y)) return {s, 31'd0};
    prod = {24'd0, 1'b1, x[22:0]} * {24'd0, 1'b1, y[22:0]};
    e = int'(x[30:23]) + int'(y[30:23]) - 127;
    if (prod[47]) begin
      sig = {prod, 2'b00};
      e   = e + 1;
    end else begin
      sig = {prod[46:0], 3'b000};
    end
    return round_pack(s, e, sig);
  endfunction

  // Significand layout for the adder: [50] carry, [49] hidden one,
  // [48:26] fraction, [25:0] extension for guard and sticky bits.
  function automatic logic [31:0] f_add(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] larger, lesser;
    logic [50:0] mb, ms, r, lost;
    logic [49:0] sig;
    int          d, e, lz;
    if (is_nan(x) || is_nan(y)) return F32_QNAN;
    if (is_inf(x) && is_inf(y) && (x[31] != y[31])) return F32_QNAN;
    if (is_inf(x)) return x;
    if (is_inf(y)) return y;
    if (is_zero(x) && is_zero(y)) return {x[31] & y[31], 31'd0};
    if (is_zero(x)) return y;
    if (is_zero(y)) return x;
    if (x[30:0] >= y[30:0]) begin
      larger = x; lesser = y;
    end else begin
      larger = y; lesser = x;
    end
    mb = {2'b01, larger[22:0], 26'd0};
    ms = {2'b01, lesser[22:0], 26'd0};
    d  = int'(larger[30:23]) - int'(lesser[30:23]);
    if (d > 50) begin
      ms = 51'd1;  // only the sticky bit survives
    end else begin
      lost = ms & ((51'd1 << d) - 51'd1);
      ms   = (ms >> d) | {50'd0, |lost};
    end
    r = (larger[31] == lesser[31]) ? mb + ms : mb - ms;
    e = int'(larger[30:23]);
    if (r == 0) return F32_ZERO;
    if (r[50]) begin
      sig = r[50:1] | {49'd0, r[0]};
      e   = e + 1;
    end else begin
      lz = 49;
      for (int i = 0; i < 50; i++) if (r[i]) lz = 49 - i;
      sig = r[49:0] << lz;
      e   = e - lz;
    end
    return round_pack(larger[31], e, sig);
  endfunction

  function automatic logic f_lt(input logic [31:0] x, input logic [31:0] y);
    if (is_nan(x) || is_nan(y)) return 1'b0;
    if (is_zero(x) && is_zero(y)) return 1'b0;
    if (is_zero(x)) return !y[31];
    if (is_zero(y)) return x[31];
    if (x[31] != y[31]) return x[31];
    if (!x[31]) return x[30:0] < y[30:0];
    return x[30:0] > y[30:0];
  endfunction

  function automatic logic [31:0] f_to_fix(input logic [31:0] x);
    logic [63:0] mag, rem_mask;
    logic        half, rest;
    int          sh;
    if (is_nan(x)) return 32'd0;
    if (is_zero(x)) return 32'd0;
    sh = int'(x[30:23]) - 127 + int'(FRAC) - 23;
    if (sh >= 8) begin  // |x| * 2^FRAC >= 2^31: saturate
      mag = 64'h7FFF_FFFF;
    end else if (sh >= 0) begin
      mag = {40'd0, 1'b1, x[22:0]} << sh;
    end else if (sh >= -25) begin
      mag      = {40'd0, 1'b1, x[22:0]} >> (-sh);
      rem_mask = (64'd1 << (-sh)) - 64'd1;
      half     = (({40'd0, 1'b1, x[22:0]} >> (-sh - 1)) & 64'd1) != 0;
      rest     = ({40'd0, 1'b1, x[22:0]} & (rem_mask >> 1)) != 0;
      if (half && (rest || mag[0])) mag = mag + 64'd1;
    end else begin
      mag = 64'd0;
    end
    if (mag > 64'h7FFF_FFFF) mag = 64'h7FFF_FFFF;
    return x[31] ? 32'(-mag) : mag[31:0];
  endfunction

  function automatic logic [31:0] fix_to_f(input logic [31:0] x);
    logic        s;
    logic [31:0] mag;
    logic [49:0] sig;
    int          msb;
    if (x == 0) return F32_ZERO;
    s   = x[31];
    mag = s ? -x : x;  // -2^31 stays 2^31 as an unsigned magnitude
    msb   = 0;
    for (int i = 0; i < 32; i++) if (mag[i]) msb = i;
    sig = {mag, 18'd0} << (31 - msb);
    return round_pack(s, msb - int'(FRAC) + 127, sig);
  endfunction

  always_comb begin
    unique case (OP)
      FP_MUL:     result = f_mul(a, b);
      FP_ADD:     result = f_add(a, b);
      FP_SUB:     result = f_add(a, {~b[31], b[30:0]});
      FP_LT:      result = {31'd0, f_lt(a, b)};
      FP_GT:      result = {31'd0, f_lt(b, a)};
      FP_FLT2FIX: result = f_to_fix(a);
      FP_FIX2FLT: result = fix_to_f(a);
      default:    result = F32_QNAN;
    endcase
  end

endmodule
