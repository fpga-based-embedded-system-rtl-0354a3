// Self-checking test of traction_control.
//
// Drives a slip profile shaped like a wheel spinning up and recovering
// (slip ramps from 0 to 0.21 and back down below zero) against a set point
// of 0.1, and after each step compares the correction factor with a
// reference PI controller written here step by step with every intermediate
// rounded to single precision (tolerance 1e-6). It checks that a step takes
// 12 + LATENCY clocks and counts how often each saturation clipped; a
// saturation that never clips is a failure. Finally it checks the shape of
// the response: full torque (factor 1) before the slip builds up and again
// once it has fallen below the set point, and a dip below 0.5 in between.
module tb_traction_control;
  logic        clk = 1'b0, rst = 1'b0, done, sat1, sat2;
  logic [31:0] ts, pg, ig, aw, slip, sp, corr;
  int checks = 0, failures = 0;
  int cyc = 0, last_done = -1;
  int n_sat1 = 0, n_sat2 = 0;
  real first_c = 0.0, last_c = 0.0, min_c = 2.0;
  localparam int LAT = 8;

  traction_control #(.LATENCY(LAT)) dut (
    .clk(clk), .reset(rst), .t_sample(ts), .p(pg), .i(ig), .antiwindup(aw),
    .pattern(slip), .pattern_est(sp), .correction(corr), .done(done),
    .sat1_active(sat1), .sat2_active(sat2));

  always #5 clk = ~clk;

  function automatic real f2r(input logic [31:0] x);
    if (x[30:23] == 0) return 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction
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
  function automatic real rs(input real x);  // round to single
    return f2r(r2f(x));
  endfunction
  function automatic real clamp(input real x, input real lo, input real hi);
    return x < lo ? lo : (x > hi ? hi : x);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (done && rst) begin   // outputs before reset are arbitrary
      if (last_done >= 0) begin
        checks++;
        if (cyc - last_done != 12 + LAT) begin
          failures++;
          $display("FAIL step period %0d", cyc - last_done);
        end
      end
      last_done = cyc;
      if (sat1) n_sat1++;
      if (sat2) n_sat2++;
    end
  end

  initial begin
    real x, e, u, s1, ein, c, want, s;
    ts = r2f(0.01); pg = r2f(5.0); ig = r2f(10.0); aw = r2f(1.0);
    sp = r2f(0.1);  slip = 0;
    x = 0.0;
    repeat (3) @(posedge clk);
    rst = 1'b1;
    for (int k = 0; k < 200; k++) begin
      s    = (k < 40) ? 0.21 * k / 40.0 : 0.21 - 0.23 * (k - 40) / 160.0;
      slip = r2f(s);
      // the core samples at step 0, right after the previous done
      @(posedge clk iff done);
      // reference step with the sample that was applied
      e    = rs(f2r(slip) - f2r(sp));
      u    = rs(rs(f2r(pg) * e) + rs(f2r(ig) * x));
      s1   = clamp(u, -0.5, 0.5);
      ein  = rs(e - rs(f2r(aw) * rs(u - s1)));
      x    = rs(x + rs(f2r(ts) * ein));
      c    = rs(0.5 - s1);
      want = clamp(c, f2r(32'h3DCC_CCCD), 1.0);
      #1;
      if (k == 0) first_c = f2r(corr);
      last_c = f2r(corr);
      if (f2r(corr) < min_c) min_c = f2r(corr);
      checks++;
      if (f2r(corr) - want > 1.0e-6 || want - f2r(corr) > 1.0e-6) begin
        failures++;
        $display("FAIL k=%0d slip=%f got=%f want=%f", k, s, f2r(corr), want);
      end
    end
    $display("saturation 1 clipped %0d times, saturation 2 clipped %0d times", n_sat1, n_sat2);
    checks += 2;
    if (n_sat1 == 0) failures++;
    if (n_sat2 == 0) failures++;
    $display("correction: first %f, minimum %f, last %f", first_c, min_c, last_c);
    checks += 3;
    if (first_c != 1.0) failures++;
    if (min_c >= 0.5) failures++;
    if (last_c != 1.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
