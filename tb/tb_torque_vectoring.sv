// Self-checking test of torque_vectoring.
//
// Sweeps speed 0..40 m/s and steering 0..90 degrees with the factors of the
// driver switch (0 .. 0.5) and the constant 1.85736, holds each input set for
// two result periods and compares the second result with the formula
// v^2 * sin^2(delta) * d * c evaluated in double precision (relative
// tolerance 1e-5). It also checks that results come exactly every 7 clocks.
module tb_torque_vectoring;
  logic        clk = 1'b0, rst = 1'b0, done;
  logic [31:0] speed, steer, fac, cst, torque;
  int checks = 0, failures = 0;
  int cyc = 0, last_done = -1;

  torque_vectoring dut (.clk(clk), .rst(rst), .speed(speed), .steering_input(steer),
                        .torque_factor(fac), .torque_const(cst), .torque(torque), .done(done));

  always #5 clk = ~clk;

  function automatic real f2r(input logic [31:0] x);
    if (x[30:23] == 0) return 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction
  function automatic logic [31:0] r2f(input real x);  // truncating, inputs only
    logic [63:0] d;
    if (x == 0.0) return 32'd0;
    d = $realtobits(x);
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  // period check
  always @(posedge clk) begin
    cyc++;
    if (done && rst) begin   // outputs before reset are arbitrary
      if (last_done >= 0) begin
        checks++;
        if (cyc - last_done != 7) begin
          failures++;
          $display("FAIL period %0d", cyc - last_done);
        end
      end
      last_done = cyc;
    end
  end

  task automatic run(input real v, input real deg, input real d);
    real want, got, tol;
    speed = r2f(v);
    steer = r2f(deg * 3.14159265358979 / 180.0);
    fac   = r2f(d);
    cst   = r2f(1.85736);
    @(posedge clk iff done);
    @(posedge clk iff done);
    #1;
    want = f2r(speed) * f2r(speed) * f2r(fac) * f2r(cst);
    want = want * $sin(f2r(steer)) * $sin(f2r(steer));
    got  = f2r(torque);
    tol  = 1.0e-5 * (want < 0 ? -want : want) + 1.0e-9;
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("FAIL v=%f deg=%f d=%f got=%g want=%g", v, deg, d, got, want);
    end
  endtask

  initial begin
    speed = 0; steer = 0; fac = 0; cst = 0;
    repeat (3) @(posedge clk);
    rst = 1'b1;
    for (int v = 0; v <= 40; v += 5)
      for (int a = 0; a <= 90; a += 15)
        run(real'(v), real'(a), 0.2);
    run(40.0, 90.0, 0.0);
    run(40.0, 90.0, 0.3);
    run(40.0, 90.0, 0.4);
    run(38.889, 45.0, 0.5);
    run(12.5, -30.0, 0.5);   // left turn: sin^2 keeps the result positive
    repeat (40) run($urandom_range(0, 40000) / 1000.0, $urandom_range(0, 9000) / 100.0,
                    $urandom_range(0, 5) / 10.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
