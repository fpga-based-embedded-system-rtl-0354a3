// Self-checking test of cordic_sin: sweeps the Q3.29 angle range and random
// angles, comparing against the simulator's $sin with a tolerance of 3e-7, about 2^-22,
// set by the 24 rotation stages.
module tb_cordic_sin;
  logic signed [31:0] theta, sine;
  int checks = 0, failures = 0;

  cordic_sin dut (.theta(theta), .sine(sine));

  task automatic check_angle(input logic signed [31:0] th);
    real ang, ref_s, got;
    theta = th;
    #1;
    ang   = real'(th) / 536870912.0;   // 2^29
    ref_s = $sin(ang);
    got   = real'(sine) / 1073741824.0;  // 2^30
    checks++;
    if (got - ref_s > 3.0e-7 || ref_s - got > 3.0e-7) begin
      failures++;
      $display("FAIL theta=%f sin=%f got=%f", ang, ref_s, got);
    end
  endtask

  initial begin
    for (int k = -400; k <= 400; k++) check_angle(32'(k * 5368709));  // 0.01 rad steps
    repeat (2000) check_angle($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
