// Torque vectoring coprocessor.
//
// Computes the share of torque moved from the inner to the outer rear wheel
//     torque = speed^2 * sin^2(steering) * torque_factor * torque_const
// in IEEE-754 single precision (speed in m/s, steering angle in radians,
// torque_factor the driver-selected sensitivity d of 0, 0.2 .. 0.5 and
// torque_const the vehicle constant 1.85736). A step counter walks through
// seven steps, each one clock long, with one multiplier shared by all five
// multiplications:
//   0  capture speed, factor and constant; steering float -> Q3.29 fixed
//   1  CORDIC sine of the angle;            acc = speed * speed
//   2  sine Q2.30 fixed -> float;           acc = acc * factor
//   3  acc = acc * const
//   4  acc = acc * sine
//   5  acc = acc * sine
//   6  torque <= acc, done pulses for one clock
// and then starts again with whatever the input registers hold, so a new
// result appears every CYCLES = 7 clocks without any start command. The
// formula, the operator set (multiplier, float/fixed converters, CORDIC
// sine), the one-operation-per-clock sequencing and the 7-clock period are
// the specified behaviour; the order of the multiplications and the done
// output are this implementation's choice.
//
// Timing: torque changes on the clock edge that ends step 6; reset (rst,
// active low, asynchronous) clears torque and restarts at step 0.
module torque_vectoring
  import ekart_pkg::*;
(
  input  logic        clk,
  input  logic        rst,             // active low
  input  logic [31:0] speed,           // float, m/s
  input  logic [31:0] steering_input,  // float, radians
  input  logic [31:0] torque_factor,   // float, factor d
  input  logic [31:0] torque_const,    // float, vehicle constant
  output logic [31:0] torque,          // float result register
  output logic        done             // one-clock pulse when torque is written
);

  localparam int unsigned CYCLES = 7;

  logic [2:0]  step;
  logic [31:0] spd_q, fac_q, const_q, angle_q, sine_fix_q, sine_q, acc_q;
  logic [31:0] ang_fix, sine_fix, sine_flt, mul_a, mul_b, mul_r;

  fp_operator #(.OP(FP_FLT2FIX), .FRAC(ANGLE_FRAC)) u_f2x (
    .a(steering_input), .b('0), .result(ang_fix));
  cordic_sin u_sin (.theta(angle_q), .sine(sine_fix));
  fp_operator #(.OP(FP_FIX2FLT), .FRAC(SINE_FRAC)) u_x2f (
    .a(sine_fix_q), .b('0), .result(sine_flt));
  fp_operator #(.OP(FP_MUL)) u_mul (.a(mul_a), .b(mul_b), .result(mul_r));

  // operand selection of the shared multiplier
  always_comb begin
    mul_a = acc_q;
    mul_b = sine_q;
    unique case (step)
      3'd1:    begin mul_a = spd_q; mul_b = spd_q;   end
      3'd2:    mul_b = fac_q;
      3'd3:    mul_b = const_q;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      step       <= '0;
      spd_q      <= '0;
      fac_q      <= '0;
      const_q    <= '0;
      angle_q    <= '0;
      sine_fix_q <= '0;
      sine_q     <= '0;
      acc_q      <= '0;
      torque     <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      step <= (step == 3'(CYCLES - 1)) ? '0 : step + 3'd1;
      unique case (step)
        3'd0: begin
          spd_q   <= speed;
          fac_q   <= torque_factor;
          const_q <= torque_const;
          angle_q <= ang_fix;
        end
        3'd1: begin
          sine_fix_q <= sine_fix;
          acc_q      <= mul_r;
        end
        3'd2: begin
          sine_q <= sine_flt;
          acc_q  <= mul_r;
        end
        3'd3, 3'd4, 3'd5: acc_q <= mul_r;
        3'd6: begin
          torque <= acc_q;
          done   <= 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
