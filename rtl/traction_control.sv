// Traction control coprocessor: one step of a PI slip controller per sample.
//
// The controller turns the wheel-slip error into a torque correction factor:
//   e    = pattern - pattern_est               (actual slip - set point)
//   u    = p * e + i * x                       (x: integrator state)
//   s1   = clamp(u, SAT1_LO, SAT1_HI)          (saturation 1)
//   x   += t_sample * (e - antiwindup * (u - s1))   (forward-Euler integrator
//                                               with back-calculation anti-windup)
//   correction = clamp(CTRL_CONST - s1, SAT2_LO, SAT2_HI)   (saturation 2)
// all in IEEE-754 single precision, one operation per clock, with one
// multiplier, one adder (subtraction by flipping the sign of the second
// operand) and a less-than / greater-than comparator pair that evaluates
// both bounds of a saturation in the same clock:
//   0 capture inputs, e      4 s1 = sat1(u)     8 dx = t_sample * ein
//   1 pe = p * e             5 du = u - s1      9 x = x + dx
//   2 ix = i * x             6 w = aw * du     10 c = CTRL_CONST - s1
//   3 u = pe + ix            7 ein = e - w     11 correction = sat2(c), done
// After step 11 the core waits LATENCY clocks and then captures the next
// sample, so a step takes 12 + LATENCY clocks.
//
// The controller structure, the 0.5 controller constant, the operator set,
// the 12-clock step and the LATENCY wait follow the specification. The
// saturation bounds are not specified: SAT2 = [0.1, 1.0] is the documented
// range of the correction factor, SAT1 = [-0.5, +0.5] is this design's
// choice, and LATENCY = 8 makes a step 20 clocks (10 ms at 2 kHz).
//
// Interface: all data ports are float bit patterns; rst is active low and
// asynchronous and clears the integrator and the correction register.
module traction_control
  import ekart_pkg::*;
#(
  parameter int unsigned LATENCY    = 8,
  parameter logic [31:0] SAT1_LO    = F32_M_HALF,
  parameter logic [31:0] SAT1_HI    = F32_HALF,
  parameter logic [31:0] SAT2_LO    = F32_TENTH,
  parameter logic [31:0] SAT2_HI    = F32_ONE,
  parameter logic [31:0] CTRL_CONST = F32_HALF
) (
  input  logic        clk,
  input  logic        reset,        // active low
  input  logic [31:0] t_sample,
  input  logic [31:0] p,
  input  logic [31:0] i,
  input  logic [31:0] antiwindup,
  input  logic [31:0] pattern,      // actual slip
  input  logic [31:0] pattern_est,  // slip set point
  output logic [31:0] correction,
  output logic        done,         // one-clock pulse when correction is written
  output logic        sat1_active,  // saturation 1 clipped in the last step
  output logic        sat2_active   // saturation 2 clipped in the last step
);

  localparam int unsigned STEPS = 12;
  localparam int unsigned TOTAL = STEPS + LATENCY;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic [CW-1:0] step;
  logic [31:0]   ts_q, p_q, i_q, aw_q;
  logic [31:0]   e_q, pe_q, ix_q, u_q, s1_q, du_q, w_q, ein_q, dx_q, x_q, c_q;
  logic [31:0]   mul_a, mul_b, mul_r, add_a, add_b, add_r, cmp_x, cmp_lo, cmp_hi;
  logic [31:0]   lt_r, gt_r;
  logic          sub;

  fp_operator #(.OP(FP_MUL)) u_mul (.a(mul_a), .b(mul_b), .result(mul_r));
  fp_operator #(.OP(FP_ADD)) u_add (.a(add_a), .b(sub ? {~add_b[31], add_b[30:0]} : add_b),
                                    .result(add_r));
  fp_operator #(.OP(FP_LT))  u_lt  (.a(cmp_x), .b(cmp_lo), .result(lt_r));
  fp_operator #(.OP(FP_GT))  u_gt  (.a(cmp_x), .b(cmp_hi), .result(gt_r));

  always_comb begin
    mul_a  = p_q;  mul_b = e_q;
    add_a  = pattern; add_b = pattern_est; sub = 1'b1;
    cmp_x  = u_q;  cmp_lo = SAT1_LO; cmp_hi = SAT1_HI;
    case (step)
      CW'(2):  begin mul_a = i_q;  mul_b = x_q;  end
      CW'(3):  begin add_a = pe_q; add_b = ix_q; sub = 1'b0; end
      CW'(5):  begin add_a = u_q;  add_b = s1_q; end
      CW'(6):  begin mul_a = aw_q; mul_b = du_q; end
      CW'(7):  begin add_a = e_q;  add_b = w_q;  end
      CW'(8):  begin mul_a = ts_q; mul_b = ein_q; end
      CW'(9):  begin add_a = x_q;  add_b = dx_q; sub = 1'b0; end
      CW'(10): begin add_a = CTRL_CONST; add_b = s1_q; end
      CW'(11): begin cmp_x = c_q;  cmp_lo = SAT2_LO; cmp_hi = SAT2_HI; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      step <= '0;
      {ts_q, p_q, i_q, aw_q} <= '0;
      {e_q, pe_q, ix_q, u_q, s1_q, du_q, w_q, ein_q, dx_q, x_q, c_q} <= '0;
      correction  <= '0;
      done        <= 1'b0;
      sat1_active <= 1'b0;
      sat2_active <= 1'b0;
    end else begin
      done <= 1'b0;
      step <= (step == CW'(TOTAL - 1)) ? '0 : step + CW'(1);
      case (step)
        CW'(0): begin
          ts_q <= t_sample;
          p_q  <= p;
          i_q  <= i;
          aw_q <= antiwindup;
          e_q  <= add_r;
        end
        CW'(1):  pe_q <= mul_r;
        CW'(2):  ix_q <= mul_r;
        CW'(3):  u_q  <= add_r;
        CW'(4): begin
          s1_q        <= lt_r[0] ? SAT1_LO : (gt_r[0] ? SAT1_HI : u_q);
          sat1_active <= lt_r[0] | gt_r[0];
        end
        CW'(5):  du_q  <= add_r;
        CW'(6):  w_q   <= mul_r;
        CW'(7):  ein_q <= add_r;
        CW'(8):  dx_q  <= mul_r;
        CW'(9):  x_q   <= add_r;
        CW'(10): c_q   <= add_r;
        CW'(11): begin
          correction  <= lt_r[0] ? SAT2_LO : (gt_r[0] ? SAT2_HI : c_q);
          sat2_active <= lt_r[0] | gt_r[0];
          done        <= 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
