// Sine of an angle by CORDIC rotation, fully parallel and combinational.
//
// The angle (radians, signed Q3.29, the whole range -4..+4 is accepted) is
// first folded into [-pi/2, +pi/2] with sin(pi - t) = sin(t) and
// sin(-pi - t) = sin(t). A vector starting at (K, 0), K being the inverse
// CORDIC gain, is then rotated by ITER micro-rotations of +-atan(2^-i),
// each choosing its sign so as to drive the residual angle to zero; the
// final y coordinate is the sine. All ITER stages are unrolled into one
// combinational path, which is the fully parallel, single-cycle-throughput
// arrangement: the caller registers the result, and the long path is what
// limits the clock of the torque vectoring coprocessor.
//
// Interface: theta (signed Q3.29 radians) in, sine (signed Q2.30) out,
// absolute error a few LSB of Q2.30 for the default 24 stages.
module cordic_sin #(
  parameter int unsigned ITER = 24
) (
  input  logic signed [31:0] theta,
  output logic signed [31:0] sine
);

  localparam logic signed [33:0] PI      = 34'sh0_6487_ED51;  // pi in Q3.29
  localparam logic signed [33:0] HALF_PI = 34'sh0_3243_F6A9;  // pi/2 in Q3.29
  localparam logic signed [33:0] K_INV   = 34'sh0_26DD_3B6A;  // 0.607253 in Q2.30
  localparam logic signed [33:0] ONE     = 34'sh0_4000_0000;  // 1.0 in Q2.30

  // atan(2^-i) in Q3.29; below 2^-10 the arctangent equals its argument
  // to within the LSB, so the table continues as 2^(29-i).
  function automatic logic signed [33:0] atan_tab(input int i);
    case (i)
      0:       return 34'sh1921FB54;
      1:       return 34'sh0ED63383;
      2:       return 34'sh07D6DD7E;
      3:       return 34'sh03FAB753;
      4:       return 34'sh01FF55BB;
      5:       return 34'sh00FFEAAE;
      6:       return 34'sh007FFD55;
      7:       return 34'sh003FFFAB;
      8:       return 34'sh001FFFF5;
      9:       return 34'sh000FFFFF;
      default: return (i > 29) ? 34'sd0 : (34'sd1 <<< (29 - i));
    endcase
  endfunction

  logic signed [33:0] xs [ITER+1];
  logic signed [33:0] ys [ITER+1];
  logic signed [33:0] zs [ITER+1];
  logic signed [33:0] t;

  always_comb begin
    t = 34'(theta);
    xs[0] = K_INV;
    ys[0] = '0;
    if (t > HALF_PI)       zs[0] = PI - t;
    else if (t < -HALF_PI) zs[0] = -PI - t;
    else                   zs[0] = t;
    for (int i = 0; i < int'(ITER); i++) begin
      if (zs[i] >= 0) begin
        xs[i+1] = xs[i] - (ys[i] >>> i);
        ys[i+1] = ys[i] + (xs[i] >>> i);
        zs[i+1] = zs[i] - atan_tab(i);
      end else begin
        xs[i+1] = xs[i] + (ys[i] >>> i);
        ys[i+1] = ys[i] - (xs[i] >>> i);
        zs[i+1] = zs[i] + atan_tab(i);
      end
    end
    if (ys[ITER] > ONE)       sine = 32'(ONE);
    else if (ys[ITER] < -ONE) sine = 32'(-ONE);
    else                      sine = 32'(ys[ITER]);
  end

endmodule
