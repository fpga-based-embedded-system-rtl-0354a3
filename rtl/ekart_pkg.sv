// Shared types and constants of the kart controller custom logic.
//
// fp_op_e selects how an fp_operator instance is configured, in the way a
// floating-point core generator fixes one operation per instance. The float
// constants are IEEE-754 single-precision bit patterns. The base addresses
// are the 64 KB windows of the peripheral address map; each custom
// peripheral decodes the low 16 bits itself.
package ekart_pkg;

  typedef enum logic [2:0] {
    FP_MUL     = 3'd0,  // a * b
    FP_ADD     = 3'd1,  // a + b
    FP_SUB     = 3'd2,  // a - b
    FP_LT      = 3'd3,  // result[0] = (a < b)
    FP_GT      = 3'd4,  // result[0] = (a > b)
    FP_FLT2FIX = 3'd5,  // float a -> signed fixed point with FRAC fraction bits
    FP_FIX2FLT = 3'd6   // signed fixed point a with FRAC fraction bits -> float
  } fp_op_e;

  // IEEE-754 single-precision constants
  localparam logic [31:0] F32_ZERO     = 32'h0000_0000;
  localparam logic [31:0] F32_ONE      = 32'h3F80_0000;  //  1.0
  localparam logic [31:0] F32_HALF     = 32'h3F00_0000;  //  0.5
  localparam logic [31:0] F32_M_HALF   = 32'hBF00_0000;  // -0.5
  localparam logic [31:0] F32_TENTH    = 32'h3DCC_CCCD;  //  0.1
  localparam logic [31:0] F32_QNAN     = 32'h7FC0_0000;

  // Fixed-point formats used between the float converters and the CORDIC
  localparam int unsigned ANGLE_FRAC = 29;  // angle in radians, signed Q3.29
  localparam int unsigned SINE_FRAC  = 30;  // sine, signed Q2.30

  // Peripheral windows of the address map (upper 16 address bits)
  localparam logic [15:0] BASE_DIGITAL_OUTPUT = 16'hC1E0;
  localparam logic [15:0] BASE_DIGITAL_INPUT  = 16'hC500;
  localparam logic [15:0] BASE_ANALOG_INPUT   = 16'hC520;
  localparam logic [15:0] BASE_TCS_LEFT       = 16'hC720;
  localparam logic [15:0] BASE_TCS_RIGHT      = 16'hC722;
  localparam logic [15:0] BASE_TORQUE_VECT    = 16'hC9A0;

  // Slave indices of the bus decoder
  typedef enum logic [2:0] {
    SL_TV   = 3'd0,
    SL_TCSL = 3'd1,
    SL_TCSR = 3'd2,
    SL_DI   = 3'd3,
    SL_DO   = 3'd4,
    SL_AI   = 3'd5,
    SL_EXT  = 3'd6
  } slave_e;

endpackage
