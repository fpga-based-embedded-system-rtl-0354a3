// Peripheral clock divider: four slow clocks from the 50 MHz system clock.
//
// Each output has its own counter. While the counter is below its
// threshold DIV/2 - 1 it counts up; once it is not below it the output is
// inverted and the counter restarts, so output k has period CLK_k input
// clocks and a 50 % duty cycle. With a 50 MHz input the default factors give
// 83.3 kHz (600), 25 kHz (2000), 160.3 kHz (312) and 25 MHz (2); the system
// top sets the fourth factor to 25000 for the 2 kHz traction control clock.
// All outputs and counters are held low while rst is low or locked is low.
//
// The counter/threshold/invert scheme and the default factors follow the
// specification; reading a factor as the full output period and the
// threshold DIV/2 - 1 are this design's choice, which reproduces the
// specified output frequencies. Factors must be even and at least 2. For a
// factor of 2 the threshold is 0, so the compare is constantly false and
// lint tools report an always-false unsigned compare; the output then simply
// toggles every clock, which is the intended divide-by-2.
module clock_divider #(
  parameter int unsigned CLK_0 = 600,
  parameter int unsigned CLK_1 = 2000,
  parameter int unsigned CLK_2 = 312,
  parameter int unsigned CLK_3 = 2
) (
  input  logic clk,
  input  logic rst,       // active low
  input  logic locked,
  output logic clk_out0,
  output logic clk_out1,
  output logic clk_out2,
  output logic clk_out3
);

  localparam int unsigned DIV [4] = '{CLK_0, CLK_1, CLK_2, CLK_3};
  localparam int unsigned M01 = CLK_0 > CLK_1 ? CLK_0 : CLK_1;
  localparam int unsigned M23 = CLK_2 > CLK_3 ? CLK_2 : CLK_3;
  localparam int unsigned CW  = $clog2(M01 > M23 ? M01 : M23) + 1;

  logic [CW-1:0] count [4];
  logic [3:0]    outs;

  assign {clk_out3, clk_out2, clk_out1, clk_out0} = outs;

  initial begin
    for (int k = 0; k < 4; k++) assert (DIV[k] >= 2 && DIV[k] % 2 == 0);
  end

  for (genvar k = 0; k < 4; k++) begin : g_div
    always_ff @(posedge clk or negedge rst) begin
      if (!rst) begin
        count[k] <= '0;
        outs[k]  <= 1'b0;
      end else if (!locked) begin
        count[k] <= '0;
        outs[k]  <= 1'b0;
      end else if (count[k] < CW'(DIV[k] / 2 - 1)) begin
        count[k] <= count[k] + CW'(1);
      end else begin
        count[k] <= '0;
        outs[k]  <= ~outs[k];
      end
    end
  end

endmodule
