// Power-on reset generator.
//
// The board has no reset button, so the system reset is made here: after
// the clock generator reports a stable clock (locked high), a counter runs
// for THRESHOLD clock cycles while rst_50 is held low, then rst_50 goes high
// and stays high. If locked falls, the counter restarts and rst_50 goes low
// again. The flop values at configuration are given by initial values, as an
// FPGA loads them with the bitstream. rst_50 starts high and is pulled low
// on the first clock edge, so the asynchronous resets of the rest of the
// system see a real falling edge even in blocks whose clock does not run
// while the reset is held.
//
// The counter and compare against a threshold follow the specification;
// the THRESHOLD value and the use of locked to hold the counter are this
// design's choice.
//
// Lint notes: the counter and rst_q are written in a clocked process and
// also carry initial values, which is intended (configuration values).
// rst_q is flopped here synchronously and used as an asynchronous reset
// elsewhere, which is what a reset generator does.
//
// Interface: clk_50 (board oscillator), locked (active high), rst_50
// (active-low reset to the system), synchronous to clk_50.
module power_on_reset #(
  parameter int unsigned THRESHOLD = 1000
) (
  input  logic clk_50,
  input  logic locked,
  output logic rst_50
);

  localparam int unsigned CW = $clog2(THRESHOLD + 1);

  logic [CW-1:0] count = '0;
  logic          rst_q = 1'b1;

  assign rst_50 = rst_q;

  always_ff @(posedge clk_50) begin
    if (!locked) begin
      count <= '0;
      rst_q <= 1'b0;
    end else if (count < CW'(THRESHOLD)) begin
      count <= count + CW'(1);
      rst_q <= 1'b0;
    end else begin
      rst_q <= 1'b1;
    end
  end

endmodule
