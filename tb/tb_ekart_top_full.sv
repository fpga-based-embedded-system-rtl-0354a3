// End-to-end test of ekart_top with all parameters at their defaults: 1000
// cycle power-on reset, 83.3 kHz outputs, 25 kHz inputs, 160.3 kHz ADC and
// 2 kHz traction control clocks from a 50 MHz bus clock. It runs the same
// sequence as tb_ekart_top (see ekart_top_env), about 30 ms of operation.
module tb_ekart_top_full;
  ekart_top_env #(.FULL(1'b1)) env ();
endmodule
