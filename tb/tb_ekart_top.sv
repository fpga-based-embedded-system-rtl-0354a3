// End-to-end test of ekart_top at reduced size: short power-on reset and
// fast peripheral clocks (division factors 6, 8, 4 and 4 instead of 600,
// 2000, 312 and 25000), so that every mechanism runs within a few thousand
// bus clocks. The test itself is in ekart_top_env.
module tb_ekart_top;
  ekart_top_env #(.FULL(1'b0)) env ();
endmodule
