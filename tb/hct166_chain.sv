// Behavioural model of N_CHIPS chained 74HCT166 parallel-in/serial-out
// shift registers, for simulation only. On a rising clk edge the chain
// loads par when sh_ld is low and shifts towards qh otherwise. par holds
// the chip nearest qh in its top byte, input H as the most significant bit.
module hct166_chain #(
  parameter int N_CHIPS = 3
) (
  input  logic                 clk,
  input  logic                 sh_ld,
  input  logic [8*N_CHIPS-1:0] par,
  output logic                 qh
);
  logic [8*N_CHIPS-1:0] sr = '0;
  always @(posedge clk) begin
    if (!sh_ld) sr <= par;
    else        sr <= {sr[8*N_CHIPS-2:0], 1'b0};
  end
  assign qh = sr[8*N_CHIPS-1];
endmodule
