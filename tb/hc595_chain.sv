// Behavioural model of N_CHIPS chained 74HC595 serial-in/parallel-out shift
// registers with output latches, for simulation only. A rising sck edge
// shifts ser in at the first chip's QA; a rising rck edge copies the whole
// chain into the output latches q (q[0] = QA of the first chip).
module hc595_chain #(
  parameter int N_CHIPS = 5
) (
  input  logic                 ser,
  input  logic                 sck,
  input  logic                 rck,
  output logic [8*N_CHIPS-1:0] q
);
  logic [8*N_CHIPS-1:0] sr = '0;
  initial q = '0;
  always @(posedge sck) sr <= {sr[8*N_CHIPS-2:0], ser};
  always @(posedge rck) q <= sr;
endmodule
