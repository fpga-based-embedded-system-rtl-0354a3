// Digital input interface for a chain of 74HCT166 parallel-in/serial-out
// shift registers (three chips, 24 switch and button inputs).
//
// The module produces the chips' clock and shift/load signals and
// deserialises the chain's serial output. The chips are clocked with the
// inverted module clock, so they act in the middle of each module clock
// period and the module samples rx on the next rising edge, half a period
// later. One read takes N_INPUTS + 1 = 25 clocks:
//   tick 0          sh_ld low: the chips load their parallel inputs
//   ticks 0..23     rx is sampled at the end of each tick (first bit first),
//                   the chips shift in the middle of ticks 1..24
//   tick 24         the complete word is copied to in_reg, valid pulses
// after which the next read starts at once. The first bit out of the chain
// (input H of the chip wired to rx) lands in in_reg[N_INPUTS-1]; in_reg[7:0]
// are A..H of the chip farthest from rx with H as bit 7.
//
// The chip type, the 24 inputs, the three-wire interface, the single counter
// and the 25-clock read follow the specification; the clock phase and the
// bit order are this design's choice. The valid output is an addition.
// rst is active low and asynchronous.
module digital_inputs #(
  parameter int unsigned N_INPUTS = 24
) (
  input  logic                clk,
  input  logic                rst,      // active low
  input  logic                rx,       // serial output of the chain
  output logic                clk_out,  // clock to the 74HCT166 chain
  output logic                sh_ld,    // shift (1) / load (0)
  output logic [N_INPUTS-1:0] in_reg,
  output logic                valid     // one-clock pulse when in_reg is updated
);

  localparam int unsigned CW = $clog2(N_INPUTS + 1);

  logic [CW-1:0]       cnt;
  logic [N_INPUTS-1:0] shreg;

  assign clk_out = ~clk;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      cnt    <= '0;
      sh_ld  <= 1'b0;
      shreg  <= '0;
      in_reg <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (cnt == CW'(N_INPUTS)) begin
        cnt    <= '0;
        sh_ld  <= 1'b0;   // next tick loads
        in_reg <= shreg;
        valid  <= 1'b1;
      end else begin
        cnt   <= cnt + CW'(1);
        sh_ld <= 1'b1;
        shreg <= {shreg[N_INPUTS-2:0], rx};
      end
    end
  end

endmodule
