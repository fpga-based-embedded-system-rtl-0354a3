// Analog input interface for an AD7927 8-channel, 12-bit ADC.
//
// The converter is read in its sequential mode, one conversion per frame of
// 16 module clocks. cs is a registered output, high during tick 0 of each
// frame and low during ticks 1..15. sclk is the module clock itself while
// cs is low and is held high while cs is high (sclk = clk | cs, glitch-free
// because cs changes only on rising clock edges), so sclk falls in the
// middle of ticks 1..15. din changes at the start of a tick and is taken by
// the ADC on that tick's falling sclk edge; dout, which the ADC changes on
// falling edges, is sampled on the following rising edge. The 15 bits read
// per frame are the channel address ADD2..ADD0 and the 12 data bits DB11..DB0.
//
// The frames are sequenced as follows:
//   2 dummy frames    din held high, as required after power-up
//   1 config frame    control word CTRL: write, sequential mode, last channel 7,
//                     normal power mode, range 0..2*REFIN, straight binary
//   1 check frame     the returned channel address must be 0, otherwise the
//                     power-up sequence is restarted
//   run frames        din low (keep the sequence), the data of each frame is
//                     stored in conv_reg[address]
// so all eight registers are refreshed every 8 x 16 = 128 clocks.
//
// Following the specification: the ADC, the power-up dummy conversions, the
// configuration (normal, sequential, 2*REFIN, binary), the configuration
// check, the eight 12-bit registers and 128 clocks per refresh. This design's
// choices: the SPI phase and the one-tick cs high time, which leaves 15
// falling sclk edges inside a frame (enough for all 15 bits after the
// leading zero); the control-word encoding is the converter's.
// rst is active low and asynchronous. scan_done pulses when channel 7 is
// stored, config_error when the check frame fails (both are additions).
module analog_inputs #(
  parameter int unsigned N_CH = 8,
  parameter logic [11:0] CTRL = 12'b1101_1111_0001
) (
  input  logic        clk,
  input  logic        rst,          // active low
  input  logic        dout,         // serial data from the ADC
  output logic        cs,           // chip select, active low
  output logic        sclk,
  output logic        din,          // serial data to the ADC
  output logic [11:0] conv_reg [N_CH],
  output logic        scan_done,
  output logic        config_error
);

  typedef enum logic [1:0] {S_DUMMY, S_CONFIG, S_CHECK, S_RUN} state_e;

  state_e      state, nstate;
  logic [3:0]  tick;
  logic        dummy_cnt;
  logic [13:0] rx;
  logic        cs_q, din_q;
  logic [14:0] word;         // ADD2..0, DB11..0 of the frame just finished
  logic [2:0]  addr;

  assign cs   = cs_q;
  assign din  = din_q;
  assign sclk = clk | cs_q;
  assign word = {rx, dout};
  assign addr = word[14:12];

  // din for the tick that follows 'next_tick'
  function automatic logic din_for(input state_e st, input logic [3:0] next_tick);
    if (st == S_DUMMY) return 1'b1;
    if (st == S_CONFIG && next_tick >= 4'd1 && next_tick <= 4'd12)
      return CTRL[4'd12 - next_tick];
    return 1'b0;
  endfunction

  // next frame type, taken at the end of a frame
  always_comb begin
    nstate = state;
    if (tick == 4'd15) begin
      unique case (state)
        S_DUMMY:  if (dummy_cnt) nstate = S_CONFIG;
        S_CONFIG: nstate = S_CHECK;
        S_CHECK:  nstate = (addr == 3'd0) ? S_RUN : S_DUMMY;
        S_RUN:    nstate = S_RUN;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      state        <= S_DUMMY;
      tick         <= '0;
      dummy_cnt    <= 1'b0;
      rx           <= '0;
      cs_q         <= 1'b1;
      din_q        <= 1'b1;
      scan_done    <= 1'b0;
      config_error <= 1'b0;
      for (int k = 0; k < int'(N_CH); k++) conv_reg[k] <= '0;
    end else begin
      scan_done    <= 1'b0;
      config_error <= 1'b0;
      tick         <= tick + 4'd1;         // wraps 15 -> 0
      cs_q         <= (tick == 4'd15);     // high during tick 0
      if (tick != 4'd0) rx <= {rx[12:0], dout};
      if (tick == 4'd15) begin             // end of frame
        unique case (state)
          S_DUMMY:  dummy_cnt <= ~dummy_cnt;
          S_CONFIG: ;
          S_CHECK: begin
            if (addr == 3'd0) conv_reg[0] <= word[11:0];
            else              config_error <= 1'b1;
          end
          S_RUN: begin
            conv_reg[addr] <= word[11:0];
            if (addr == 3'(N_CH - 1)) scan_done <= 1'b1;
          end
        endcase
      end
      state <= nstate;
      din_q <= din_for(nstate, tick + 4'd1);
    end
  end

endmodule
