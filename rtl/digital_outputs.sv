// Digital output interface for a chain of 74HC595 serial-in/parallel-out
// shift registers with output latches (five chips: 24 outputs and 12 output
// enables, 4 positions unused).
//
// Each update sends a CHAIN_BITS = 40 bit frame {4'b0, en_output_register,
// output_register}, most significant bit first, so that output_register[0]
// ends in output QA of the chip that receives serial_out. The shift clock
// shclk and the storage clock sclk are the inverted module clock gated by
// registered enables: they rise in the middle of a module clock period,
// half a period after serial_out has changed, and cannot glitch because the
// enables change only while the module clock is high. One update takes
// CHAIN_BITS + 2 = 42 clocks:
//   tick 0        the two software registers are captured into the frame
//   ticks 1..40   one bit per tick on serial_out, one shclk pulse per tick
//   tick 41       one sclk pulse copies the chain into the output latches
// after which the next update starts with fresh register values.
//
// The chip type, five chips, 24 outputs plus 12 enables, the three-wire
// interface and the 42-clock update follow the specification; frame layout,
// bit order and clock phase are this design's choice. rst is active low and
// asynchronous; the sent output is an addition that pulses with sclk.
module digital_outputs #(
  parameter int unsigned N_OUT      = 24,
  parameter int unsigned N_EN       = 12,
  parameter int unsigned CHAIN_BITS = 40
) (
  input  logic             clk,
  input  logic             rst,                 // active low
  input  logic [N_OUT-1:0] output_register,
  input  logic [N_EN-1:0]  en_output_register,
  output logic             serial_out,          // to SER of the first chip
  output logic             sclk,                // storage (latch) clock, RCK
  output logic             shclk,               // shift clock, SCK
  output logic             sent                 // one-clock pulse during the latch tick
);

  localparam int unsigned LAST = CHAIN_BITS + 1;
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic [CW-1:0]         cnt;
  logic [CHAIN_BITS-1:0] frame;
  logic                  shift_en, store_en;

  initial assert (N_OUT + N_EN <= CHAIN_BITS);

  assign serial_out = frame[CHAIN_BITS-1];
  assign shclk      = shift_en & ~clk;
  assign sclk       = store_en & ~clk;
  assign sent       = store_en;

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      cnt      <= '0;
      frame    <= '0;
      shift_en <= 1'b0;
      store_en <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(LAST)) ? '0 : cnt + CW'(1);
      if (cnt == '0) begin
        frame    <= CHAIN_BITS'({en_output_register, output_register});
        shift_en <= 1'b1;
      end else if (cnt <= CW'(CHAIN_BITS)) begin
        frame <= frame << 1;
        if (cnt == CW'(CHAIN_BITS)) begin
          shift_en <= 1'b0;
          store_en <= 1'b1;
        end
      end else begin
        store_en <= 1'b0;
      end
    end
  end

endmodule
