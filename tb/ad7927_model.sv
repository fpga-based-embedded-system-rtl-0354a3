// Behavioural model of the AD7927 ADC serial interface, for simulation only.
//
// Frames start on the falling edge of cs_n, which puts a leading zero on
// dout; each falling sclk edge then shifts out the next bit of
// {ADD2..ADD0, DB11..DB0} and takes one din bit. On the rising edge of cs_n
// the model classifies the frame: din high throughout is a dummy
// conversion, a frame with the WRITE bit set writes the control register
// (which needs two dummy conversions before it, as after power-up), any
// other frame continues the sequence, stepping through channels 0..ADD. Conversion results are
// the vin values. With bad_first set, the first conversion after the
// configuration reports channel 5 instead of 0, as a badly configured part
// would. Protocol violations are counted in errors, frames and control
// register writes in frames and configs.
module ad7927_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic        din,
  output logic        dout,
  input  logic [11:0] vin [8],
  input  logic        bad_first,
  output int          errors,
  output int          frames,
  output int          configs       // control register writes seen
);
  logic [15:0] sh;
  logic [14:0] din_sh;
  logic [11:0] ctrl;
  logic        seq_on, in_frame;
  int          nfall, seq_ptr, conv_ch, since_cfg, dummies;

  initial begin
    errors = 0; frames = 0; configs = 0; seq_on = 1'b0; in_frame = 1'b0; seq_ptr = 0; ctrl = '0; dout = 1'b0;
    since_cfg = 0; dummies = 0; nfall = 0; din_sh = '0; sh = '0; conv_ch = 0;
  end

  always @(negedge cs_n) begin
    if (seq_on) conv_ch = seq_ptr;
    else conv_ch = 3;  // whatever the part happens to convert before setup
    if (seq_on && since_cfg == 0 && bad_first) conv_ch = 5;
    in_frame = 1'b1;
    sh     = {1'b0, 3'(conv_ch), vin[conv_ch]};
    dout   = 1'b0;
    nfall  = 0;
    din_sh = '0;
  end

  always @(negedge sclk) begin
    if (!cs_n) begin
      nfall++;
      if (nfall <= 15) begin
        dout   = sh[15 - nfall];
        din_sh = {din_sh[13:0], din};
      end
    end
  end

  always @(posedge cs_n) if (in_frame) begin
    in_frame = 1'b0;
    frames++;
    if (nfall < 15) errors++;
    if (din_sh == 15'h7FFF) begin        // dummy conversion
      dummies++;
      seq_on = 1'b0;
    end else if (din_sh[14]) begin       // control register write
      if (dummies < 2) errors++;         // power-up rule broken
      configs++;
      ctrl      = din_sh[14:3];
      seq_on    = ctrl[10] && !ctrl[3];  // SEQ=1, SHADOW=0
      seq_ptr   = 0;
      since_cfg = 0;
      dummies   = 0;
    end else begin                       // keep converting the sequence
      since_cfg++;
      if (seq_on) seq_ptr = (seq_ptr >= int'(ctrl[8:6])) ? 0 : seq_ptr + 1;
    end
  end
endmodule
