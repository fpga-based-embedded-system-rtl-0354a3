// Self-checking test of analog_inputs against the AD7927 model.
//
// Checks the written control word (normal mode, sequential, channels 0..7,
// range 2*REFIN, straight binary), that the eight registers follow the
// analog values as they change, that a full refresh of all channels takes
// 128 clocks, that the model saw no protocol violation, and that a wrong
// channel in the check frame restarts the power-up sequence.
module tb_analog_inputs;
  logic        clk = 1'b0, rst = 1'b0;
  logic        cs, sclk, din, dout, scan_done, cfg_err, bad_first;
  logic [11:0] conv_reg [8];
  logic [11:0] vin [8];
  int          errors, frames;
  int checks = 0, failures = 0, cyc = 0, last_scan = -1, n_cfg_err = 0, n_scan = 0;

  analog_inputs dut (.clk(clk), .rst(rst), .dout(dout), .cs(cs), .sclk(sclk), .din(din),
                     .conv_reg(conv_reg), .scan_done(scan_done), .config_error(cfg_err));
  ad7927_model adc (.cs_n(cs), .sclk(sclk), .din(din), .dout(dout), .vin(vin),
                    .bad_first(bad_first), .errors(errors), .frames(frames), .configs());

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (cfg_err && rst) n_cfg_err++;   // outputs before reset are arbitrary
    if (scan_done && rst) begin
      n_scan++;
      if (last_scan >= 0) begin
        checks++;
        if (cyc - last_scan != 128) begin
          failures++;
          $display("FAIL refresh period %0d", cyc - last_scan);
        end
      end
      last_scan = cyc;
    end
  end

  task automatic check_regs();
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (conv_reg[k] !== vin[k]) begin
        failures++;
        $display("FAIL ch%0d got %h want %h", k, conv_reg[k], vin[k]);
      end
    end
  endtask

  initial begin
    bad_first = 1'b1;   // first configuration attempt fails its check
    for (int k = 0; k < 8; k++) vin[k] = 12'($urandom);
    repeat (3) @(posedge clk);
    rst = 1'b1;
    @(posedge clk iff cfg_err);
    bad_first = 1'b0;
    repeat (2) @(posedge clk iff scan_done);
    check_regs();
    checks++;
    if (adc.ctrl !== 12'hDF1) begin
      failures++;
      $display("FAIL control word %h", adc.ctrl);
    end
    for (int r = 0; r < 5; r++) begin
      for (int k = 0; k < 8; k++) vin[k] = 12'($urandom);
      @(posedge clk iff scan_done);   // a scan that may have started before the change
      @(posedge clk iff scan_done);
      #1 check_regs();
    end
    checks += 2;
    if (errors != 0) begin
      failures++;
      $display("FAIL %0d protocol errors seen by the ADC model", errors);
    end
    if (n_cfg_err != 1) begin
      failures++;
      $display("FAIL configuration check fired %0d times", n_cfg_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
