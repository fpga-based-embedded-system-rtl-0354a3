// Self-checking test of digital_outputs against a model of five chained
// 74HC595 chips: after each update the latched chip outputs must hold the
// 24 output bits, the 12 enable bits and zeros in the unused positions, and
// an update must take 42 clocks with exactly 40 shift clock pulses.
module tb_digital_outputs;
  logic        clk = 1'b0, rst = 1'b0, ser, sclk, shclk, sent;
  logic [23:0] outs;
  logic [11:0] ens;
  logic [39:0] q;
  int checks = 0, failures = 0, cyc = 0, last = -1, nshift = 0;

  digital_outputs dut (.clk(clk), .rst(rst), .output_register(outs), .en_output_register(ens),
                       .serial_out(ser), .sclk(sclk), .shclk(shclk), .sent(sent));
  hc595_chain #(.N_CHIPS(5)) chips (.ser(ser), .sck(shclk), .rck(sclk), .q(q));

  always #5 clk = ~clk;
  always @(posedge shclk) nshift++;

  always @(posedge clk) begin
    cyc++;
    if (sent && rst) begin   // outputs before reset are arbitrary
      if (last >= 0) begin
        checks += 2;
        if (cyc - last != 42) begin
          failures++;
          $display("FAIL update period %0d", cyc - last);
        end
        if (nshift != 40) begin
          failures++;
          $display("FAIL %0d shift pulses", nshift);
        end
      end
      nshift = 0;
      last = cyc;
    end
  end

  initial begin
    outs = '0; ens = '0;
    repeat (3) @(posedge clk);
    rst = 1'b1;
    repeat (40) begin
      outs = 24'($urandom);
      ens  = 12'($urandom);
      @(posedge clk iff sent);
      @(posedge clk iff sent);
      @(negedge clk);   // the latch pulse is in the second half of the tick
      #1;
      checks++;
      if (q !== {4'b0, ens, outs}) begin
        failures++;
        $display("FAIL latched %h want %h", q, {4'b0, ens, outs});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
