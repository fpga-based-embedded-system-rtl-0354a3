// Self-checking test of digital_inputs against a model of three chained
// 74HCT166 chips: random switch patterns must appear unchanged in in_reg,
// and a read must take 25 clocks.
module tb_digital_inputs;
  logic        clk = 1'b0, rst = 1'b0, rx, clk_out, sh_ld, valid;
  logic [23:0] in_reg, sw;
  int checks = 0, failures = 0, cyc = 0, last = -1;

  digital_inputs dut (.clk(clk), .rst(rst), .rx(rx), .clk_out(clk_out), .sh_ld(sh_ld),
                      .in_reg(in_reg), .valid(valid));
  hct166_chain #(.N_CHIPS(3)) chips (.clk(clk_out), .sh_ld(sh_ld), .par(sw), .qh(rx));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (valid && rst) begin   // outputs before reset are arbitrary
      if (last >= 0) begin
        checks++;
        if (cyc - last != 25) begin
          failures++;
          $display("FAIL read period %0d", cyc - last);
        end
      end
      last = cyc;
    end
  end

  initial begin
    sw = 24'h000000;
    repeat (3) @(posedge clk);
    rst = 1'b1;
    repeat (50) begin
      sw = 24'($urandom);
      @(posedge clk iff valid);   // read that may have loaded the old pattern
      @(posedge clk iff valid);
      #1;
      checks++;
      if (in_reg !== sw) begin
        failures++;
        $display("FAIL in_reg %h want %h", in_reg, sw);
      end
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
