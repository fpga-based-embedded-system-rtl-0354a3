// Self-checking test of clock_divider at its default factors (600, 2000,
// 312, 2): measures high time, low time and period of every output in input
// clocks, and checks that the outputs stay low while locked is low.
module tb_clock_divider;
  logic clk = 1'b0, rst = 1'b0, locked = 1'b0;
  logic [3:0] o;
  int checks = 0, failures = 0;
  int div [4] = '{600, 2000, 312, 2};
  int cyc = 0;
  int last_rise [4] = '{-1, -1, -1, -1};
  int last_fall [4] = '{-1, -1, -1, -1};
  int nper [4] = '{0, 0, 0, 0};
  logic [3:0] prev = '0;

  clock_divider dut (.clk(clk), .rst(rst), .locked(locked), .clk_out0(o[0]),
                     .clk_out1(o[1]), .clk_out2(o[2]), .clk_out3(o[3]));

  always #5 clk = ~clk;

  always @(negedge clk) begin
    cyc++;
    for (int k = 0; k < 4; k++) begin
      if (o[k] && !prev[k]) begin
        if (last_rise[k] >= 0) begin
          checks++;
          nper[k]++;
          if (cyc - last_rise[k] != div[k]) begin
            failures++;
            $display("FAIL out%0d period %0d", k, cyc - last_rise[k]);
          end
        end
        if (last_fall[k] >= 0) begin
          checks++;
          if (cyc - last_fall[k] != div[k] / 2) begin
            failures++;
            $display("FAIL out%0d low time %0d", k, cyc - last_fall[k]);
          end
        end
        last_rise[k] = cyc;
      end
      if (!o[k] && prev[k]) begin
        checks++;
        if (cyc - last_rise[k] != div[k] / 2) begin
          failures++;
          $display("FAIL out%0d high time %0d", k, cyc - last_rise[k]);
        end
        last_fall[k] = cyc;
      end
    end
    prev = o;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b1;
    repeat (100) @(posedge clk);
    checks++;
    if (o !== 4'b0000) begin
      failures++;
      $display("FAIL outputs run while not locked");
    end
    locked = 1'b1;
    repeat (9000) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (nper[k] < 3) begin
        failures++;
        $display("FAIL out%0d only %0d periods", k, nper[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
