// Self-checking test of power_on_reset: the reset output must stay low until
// THRESHOLD clocks after locked rises, then stay high, and must fall again
// and repeat the count when locked is lost.
module tb_power_on_reset;
  logic clk = 1'b0, locked = 1'b0, rst;
  int checks = 0, failures = 0;
  localparam int TH = 1000;

  power_on_reset dut (.clk_50(clk), .locked(locked), .rst_50(rst));

  always #5 clk = ~clk;

  task automatic expect_rst(input logic v, input string what);
    checks++;
    if (rst !== v) begin
      failures++;
      $display("FAIL %s: rst=%b", what, rst);
    end
  endtask

  task automatic lock_and_count();
    int n;
    @(negedge clk) locked = 1'b1;
    n = 0;
    while (rst == 1'b0 && n < 2 * TH) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != TH + 1) begin
      failures++;
      $display("FAIL reset released after %0d clocks, want %0d", n, TH + 1);
    end
  endtask

  initial begin
    repeat (50) @(negedge clk);
    expect_rst(1'b0, "before lock");
    lock_and_count();
    repeat (200) begin
      @(negedge clk);
      expect_rst(1'b1, "after release");
    end
    locked = 1'b0;
    @(negedge clk);
    @(negedge clk);
    expect_rst(1'b0, "lock lost");
    lock_and_count();
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
