// Self-checking test of reg_wrapper with 6 write and 2 read registers (the
// traction control layout plus one): writes and reads back every write
// register, reads the read registers while they change, checks that writes
// to read registers and to unmapped offsets change nothing, and that every
// access is acknowledged exactly one clock after the request. The master
// drops its request on the clock edge where it sees the acknowledge.
module tb_reg_wrapper;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] wr_regs [6];
  logic [31:0] rd_regs [2];
  int checks = 0, failures = 0;

  reg_bus_if bus (.clk(clk), .rst_n(rst_n));
  reg_wrapper #(.N_WR(6), .N_RD(2)) dut (.clk(clk), .rst_n(rst_n), .bus(bus),
                                         .wr_regs(wr_regs), .rd_regs(rd_regs));

  always #5 clk = ~clk;

  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                        output logic [31:0] rdata);
    int n;
    @(negedge clk);
    bus.req = 1'b1; bus.we = we; bus.addr = addr; bus.wdata = wdata;
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!bus.ack && n < 10);
    rdata = bus.rdata;
    checks++;
    if (n != 1) begin
      failures++;
      $display("FAIL ack after %0d clocks", n);
    end
    // the acknowledge is seen on this rising edge; the request ends with it
    @(posedge clk);
    #1 bus.req = 1'b0;
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got %h want %h", what, got, want);
    end
  endtask

  initial begin
    logic [31:0] r, vals [6];
    bus.req = 1'b0; bus.we = 1'b0; bus.addr = '0; bus.wdata = '0;
    rd_regs[0] = 32'h1111_0000; rd_regs[1] = 32'h2222_0000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      vals[k] = $urandom;
      access(1'b1, 32'hC720_0000 + 32'(4 * k), vals[k], r);
    end
    for (int k = 0; k < 6; k++) begin
      access(1'b0, 32'hC720_0000 + 32'(4 * k), 0, r);
      expect_eq(r, vals[k], "readback");
      expect_eq(wr_regs[k], vals[k], "register port");
    end
    for (int j = 0; j < 5; j++) begin
      rd_regs[0] = $urandom; rd_regs[1] = $urandom;
      @(posedge clk);
      access(1'b0, 32'hC720_0018, 0, r);
      expect_eq(r, rd_regs[0], "read reg 0");
      access(1'b0, 32'hC720_001C, 0, r);
      expect_eq(r, rd_regs[1], "read reg 1");
    end
    access(1'b1, 32'hC720_0018, 32'hDEAD_BEEF, r);  // write to a read register
    access(1'b1, 32'hC720_0040, 32'hDEAD_BEEF, r);  // unmapped
    access(1'b0, 32'hC720_0040, 0, r);
    expect_eq(r, 32'd0, "unmapped read");
    for (int k = 0; k < 6; k++) expect_eq(wr_regs[k], vals[k], "registers untouched");
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
