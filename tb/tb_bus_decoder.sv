// Self-checking test of bus_decoder: for each peripheral window and for
// addresses outside them, exactly the right slave sees the request, and the
// master receives that slave's acknowledge and read data. Each slave stub
// answers with its own index in the read data.
module tb_bus_decoder;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;

  reg_bus_if m    (.clk(clk), .rst_n(rst_n));
  reg_bus_if s0   (.clk(clk), .rst_n(rst_n));
  reg_bus_if s1   (.clk(clk), .rst_n(rst_n));
  reg_bus_if s2   (.clk(clk), .rst_n(rst_n));
  reg_bus_if s3   (.clk(clk), .rst_n(rst_n));
  reg_bus_if s4   (.clk(clk), .rst_n(rst_n));
  reg_bus_if s5   (.clk(clk), .rst_n(rst_n));
  reg_bus_if s6   (.clk(clk), .rst_n(rst_n));

  bus_decoder dut (.m(m), .s_tv(s0), .s_tcsl(s1), .s_tcsr(s2), .s_di(s3), .s_do(s4),
                   .s_ai(s5), .s_ext(s6));

  // slave stubs: acknowledge combinationally, read data = 0xA0 + index
  assign s0.ack = s0.req; assign s0.rdata = 32'hA0;
  assign s1.ack = s1.req; assign s1.rdata = 32'hA1;
  assign s2.ack = s2.req; assign s2.rdata = 32'hA2;
  assign s3.ack = s3.req; assign s3.rdata = 32'hA3;
  assign s4.ack = s4.req; assign s4.rdata = 32'hA4;
  assign s5.ack = s5.req; assign s5.rdata = 32'hA5;
  assign s6.ack = s6.req; assign s6.rdata = 32'hA6;

  task automatic probe(input logic [31:0] addr, input int want);
    logic [6:0] reqs;
    m.req = 1'b1; m.we = 1'b0; m.addr = addr; m.wdata = $urandom;
    #1;
    reqs = {s6.req, s5.req, s4.req, s3.req, s2.req, s1.req, s0.req};
    checks += 3;
    if (reqs !== 7'(1 << want)) begin
      failures++;
      $display("FAIL addr %h reqs %b want slave %0d", addr, reqs, want);
    end
    if (m.rdata !== 32'hA0 + 32'(want) || !m.ack) begin
      failures++;
      $display("FAIL addr %h rdata %h ack %b", addr, m.rdata, m.ack);
    end
    if (s6.addr !== addr || s0.wdata !== m.wdata) begin
      failures++;
      $display("FAIL address/data not forwarded");
    end
    m.req = 1'b0;
    #1;
  endtask

  initial begin
    m.req = 1'b0; m.we = 1'b0; m.addr = '0; m.wdata = '0;
    for (int j = 0; j < 20; j++) begin
      logic [15:0] off;
      off = 16'($urandom);
      probe({16'hC9A0, off}, 0);
      probe({16'hC720, off}, 1);
      probe({16'hC722, off}, 2);
      probe({16'hC500, off}, 3);
      probe({16'hC1E0, off}, 4);
      probe({16'hC520, off}, 5);
      probe({16'h8400, off}, 6);   // STDIO UART
      probe({16'hC980, off}, 6);   // CAN bridge
      probe({16'h8140, off}, 6);   // GPIO
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
