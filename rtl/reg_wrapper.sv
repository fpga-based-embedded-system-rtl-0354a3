// Register wrapper: exposes a peripheral's standard register interface on
// the register bus.
//
// Word offset k (byte offset 4k within the peripheral's 64 KB window) is
// write register k for k < N_WR and read register k - N_WR for
// N_WR <= k < N_WR + N_RD; other offsets read as zero and ignore writes.
// Either count may be zero.
// Write registers can be read back. Each request is acknowledged one clock
// after it is seen, with the read data registered. The read registers come
// from the peripheral, which may run on a slower clock derived from the bus
// clock; they are sampled into a bus-clock register every clock, and they
// change at most once per peripheral operation.
//
// The write/read register counts per peripheral follow the specification;
// the offsets, the one-clock acknowledge and the sampling are this design's
// choices. rst_n is active low and asynchronous and clears the write
// registers.
module reg_wrapper #(
  parameter int unsigned N_WR = 1,
  parameter int unsigned N_RD = 1,
  // array sizes; a peripheral without write (or read) registers gets one
  // unused array element, which stays zero
  localparam int unsigned WR_SZ = (N_WR > 0) ? N_WR : 1,
  localparam int unsigned RD_SZ = (N_RD > 0) ? N_RD : 1,
  localparam int unsigned WIW   = (WR_SZ > 1) ? $clog2(WR_SZ) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  reg_bus_if.slave     bus,
  output logic [31:0]  wr_regs [WR_SZ],
  input  logic [31:0]  rd_regs [RD_SZ]
);

  logic [13:0] idx;
  logic [31:0] rd_q [RD_SZ];

  assign idx = bus.addr[15:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus.ack   <= 1'b0;
      bus.rdata <= '0;
      for (int k = 0; k < int'(WR_SZ); k++) wr_regs[k] <= '0;
      for (int k = 0; k < int'(RD_SZ); k++) rd_q[k] <= '0;
    end else begin
      for (int k = 0; k < int'(RD_SZ); k++) rd_q[k] <= rd_regs[k];
      bus.ack <= bus.req & ~bus.ack;
      if (bus.req && !bus.ack) begin
        bus.rdata <= '0;
        if (int'(idx) < int'(N_WR)) begin
          if (bus.we) wr_regs[WIW'(idx)] <= bus.wdata;
          bus.rdata <= wr_regs[WIW'(idx)];
        end else if (int'(idx) < int'(N_WR + N_RD)) begin
          bus.rdata <= rd_q[int'(idx) - int'(N_WR)];
        end
      end
    end
  end

endmodule
