// Simple single-master register bus between the processor bus attachment
// and the peripherals' register wrappers.
//
// A transfer: the master raises req with we, addr and (for a write) wdata
// and holds them until the slave answers with a one-clock ack; read data is
// valid in rdata while ack is high. The master drops req in the clock after
// ack. Addresses are byte addresses; registers are 32-bit words.
interface reg_bus_if (input logic clk, input logic rst_n);
  logic        req;
  logic        we;
  logic [31:0] addr;
  logic [31:0] wdata;
  logic [31:0] rdata;
  logic        ack;

  modport master (output req, we, addr, wdata, input rdata, ack);
  modport slave  (input req, we, addr, wdata, output rdata, ack);

  // a slave only acknowledges a pending request
  property p_ack_needs_req;
    @(posedge clk) disable iff (!rst_n) ack |-> req;
  endproperty
  a_ack_needs_req: assert property (p_ack_needs_req);
endinterface
