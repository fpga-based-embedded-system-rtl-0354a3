// Address decoder of the register bus.
//
// Routes each request of the master to one slave by the upper 16 address
// bits, using the 64 KB windows of the peripheral address map: torque
// vectoring 0xC9A0_0000, left and right traction control 0xC720_0000 and
// 0xC722_0000, digital inputs 0xC500_0000, digital outputs 0xC1E0_0000,
// analog inputs 0xC520_0000. Every other address goes to the external port,
// where the processor-side IP (timer, interrupt controller, GPIO, UARTs,
// CAN bridges) is attached. The decoder is purely combinational: address,
// write flag and data go to all slaves, req only to the selected one, and
// ack and read data come back from the selected one.
module bus_decoder
  import ekart_pkg::*;
(
  reg_bus_if.slave  m,
  reg_bus_if.master s_tv,
  reg_bus_if.master s_tcsl,
  reg_bus_if.master s_tcsr,
  reg_bus_if.master s_di,
  reg_bus_if.master s_do,
  reg_bus_if.master s_ai,
  reg_bus_if.master s_ext
);

  slave_e sel;

  always_comb begin
    unique case (m.addr[31:16])
      BASE_TORQUE_VECT:    sel = SL_TV;
      BASE_TCS_LEFT:       sel = SL_TCSL;
      BASE_TCS_RIGHT:      sel = SL_TCSR;
      BASE_DIGITAL_INPUT:  sel = SL_DI;
      BASE_DIGITAL_OUTPUT: sel = SL_DO;
      BASE_ANALOG_INPUT:   sel = SL_AI;
      default:             sel = SL_EXT;
    endcase
  end

  assign {s_tv.we, s_tcsl.we, s_tcsr.we, s_di.we, s_do.we, s_ai.we, s_ext.we} = {7{m.we}};
  assign s_tv.addr    = m.addr;   assign s_tv.wdata   = m.wdata;
  assign s_tcsl.addr  = m.addr;   assign s_tcsl.wdata = m.wdata;
  assign s_tcsr.addr  = m.addr;   assign s_tcsr.wdata = m.wdata;
  assign s_di.addr    = m.addr;   assign s_di.wdata   = m.wdata;
  assign s_do.addr    = m.addr;   assign s_do.wdata   = m.wdata;
  assign s_ai.addr    = m.addr;   assign s_ai.wdata   = m.wdata;
  assign s_ext.addr   = m.addr;   assign s_ext.wdata  = m.wdata;

  assign s_tv.req   = m.req && sel == SL_TV;
  assign s_tcsl.req = m.req && sel == SL_TCSL;
  assign s_tcsr.req = m.req && sel == SL_TCSR;
  assign s_di.req   = m.req && sel == SL_DI;
  assign s_do.req   = m.req && sel == SL_DO;
  assign s_ai.req   = m.req && sel == SL_AI;
  assign s_ext.req  = m.req && sel == SL_EXT;

  always_comb begin
    unique case (sel)
      SL_TV:   begin m.ack = s_tv.ack;   m.rdata = s_tv.rdata;   end
      SL_TCSL: begin m.ack = s_tcsl.ack; m.rdata = s_tcsl.rdata; end
      SL_TCSR: begin m.ack = s_tcsr.ack; m.rdata = s_tcsr.rdata; end
      SL_DI:   begin m.ack = s_di.ack;   m.rdata = s_di.rdata;   end
      SL_DO:   begin m.ack = s_do.ack;   m.rdata = s_do.rdata;   end
      SL_AI:   begin m.ack = s_ai.ack;   m.rdata = s_ai.rdata;   end
      default: begin m.ack = s_ext.ack;  m.rdata = s_ext.rdata;  end
    endcase
  end

endmodule
