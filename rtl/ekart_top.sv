// Custom logic of the electric kart controller FPGA.
//
// A soft processor runs the control loop and reaches its peripherals over a
// register bus. This top holds everything on that bus that is custom logic,
// plus the reset and clock helpers:
//   power_on_reset     system reset, released THRESHOLD cycles after the
//                      clock generator locks (board oscillator clock clk_s)
//   clock_divider      slow peripheral clocks from the 50 MHz bus clock:
//                      83.3 kHz digital outputs, 25 kHz digital inputs,
//                      160.3 kHz analog inputs, 2 kHz traction control
//   torque_vectoring   coprocessor on the 6.25 MHz clock input clk_6m25
//   traction_control   two coprocessors, left and right rear wheel
//   digital_inputs     74HCT166 chain, 24 switches and buttons
//   digital_outputs    74HC595 chain, 24 outputs and 12 output enables
//   analog_inputs      AD7927, 8 channels
//   reg_wrapper        one per peripheral, registers at word offsets
//   bus_decoder        selects the peripheral by the address map
// The processor, its memories, the bus infrastructure, the timer, interrupt
// controller, GPIOs, UARTs and CAN controllers are not part of this design:
// the processor side drives the bus_* ports, and every address outside the
// six custom windows is forwarded to the ext_* ports.
//
// Register map (byte offsets within each 64 KB window, all 32-bit):
//   0xC9A0_0000 torque vectoring  0 speed, 4 steering, 8 torque_factor,
//                                 C torque_const (floats, read/write);
//                                 10 torque (read)
//   0xC720_0000 traction control left, 0xC722_0000 right
//                                 0 t_sample, 4 p, 8 i, C antiwindup,
//                                 10 pattern (slip), 14 pattern_est (set
//                                 point) (read/write); 18 correction (read)
//   0xC500_0000 digital inputs    0 in_reg[23:0] (read)
//   0xC1E0_0000 digital outputs   0 output_register[23:0],
//                                 4 en_output_register[11:0] (read/write)
//   0xC520_0000 analog inputs     0..1C conv_reg_0..7[11:0] (read)
//
// Clocking: clk_50 is the bus clock; the divided clocks are generated from
// it, and clk_6m25 is assumed to come from the same clock generator, so all
// domains are related. Write registers feed the peripherals directly and
// result registers are sampled by the wrappers (see reg_wrapper). The
// bus protocol is described in reg_bus_if. The digital and analog input
// wrappers have no write registers; their one-element write arrays (di_wr,
// ai_wr) stay unconnected.
module ekart_top
  import ekart_pkg::*;
#(
  parameter int unsigned POR_THRESHOLD = 1000,
  parameter int unsigned DIV_DO        = 600,    // 83.3 kHz digital outputs
  parameter int unsigned DIV_DI        = 2000,   // 25 kHz digital inputs
  parameter int unsigned DIV_AI        = 312,    // 160.3 kHz analog inputs
  parameter int unsigned DIV_TCS       = 25000,  // 2 kHz traction control
  parameter int unsigned TCS_LATENCY   = 8
) (
  input  logic        clk_s,      // board oscillator, 50 MHz
  input  logic        clk_50,     // system clock (clock generator output 0)
  input  logic        clk_6m25,   // torque vectoring clock (output 2)
  input  logic        locked,     // clock generator locked
  output logic        rst_n,      // system reset, active low

  // register bus from the processor side
  input  logic        bus_req,
  input  logic        bus_we,
  input  logic [31:0] bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,

  // forwarded accesses to the processor-side IP
  output logic        ext_req,
  output logic        ext_we,
  output logic [31:0] ext_addr,
  output logic [31:0] ext_wdata,
  input  logic [31:0] ext_rdata,
  input  logic        ext_ack,

  // 74HCT166 input chain
  input  logic        di_rx,
  output logic        di_clk,
  output logic        di_sh_ld,

  // 74HC595 output chain
  output logic        do_serial,
  output logic        do_sclk,
  output logic        do_shclk,

  // AD7927 ADC
  input  logic        ai_dout,
  output logic        ai_cs,
  output logic        ai_sclk,
  output logic        ai_din
);

  logic clk_do, clk_di, clk_ai, clk_tcs;

  // ---------------------------------------------------------------- reset, clocks
  power_on_reset #(.THRESHOLD(POR_THRESHOLD)) u_por (
    .clk_50(clk_s), .locked(locked), .rst_50(rst_n));

  clock_divider #(.CLK_0(DIV_DO), .CLK_1(DIV_DI), .CLK_2(DIV_AI), .CLK_3(DIV_TCS)) u_div (
    .clk(clk_50), .rst(rst_n), .locked(locked),
    .clk_out0(clk_do), .clk_out1(clk_di), .clk_out2(clk_ai), .clk_out3(clk_tcs));

  // ---------------------------------------------------------------- bus
  reg_bus_if b_m    (.clk(clk_50), .rst_n(rst_n));
  reg_bus_if b_tv   (.clk(clk_50), .rst_n(rst_n));
  reg_bus_if b_tcsl (.clk(clk_50), .rst_n(rst_n));
  reg_bus_if b_tcsr (.clk(clk_50), .rst_n(rst_n));
  reg_bus_if b_di   (.clk(clk_50), .rst_n(rst_n));
  reg_bus_if b_do   (.clk(clk_50), .rst_n(rst_n));
  reg_bus_if b_ai   (.clk(clk_50), .rst_n(rst_n));
  reg_bus_if b_ext  (.clk(clk_50), .rst_n(rst_n));

  assign b_m.req   = bus_req;
  assign b_m.we    = bus_we;
  assign b_m.addr  = bus_addr;
  assign b_m.wdata = bus_wdata;
  assign bus_rdata = b_m.rdata;
  assign bus_ack   = b_m.ack;

  assign ext_req     = b_ext.req;
  assign ext_we      = b_ext.we;
  assign ext_addr    = b_ext.addr;
  assign ext_wdata   = b_ext.wdata;
  assign b_ext.rdata = ext_rdata;
  assign b_ext.ack   = ext_ack;

  bus_decoder u_dec (.m(b_m), .s_tv(b_tv), .s_tcsl(b_tcsl), .s_tcsr(b_tcsr),
                     .s_di(b_di), .s_do(b_do), .s_ai(b_ai), .s_ext(b_ext));

  // ---------------------------------------------------------------- torque vectoring
  logic [31:0] tv_wr [4];
  logic [31:0] tv_rd [1];

  reg_wrapper #(.N_WR(4), .N_RD(1)) u_tv_regs (
    .clk(clk_50), .rst_n(rst_n), .bus(b_tv), .wr_regs(tv_wr), .rd_regs(tv_rd));

  torque_vectoring u_tv (
    .clk(clk_6m25), .rst(rst_n), .speed(tv_wr[0]), .steering_input(tv_wr[1]),
    .torque_factor(tv_wr[2]), .torque_const(tv_wr[3]), .torque(tv_rd[0]), .done());

  // ---------------------------------------------------------------- traction control
  logic [31:0] tcsl_wr [6], tcsr_wr [6];
  logic [31:0] tcsl_rd [1], tcsr_rd [1];

  reg_wrapper #(.N_WR(6), .N_RD(1)) u_tcsl_regs (
    .clk(clk_50), .rst_n(rst_n), .bus(b_tcsl), .wr_regs(tcsl_wr), .rd_regs(tcsl_rd));
  reg_wrapper #(.N_WR(6), .N_RD(1)) u_tcsr_regs (
    .clk(clk_50), .rst_n(rst_n), .bus(b_tcsr), .wr_regs(tcsr_wr), .rd_regs(tcsr_rd));

  traction_control #(.LATENCY(TCS_LATENCY)) u_tcs_left (
    .clk(clk_tcs), .reset(rst_n), .t_sample(tcsl_wr[0]), .p(tcsl_wr[1]), .i(tcsl_wr[2]),
    .antiwindup(tcsl_wr[3]), .pattern(tcsl_wr[4]), .pattern_est(tcsl_wr[5]),
    .correction(tcsl_rd[0]), .done(), .sat1_active(), .sat2_active());
  traction_control #(.LATENCY(TCS_LATENCY)) u_tcs_right (
    .clk(clk_tcs), .reset(rst_n), .t_sample(tcsr_wr[0]), .p(tcsr_wr[1]), .i(tcsr_wr[2]),
    .antiwindup(tcsr_wr[3]), .pattern(tcsr_wr[4]), .pattern_est(tcsr_wr[5]),
    .correction(tcsr_rd[0]), .done(), .sat1_active(), .sat2_active());

  // ---------------------------------------------------------------- digital inputs
  logic [31:0] di_wr [1];
  logic [31:0] di_rd [1];
  logic [23:0] di_word;

  assign di_rd[0] = {8'd0, di_word};

  reg_wrapper #(.N_WR(0), .N_RD(1)) u_di_regs (
    .clk(clk_50), .rst_n(rst_n), .bus(b_di), .wr_regs(di_wr), .rd_regs(di_rd));

  digital_inputs u_di (
    .clk(clk_di), .rst(rst_n), .rx(di_rx), .clk_out(di_clk), .sh_ld(di_sh_ld),
    .in_reg(di_word), .valid());

  // ---------------------------------------------------------------- digital outputs
  logic [31:0] do_wr [2];
  logic [31:0] do_rd [1];

  assign do_rd[0] = '0;

  reg_wrapper #(.N_WR(2), .N_RD(0)) u_do_regs (
    .clk(clk_50), .rst_n(rst_n), .bus(b_do), .wr_regs(do_wr), .rd_regs(do_rd));

  digital_outputs u_do (
    .clk(clk_do), .rst(rst_n), .output_register(do_wr[0][23:0]),
    .en_output_register(do_wr[1][11:0]), .serial_out(do_serial), .sclk(do_sclk),
    .shclk(do_shclk), .sent());

  // ---------------------------------------------------------------- analog inputs
  logic [31:0] ai_wr [1];
  logic [31:0] ai_rd [8];
  logic [11:0] ai_conv [8];

  for (genvar k = 0; k < 8; k++) begin : g_ai
    assign ai_rd[k] = {20'd0, ai_conv[k]};
  end

  reg_wrapper #(.N_WR(0), .N_RD(8)) u_ai_regs (
    .clk(clk_50), .rst_n(rst_n), .bus(b_ai), .wr_regs(ai_wr), .rd_regs(ai_rd));

  analog_inputs u_ai (
    .clk(clk_ai), .rst(rst_n), .dout(ai_dout), .cs(ai_cs), .sclk(ai_sclk), .din(ai_din),
    .conv_reg(ai_conv), .scan_done(), .config_error());

endmodule
