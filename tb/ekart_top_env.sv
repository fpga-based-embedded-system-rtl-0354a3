// End-to-end test bench body for ekart_top, shared by the reduced-size test
// (FULL = 0: short reset and fast peripheral clocks) and the full-size test
// (FULL = 1: the top with its default parameters, 50 MHz bus clock, 2 kHz
// traction control clock).
//
// Around the top sit behavioural models of the board: a 74HCT166 chain on
// the digital inputs, a 74HC595 chain on the digital outputs, an AD7927 on
// the analog inputs and a slave on the forwarded bus port. A bus master
// task plays the processor. The test walks through every mechanism of the
// design and counts how often each happened:
//   por       reset released THRESHOLD oscillator cycles after lock
//   divider   digital input clock period equals its division factor
//   tv        torque vectoring results against a real-number model
//   tcs_sat   traction control correction clipped by a saturation (left)
//   tcs_lin   traction control correction inside its range (right)
//   di        switch states read through the register bus
//   do        output and enable registers seen on the 595 latches
//   ai        conversions of all eight channels read through the bus
//   ai_retry  failed configuration check followed by reconfiguration
//   ext       accesses forwarded to the external bus port
//   unmapped  read of an unused register offset returns zero
// A mechanism that never happened counts as a failure.
module ekart_top_env #(
  parameter bit FULL = 1'b0
) ();
  localparam int unsigned TH      = FULL ? 1000  : 20;
  localparam int unsigned D_DO    = FULL ? 600   : 6;
  localparam int unsigned D_DI    = FULL ? 2000  : 8;
  localparam int unsigned D_AI    = FULL ? 312   : 4;
  localparam int unsigned D_TCS   = FULL ? 25000 : 4;
  localparam int unsigned TCS_LAT = 8;

  logic        clk_s = 1'b0, clk_50 = 1'b0, clk_6m25 = 1'b0, locked = 1'b0;
  logic        rst_n;
  logic        bus_req = 1'b0, bus_we = 1'b0, bus_ack;
  logic [31:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic        ext_req, ext_we, ext_ack = 1'b0;
  logic [31:0] ext_addr, ext_wdata, ext_rdata = '0;
  logic        di_rx, di_clk, di_sh_ld;
  logic        do_serial, do_sclk, do_shclk;
  logic        ai_dout, ai_cs, ai_sclk, ai_din;

  logic [23:0] switches = '0;
  logic [39:0] latches;
  logic [11:0] vin [8];
  logic        bad_first = 1'b1;
  int          adc_errors, adc_frames, adc_configs;

  int checks = 0, failures = 0;
  int n_por = 0, n_div = 0, n_tv = 0, n_tcs_sat = 0, n_tcs_lin = 0, n_di = 0, n_do = 0;
  int n_ai = 0, n_ai_retry = 0, n_ext = 0, n_unmapped = 0;
  logic [31:0] ext_last_wdata = '0;
  int          ext_writes = 0;

  if (FULL) begin : g_full
    ekart_top dut (.*);
  end else begin : g_small
    ekart_top #(.POR_THRESHOLD(TH), .DIV_DO(D_DO), .DIV_DI(D_DI), .DIV_AI(D_AI),
                .DIV_TCS(D_TCS), .TCS_LATENCY(TCS_LAT)) dut (.*);
  end

  hct166_chain #(.N_CHIPS(3)) u_inputs (.clk(di_clk), .sh_ld(di_sh_ld), .par(switches),
                                        .qh(di_rx));
  hc595_chain #(.N_CHIPS(5)) u_outputs (.ser(do_serial), .sck(do_shclk), .rck(do_sclk),
                                        .q(latches));
  ad7927_model u_adc (.cs_n(ai_cs), .sclk(ai_sclk), .din(ai_din), .dout(ai_dout), .vin(vin),
                      .bad_first(bad_first), .errors(adc_errors), .frames(adc_frames),
                      .configs(adc_configs));

  // 50 MHz oscillator and system clock, 6.25 MHz torque vectoring clock.
  // The oscillator's first edge comes before the first system clock edge,
  // as the clock generator output only starts after its input runs, so the
  // power-on reset is asserted before any bus clock edge.
  always #10 clk_50 = ~clk_50;
  initial begin
    #5 clk_s = 1'b1;
    forever #10 clk_s = ~clk_s;
  end
  always #80 clk_6m25 = ~clk_6m25;

  // slave on the forwarded port: one-clock acknowledge, read data derived
  // from the address
  always @(posedge clk_50) begin
    ext_ack   <= ext_req & ~ext_ack;
    ext_rdata <= ext_addr ^ 32'h5A5A_5A5A;
    if (ext_req && !ext_ack && ext_we) begin
      ext_last_wdata <= ext_wdata;
      ext_writes     <= ext_writes + 1;
    end
  end

  // the ADC reports a wrong channel after its first configuration only
  always @(adc_configs) if (adc_configs >= 2) bad_first = 1'b0;

  // ------------------------------------------------------------------ helpers
  function automatic real f2r(input logic [31:0] x);
    if (x[30:23] == 0) return 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction
  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    d = $realtobits(x);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((d[27:0] != 0) || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_real(input logic [31:0] got, input real want, input real tol,
                            input string what);
    real g;
    g = f2r(got);
    check(g - want <= tol && want - g <= tol,
          $sformatf("%s got %f want %f", what, g, want));
  endtask

  // one bus transfer as the processor would make it
  task automatic bus_access(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                            output logic [31:0] rdata);
    int n;
    @(negedge clk_50);
    bus_req = 1'b1; bus_we = we; bus_addr = addr; bus_wdata = wdata;
    n = 0;
    do begin
      @(negedge clk_50);
      n++;
    end while (!bus_ack && n < 20);
    rdata = bus_rdata;
    check(n < 20, $sformatf("no acknowledge for %h", addr));
    @(posedge clk_50);
    #1 bus_req = 1'b0;
  endtask

  task automatic wr(input logic [31:0] addr, input logic [31:0] wdata);
    logic [31:0] r;
    bus_access(1'b1, addr, wdata, r);
  endtask

  task automatic rd(input logic [31:0] addr, output logic [31:0] rdata);
    bus_access(1'b0, addr, '0, rdata);
  endtask

  task automatic wait_clk(input longint unsigned n);
    repeat (n) @(posedge clk_50);
  endtask

  // ------------------------------------------------------------------ POR
  initial begin
    int n;
    repeat (5) @(posedge clk_s);
    locked = 1'b1;
    n = 0;
    while (!rst_n && n < int'(TH) + 10) begin
      @(posedge clk_s);
      n++;
    end
    check(n >= int'(TH) && n <= int'(TH) + 2, $sformatf("reset released after %0d cycles", n));
    n_por++;
  end

  // ------------------------------------------------------------------ divider
  initial begin
    int n;
    @(posedge rst_n);
    repeat (3) @(posedge di_clk);
    n = 0;
    fork
      forever @(posedge clk_50) n++;
      @(posedge di_clk);
    join_any
    disable fork;
    check(n == int'(D_DI), $sformatf("input clock period %0d", n));
    n_div++;
  end

  // ------------------------------------------------------------------ main
  initial begin
    logic [31:0] r;
    real want;
    for (int k = 0; k < 8; k++) vin[k] = 12'($urandom);
    @(posedge rst_n);
    wait_clk(4);

    // torque vectoring: two input sets
    for (int j = 0; j < 2; j++) begin
      real v, a, d, c;
      v = (j == 0) ? 10.0 : 27.5;
      a = (j == 0) ? 0.5 : 1.2;
      d = (j == 0) ? 0.2 : 0.4;
      c = 1.85736;
      wr(32'hC9A0_0000, r2f(v));
      wr(32'hC9A0_0004, r2f(a));
      wr(32'hC9A0_0008, r2f(d));
      wr(32'hC9A0_000C, r2f(c));
      rd(32'hC9A0_0004, r);
      check(r == r2f(a), "torque vectoring register read back");
      wait_clk(2 * 7 * 8 + 16);
      rd(32'hC9A0_0010, r);
      want = v * v * $sin(a) * $sin(a) * d * c;
      check_real(r, want, want * 1.0e-5, "torque");
      n_tv++;
    end

    // traction control: p = 5, i = 0 so every step gives the same result
    for (int s = 0; s < 2; s++) begin
      logic [31:0] base;
      base = (s == 0) ? 32'hC720_0000 : 32'hC722_0000;
      wr(base + 32'h00, r2f(0.01));
      wr(base + 32'h04, r2f(5.0));
      wr(base + 32'h08, r2f(0.0));
      wr(base + 32'h0C, r2f(1.0));
      wr(base + 32'h14, r2f(0.1));
    end
    // left wheel spinning hard: u = 1.0 -> s1 = 0.5 -> c = 0 -> 0.1 (clipped)
    wr(32'hC720_0010, r2f(0.3));
    // right wheel slipping a little: u = 0.2 -> correction 0.3
    wr(32'hC722_0010, r2f(0.14));
    wait_clk(longint'(3) * (12 + TCS_LAT) * D_TCS);
    rd(32'hC720_0018, r);
    check_real(r, f2r(32'h3DCC_CCCD), 1.0e-6, "left correction, clipped");
    n_tcs_sat++;
    rd(32'hC722_0018, r);
    check_real(r, 0.3, 1.0e-6, "right correction");
    n_tcs_lin++;
    // now the other way round: left below set point, right spinning
    wr(32'hC720_0010, r2f(0.08));   // u = -0.1 -> 0.6
    wr(32'hC722_0010, r2f(-0.1));   // u = -1.0 -> s1 = -0.5 -> 1.0
    wait_clk(longint'(3) * (12 + TCS_LAT) * D_TCS);
    rd(32'hC720_0018, r);
    check_real(r, 0.6, 1.0e-6, "left correction");
    n_tcs_lin++;
    rd(32'hC722_0018, r);
    check_real(r, 1.0, 1.0e-6, "right correction, clipped");
    n_tcs_sat++;

    // digital inputs
    for (int j = 0; j < 2; j++) begin
      switches = 24'($urandom);
      wait_clk(3 * 25 * D_DI);
      rd(32'hC500_0000, r);
      check(r == {8'd0, switches}, $sformatf("inputs %h want %h", r, switches));
      n_di++;
    end

    // digital outputs
    for (int j = 0; j < 2; j++) begin
      logic [23:0] o;
      logic [11:0] e;
      o = 24'($urandom);
      e = 12'($urandom);
      wr(32'hC1E0_0000, {8'd0, o});
      wr(32'hC1E0_0004, {20'd0, e});
      rd(32'hC1E0_0004, r);
      check(r == {20'd0, e}, "enable register read back");
      wait_clk(3 * 42 * D_DO);
      check(latches == {4'd0, e, o}, $sformatf("latches %h want %h", latches, {4'd0, e, o}));
      n_do++;
    end

    // analog inputs: by now the ADC has been configured twice
    check(adc_configs >= 2, "ADC configuration retried");
    if (adc_configs >= 2) n_ai_retry++;
    for (int j = 0; j < 2; j++) begin
      if (j > 0) for (int k = 0; k < 8; k++) vin[k] = 12'($urandom);
      wait_clk(3 * 8 * 16 * D_AI);
      for (int k = 0; k < 8; k++) begin
        rd(32'hC520_0000 + 32'(4 * k), r);
        check(r == {20'd0, vin[k]}, $sformatf("channel %0d %h want %h", k, r, vin[k]));
      end
      n_ai++;
    end
    check(adc_errors == 0, "ADC protocol");

    // forwarded accesses
    wr(32'h8400_0004, 32'h0000_0041);
    wait_clk(2);
    check(ext_writes == 1 && ext_last_wdata == 32'h41, "forwarded write");
    rd(32'h8140_0000, r);
    check(r == (32'h8140_0000 ^ 32'h5A5A_5A5A), "forwarded read");
    n_ext++;

    // unused offset in the torque vectoring window
    rd(32'hC9A0_0040, r);
    check(r == 0, "unused offset reads zero");
    n_unmapped++;

    $display("mechanisms: por=%0d divider=%0d tv=%0d tcs_sat=%0d tcs_lin=%0d di=%0d do=%0d ai=%0d ai_retry=%0d ext=%0d unmapped=%0d",
             n_por, n_div, n_tv, n_tcs_sat, n_tcs_lin, n_di, n_do, n_ai, n_ai_retry, n_ext,
             n_unmapped);
    check(n_por > 0, "por never happened");
    check(n_div > 0, "divider never checked");
    check(n_tv > 0, "tv never happened");
    check(n_tcs_sat > 0, "tcs saturation never happened");
    check(n_tcs_lin > 0, "tcs linear never happened");
    check(n_di > 0, "di never happened");
    check(n_do > 0, "do never happened");
    check(n_ai > 0, "ai never happened");
    check(n_ai_retry > 0, "ai retry never happened");
    check(n_ext > 0, "ext never happened");
    check(n_unmapped > 0, "unmapped never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    wait_clk(FULL ? 64'd4_000_000 : 64'd100_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
