// adns_serial_tb: self-checking test of the sensor serial-port master
// against the ADNS-2051 model.
// Writes Configuration_bits and reads it back, reads Motion, Delta_X and
// Delta_Y after injecting motion, and checks the values, the SCLK period
// (2*SCLK_HALF clocks, at most 4.5 MHz at a 50 MHz clock), the
// address-to-data wait and the exact clock count of a read and a write.
`timescale 1ns/1ps
module adns_serial_tb;
  localparam int SCLK_HALF = 6;
  localparam int T_SRAD    = 300;
  localparam int T_WGAP    = 200;
  localparam int T_RGAP    = 13;

  logic       clk = 0, rst_n = 0;
  logic       req = 0, we = 0;
  logic [6:0] addr = 0;
  logic [7:0] wdata = 0;
  logic       busy, done;
  logic [7:0] rdata;
  logic       sclk, sdio_o, sdio_oe, sdio_i;
  logic       m_out, m_oe, bus;
  int         checks = 0, failures = 0;

  assign bus    = sdio_oe ? sdio_o : (m_oe ? m_out : 1'b1);
  assign sdio_i = bus;

  adns_serial #(.SCLK_HALF(SCLK_HALF), .T_SRAD(T_SRAD), .T_WGAP(T_WGAP), .T_RGAP(T_RGAP)) dut (
    .clk, .rst_n, .req, .we, .addr, .wdata, .busy, .done, .rdata,
    .sclk, .sdio_o, .sdio_oe, .sdio_i
  );

  adns2051_model #(.TSRAD_NS(T_SRAD * 20.0)) sensor (
    .sclk, .sdio(bus), .pd(1'b1), .sdio_out(m_out), .sdio_oe(m_oe)
  );

  always #10 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCLK period in clocks
  int cyc = 0, last_rise = -1, bad_period = 0, periods = 0;
  logic sclk_q = 1;
  always @(posedge clk) begin
    cyc++;
    sclk_q <= sclk;
    if (sclk && !sclk_q) begin
      if (last_rise >= 0 && (cyc - last_rise) < 2 * SCLK_HALF) bad_period++;
      if (last_rise >= 0 && (cyc - last_rise) == 2 * SCLK_HALF) periods++;
      last_rise = cyc;
    end
  end

  task automatic xfer(input logic w, input logic [6:0] a, input logic [7:0] d,
                      output logic [7:0] q, output int clocks);
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 0;
    clocks = 1;
    while (!done) begin @(negedge clk); clocks++; end
    q = rdata;
  endtask

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %02h expected %02h", what, got, exp);
    end
  endtask

  logic [7:0] q;
  int         n;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    // write Configuration_bits
    xfer(1, 7'h0a, 8'h09, q, n);
    check("config written", sensor.cfg, 8'h09);
    // 16 bits of 2*SCLK_HALF clocks, then the write gap, then done
    checks++;
    if (n != 32 * SCLK_HALF + T_WGAP + 2) begin
      failures++; $display("FAIL: write took %0d clocks", n);
    end
    xfer(0, 7'h0a, 8'h00, q, n);
    check("config read back", q, 8'h09);
    checks++;
    if (n != 32 * SCLK_HALF + T_SRAD + 1 + T_RGAP + 2) begin
      failures++; $display("FAIL: read took %0d clocks", n);
    end
    xfer(0, 7'h02, 8'h00, q, n);
    check("motion idle", q, 8'h00);
    sensor.add_motion(5, -3);
    xfer(0, 7'h02, 8'h00, q, n);
    check("motion MOT", q, 8'h80);
    xfer(0, 7'h03, 8'h00, q, n);
    check("delta x", q, 8'h05);
    xfer(0, 7'h04, 8'h00, q, n);
    check("delta y", q, 8'hFD);
    xfer(0, 7'h02, 8'h00, q, n);
    check("motion cleared", q, 8'h00);
    for (int i = 0; i < 20; i++) begin
      int dx;
      dx = int'($urandom_range(0, 255)) - 128;
      sensor.add_motion(dx, 0);
      xfer(0, 7'h03, 8'h00, q, n);
      check("random delta x", q, 8'(dx));
    end
    checks++;
    if (sensor.timing_violations != 0 || bad_period != 0 || periods < 100) begin
      failures++;
      $display("FAIL: timing: srad=%0d short periods=%0d periods=%0d",
               sensor.timing_violations, bad_period, periods);
    end
    // SCLK at most 4.5 MHz with a 50 MHz clock
    checks++;
    if (50_000_000 / (2 * SCLK_HALF) > 4_500_000) begin
      failures++; $display("FAIL: SCLK too fast");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
