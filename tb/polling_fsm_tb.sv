// polling_fsm_tb: self-checking test of the polling state machine, run
// with the serial master and the ADNS-2051 model.
// Checks: the Sleep = 1 configuration write after reset; no polling in
// Idle; a sample per motion in Scan with its Delta_X/Delta_Y and all 256
// pixels (not-ready reads retried); the stall while the queue is full;
// a sample dropped, with PixDump still cleared, when Reset comes in the
// middle of a pixel dump.
`timescale 1ns/1ps
module polling_fsm_tb;
  import oms_pkg::*;
  import oms_tb_pkg::*;

  localparam int T_SRAD = 40;

  logic       clk = 0, rst_n = 0;
  mode_t      mode = MODE_IDLE;
  logic       spi_req, spi_we, spi_done, busy;
  logic [6:0] spi_addr;
  logic [7:0] spi_wdata, spi_rdata;
  logic       q_full = 0, q_wr_en, q_push;
  logic [7:0] q_wr_addr;
  logic [5:0] q_wr_data;
  motion_t    q_push_hdr;
  logic       stall;
  logic [7:0] motion_status;
  logic [15:0] samples;
  logic       sclk, sdio_o, sdio_oe, m_out, m_oe, bus;
  int         checks = 0, failures = 0;

  assign bus = sdio_oe ? sdio_o : (m_oe ? m_out : 1'b1);

  polling_fsm dut (.*);

  adns_serial #(.T_SRAD(T_SRAD), .T_WGAP(40)) u_ser (
    .clk, .rst_n, .req(spi_req), .we(spi_we), .addr(spi_addr), .wdata(spi_wdata),
    .busy, .done(spi_done), .rdata(spi_rdata),
    .sclk, .sdio_o, .sdio_oe, .sdio_i(bus)
  );

  adns2051_model #(.TSRAD_NS(T_SRAD * 20.0)) sensor (
    .sclk, .sdio(bus), .pd(1'b1), .sdio_out(m_out), .sdio_oe(m_oe)
  );

  always #10 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // capture of what would go into the queue
  logic [5:0] img [256];
  int         wr_count = 0, pushes = 0, stall_cycles = 0;
  motion_t    last_hdr;
  always @(posedge clk) if (rst_n) begin
    if (q_wr_en) begin img[q_wr_addr] <= q_wr_data; wr_count++; end
    if (q_push) begin pushes++; last_hdr <= q_push_hdr; end
    if (stall) stall_cycles++;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic check_sample(input int frame, input int dx, input int dy);
    int bad;
    bad = 0;
    for (int a = 0; a < 256; a++) if (img[a] !== pixval(frame, a)) bad++;
    expect_eq("bad pixels", bad, 0);
    expect_eq("dx", int'(last_hdr.dx), dx);
    expect_eq("dy", int'(last_hdr.dy), dy);
  endtask

  task automatic wait_pushes(input int n);
    int t;
    t = 0;
    while (pushes < n && t < 2000000) begin @(posedge clk); t++; end
    expect_eq("pushes", pushes, n);
    @(posedge clk);
  endtask

  int reads0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    expect_eq("config after reset", int'(sensor.cfg), 8'h01);
    // Idle: no polling even with motion pending
    sensor.add_motion(3, 4);
    reads0 = sensor.reads;
    repeat (5000) @(posedge clk);
    expect_eq("reads in idle", sensor.reads - reads0, 0);
    // Scan: one sample
    mode = MODE_SCAN;
    wait_pushes(1);
    check_sample(0, 3, 4);
    expect_eq("pixel writes", wr_count, 256);
    expect_eq("config after dump", int'(sensor.cfg), 8'h01);
    checks++;
    if (sensor.invalid_reads < 6) begin failures++; $display("FAIL: no not-ready reads"); end
    expect_eq("samples counter", int'(samples), 1);
    // no motion: keeps polling, no sample
    repeat (20000) @(posedge clk);
    expect_eq("pushes without motion", pushes, 1);
    // queue full: stall, no sensor access
    q_full = 1;
    repeat (3000) @(posedge clk);
    sensor.add_motion(-7, 12);
    reads0 = sensor.reads;
    repeat (5000) @(posedge clk);
    expect_eq("reads while full", sensor.reads - reads0, 0);
    checks++;
    if (stall_cycles < 5000) begin failures++; $display("FAIL: stall not signalled"); end
    q_full = 0;
    wait_pushes(2);
    check_sample(1, -7, 12);
    // reset in the middle of a dump: sample dropped, PixDump cleared
    sensor.add_motion(1, 1);
    while (!(sensor.cfg[3] && sensor.pix_n > 100)) @(posedge clk);
    mode = MODE_RESET;
    repeat (100) @(posedge clk);
    mode = MODE_IDLE;
    while (sensor.cfg[3]) @(posedge clk);
    repeat (2000) @(posedge clk);
    expect_eq("pushes after aborted sample", pushes, 2);
    expect_eq("config after abort", int'(sensor.cfg), 8'h01);
    // and scanning resumes with the next frame
    sensor.add_motion(-2, 5);
    mode = MODE_SCAN;
    wait_pushes(3);
    check_sample(3, -2, 5);
    expect_eq("serial timing violations", sensor.timing_violations, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
