// omscan_checker: stimulus and checking for whole-scanner tests.
//
// Holds the ADNS-2051 model on the mouse pins, presses the buttons and
// rebuilds the expected aggregate, inset and mouse position from what it
// asks the sensor to report (motion per sample, pixel dump number), with
// its own copy of the placement rule. The screen is checked end to end:
// whole VGA frames are captured from the DAC outputs and compared pixel
// by pixel with the expected picture.
// Scenario: clear after reset; Idle does not poll; Scan (left button)
// captures and places N_SAMPLES samples, driving the position into the
// right edge so pixels are clipped and the position clamps; a frame is
// checked; Reset (right button) in the middle of a pixel dump drops that
// sample and clears the screen, which is checked with another frame;
// scanning resumes. Every mechanism is counted, and one that never
// happened counts as a failure. done rises at the end.
`timescale 1ns/1ps
module omscan_checker
  import oms_pkg::*;
  import oms_tb_pkg::*;
#(
  parameter int T_SRAD    = 5000,   // sensor address-to-data wait, clocks
  parameter int N_SAMPLES = 3
) (
  output logic        clk,
  output logic        rst_n,
  input  logic        mouse_pd,
  input  logic        mouse_sclk,
  input  logic        mouse_sdio_o,
  input  logic        mouse_sdio_oe,
  output logic        mouse_sdio_i,
  output logic        mouse_l_n,
  output logic        mouse_r_n,
  input  logic        vga_clk,
  input  logic        vga_hs,
  input  logic        vga_vs,
  input  logic        vga_blank_n,
  input  logic        vga_sync_n,
  input  logic [9:0]  vga_r,
  input  logic [9:0]  vga_g,
  input  logic [9:0]  vga_b,
  input  mode_t       mode,
  input  logic [6:0]  pos_x,
  input  logic [6:0]  pos_y,
  input  logic [2:0]  queue_count,
  input  logic        queue_stall,
  input  logic [15:0] samples_captured,
  input  logic [15:0] samples_placed,
  input  logic [7:0]  motion_status,
  input  logic        clearing,
  input  logic        serial_busy,
  input  logic [15:0] clipped_pixels,
  input  logic        frame_start,
  output int          checks,
  output int          failures,
  output logic        done
);

  logic m_out, m_oe, bus;
  assign bus          = mouse_sdio_oe ? mouse_sdio_o : (m_oe ? m_out : 1'b1);
  assign mouse_sdio_i = bus;

  adns2051_model #(.TSRAD_NS(T_SRAD * 20.0)) sensor (
    .sclk(mouse_sclk), .sdio(bus), .pd(mouse_pd), .sdio_out(m_out), .sdio_oe(m_oe)
  );

  initial begin
    clk = 0; rst_n = 0; mouse_l_n = 1; mouse_r_n = 1;
    checks = 0; failures = 0; done = 0;
  end
  always #10 clk = ~clk;

  // ---------------- reference picture
  logic [5:0] ref_agg [16384];
  logic [5:0] ref_ins [256];
  int         rx = 64, ry = 64;

  function automatic int clampi(input int v);
    return (v < 0) ? 0 : (v > 127) ? 127 : v;
  endfunction

  task automatic ref_clear();
    foreach (ref_agg[i]) ref_agg[i] = 0;
    foreach (ref_ins[i]) ref_ins[i] = 0;
    rx = 64; ry = 64;
  endtask

  int ref_clipped = 0;
  task automatic ref_place(input int frame, input int dx, input int dy);
    rx = clampi(rx + dx);
    ry = clampi(ry - dy);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int a, x, y;
        a = ((15 - c) << 4) | (15 - r);
        x = rx - 8 + c;
        y = ry - 8 + r;
        ref_ins[r * 16 + c] = pixval(frame, a);
        if (x >= 0 && x < 128 && y >= 0 && y < 128) ref_agg[y * 128 + x] = pixval(frame, a);
        else ref_clipped++;
      end
  endtask

  function automatic logic [29:0] expected(input int x, input int y);
    logic [9:0] g;
    int gx, gy;
    gx = x - 256; gy = y - 176;
    if (gx >= 0 && gx < 128 && gy >= 0 && gy < 128) begin
      if (((gx == rx - 8 || gx == rx + 7) && gy >= ry - 8 && gy <= ry + 7) ||
          ((gy == ry - 8 || gy == ry + 7) && gx >= rx - 8 && gx <= rx + 7))
        return {10'h3FF, 20'h0};
      g = {ref_agg[gy * 128 + gx], ref_agg[gy * 128 + gx][5:2]};
      return {g, g, g};
    end
    if (x >= 64 && x < 128 && y >= 64 && y < 128) begin
      g = {ref_ins[((y - 64) / 4) * 16 + (x - 64) / 4], ref_ins[((y - 64) / 4) * 16 + (x - 64) / 4][5:2]};
      return {g, g, g};
    end
    return '0;
  endfunction

  // ---------------- frame capture: compare while capture_on, from a vsync end
  logic capture_req = 0;
  int   cap_k = -1, cap_bad = 0, cap_frames = 0;
  logic vs_q = 1;
  always @(posedge vga_clk) begin
    if (vga_vs && !vs_q) begin
      if (cap_k == 640 * 480) begin cap_frames++; capture_req <= 0; end
      cap_k = capture_req ? 0 : -1;
    end
    vs_q <= vga_vs;
    if (vga_blank_n && cap_k >= 0 && cap_k < 640 * 480) begin
      if ({vga_r, vga_g, vga_b} !== expected(cap_k % 640, cap_k / 640)) begin
        cap_bad++;
        if (cap_bad < 5) $display("FAIL: screen pixel (%0d,%0d)", cap_k % 640, cap_k / 640);
      end
      cap_k++;
    end
  end

  task automatic check_frame(input string what);
    int f0, b0;
    f0 = cap_frames; b0 = cap_bad;
    capture_req = 1;
    while (cap_frames == f0) @(posedge clk);
    checks++;
    if (cap_bad != b0) begin
      failures++; $display("FAIL: %s: %0d screen pixels wrong", what, cap_bad - b0);
    end
  endtask

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters
  int n_idle_silent = 0, n_placed = 0, n_clipped = 0, n_clamped = 0;
  int n_reset_clear = 0, n_abort = 0, n_queued = 0, n_frames = 0;
  always @(posedge clk) if (rst_n && queue_count != 0) n_queued++;

  int pend_x = 0, pend_y = 0;   // motion given while not scanning
  task automatic scan_one(input int dx, input int dy);
    int c0, p0, t;
    c0 = samples_captured;
    p0 = samples_placed;
    sensor.add_motion(dx, dy);
    t = 0;
    while (samples_placed == p0 && t < 4000000) begin @(posedge clk); t++; end
    expect_true("sample placed", samples_placed == 16'(p0 + 1) && samples_captured == 16'(c0 + 1));
    ref_place(sensor.frame, dx + pend_x, dy + pend_y);
    pend_x = 0;
    pend_y = 0;
    expect_true("position", pos_x == 7'(rx) && pos_y == 7'(ry));
    n_placed++;
    if (rx == 127 || rx == 0 || ry == 127 || ry == 0) n_clamped++;
  endtask

  int reads0, cap0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    ref_clear();
    @(posedge clk);
    while (clearing) @(posedge clk);
    expect_true("PD held high", mouse_pd === 1'b1);
    expect_true("mode idle", mode == MODE_IDLE);
    // idle: no polling
    repeat (30000) @(posedge clk);
    reads0 = sensor.reads;
    sensor.add_motion(1, 1);
    pend_x = 1;
    pend_y = 1;
    repeat (30000) @(posedge clk);
    expect_true("no polling in Idle", sensor.reads == reads0);
    if (sensor.reads == reads0) n_idle_silent++;
    // scan
    mouse_l_n = 0;
    repeat (10) @(posedge clk);
    expect_true("mode scan", mode == MODE_SCAN);
    scan_one(0, 0);                  // picks up the motion given in Idle
    for (int i = 1; i < N_SAMPLES; i++)
      scan_one((i % 2) ? 9 : -4, (i % 3) ? 5 : -6);
    scan_one(60, 0);                 // to the right edge: clamp and clip
    if (int'(clipped_pixels) == ref_clipped && ref_clipped > 0) n_clipped++;
    expect_true("clipped pixel count", int'(clipped_pixels) == ref_clipped);
    check_frame("after scan");
    n_frames++;
    // reset in the middle of a pixel dump
    cap0 = samples_captured;
    sensor.add_motion(-3, 2);
    while (!(sensor.cfg[3] && sensor.pix_n > 50)) @(posedge clk);
    mouse_r_n = 0;
    repeat (10) @(posedge clk);
    expect_true("mode reset", mode == MODE_RESET);
    expect_true("clearing", clearing);
    if (clearing) n_reset_clear++;
    mouse_r_n = 1;
    mouse_l_n = 1;
    ref_clear();
    while (clearing || sensor.cfg[3]) @(posedge clk);
    repeat (1000) @(posedge clk);
    expect_true("aborted sample dropped", samples_captured == 16'(cap0));
    if (samples_captured == 16'(cap0)) n_abort++;
    expect_true("recentred", pos_x == 7'd64 && pos_y == 7'd64);
    check_frame("after reset");
    n_frames++;
    // scan again
    mouse_l_n = 0;
    scan_one(-2, 3);
    mouse_l_n = 1;
    check_frame("after rescan");
    n_frames++;
    expect_true("serial timing", sensor.timing_violations == 0);
    expect_true("no early sensor access", sensor.writes > 2);
    // mechanisms
    $display("mechanisms: idle-no-poll=%0d placed=%0d not-ready-retries=%0d clipped=%0d clamped=%0d reset-clear=%0d reset-abort=%0d queued-cycles=%0d frames=%0d",
             n_idle_silent, n_placed, sensor.invalid_reads, n_clipped, n_clamped,
             n_reset_clear, n_abort, n_queued, n_frames);
    expect_true("mechanism idle",      n_idle_silent > 0);
    expect_true("mechanism placed",    n_placed > 0);
    expect_true("mechanism not-ready", sensor.invalid_reads > 0);
    expect_true("mechanism clipped",   n_clipped > 0);
    expect_true("mechanism clamped",   n_clamped > 0);
    expect_true("mechanism reset",     n_reset_clear > 0);
    expect_true("mechanism abort",     n_abort > 0);
    expect_true("mechanism queue",     n_queued > 0);
    expect_true("mechanism frames",    n_frames > 0);
    done = 1;
  end
endmodule
