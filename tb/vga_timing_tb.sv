// vga_timing_tb: self-checking test of the 640x480 raster counters.
// Runs two frames at pix_en every other clock and checks the line length
// (800 pixels), hsync width (96) and position (after 640+16), frame
// length (525 lines), vsync width (2 lines) and position (after 480+10),
// and the count of active pixels (640x480) per frame; the hsync width
// and line length are checked on every line.
`timescale 1ns/1ps
module vga_timing_tb;
  logic       clk = 0, rst_n = 0, pix_en = 0;
  logic [9:0] hcount, vcount;
  logic       active, hsync_n, vsync_n, frame_start;
  int         checks = 0, failures = 0;

  vga_timing dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) pix_en <= rst_n ? ~pix_en : 1'b0;

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s = %0d, expected %0d", what, got, exp); end
  endtask

  // observe once per pixel (on the clock after pix_en)
  int pix = 0, active_cnt = 0, hs_low = 0, hs_start = -1, vs_lines = 0;
  int frames = 0, last_hs_fall = -1, line_len = 0, hs_falls = 0;
  int vs_fall = -1, last_vs_fall = -1, frame_len = 0, vs_width = 0, vs_low = 0;
  logic hs_q = 1, vs_q = 1, pe_q = 0;

  always @(posedge clk) begin
    pe_q <= pix_en;
    if (pe_q) begin
      pix++;
      if (active) active_cnt++;
      if (!hsync_n) hs_low++;
      if (!vsync_n) vs_low++;
      if (!hs_q && hsync_n && last_hs_fall >= 0) begin
        // every sync pulse is 96 pixels wide
        checks++;
        if (pix - last_hs_fall != 96) begin
          failures++; $display("FAIL: hsync pulse %0d pixels", pix - last_hs_fall);
        end
      end
      if (hs_q && !hsync_n) begin
        hs_falls++;
        if (last_hs_fall >= 0) begin
          line_len = pix - last_hs_fall;
          // every line is 800 pixels long
          checks++;
          if (line_len != 800) begin failures++; $display("FAIL: line of %0d pixels", line_len); end
        end
        last_hs_fall = pix;
        hs_start = hcount;
      end
      if (vs_q && !vsync_n) begin
        if (last_vs_fall >= 0) frame_len = pix - last_vs_fall;
        last_vs_fall = pix;
        vs_lines = vcount;
      end
      hs_q <= hsync_n;
      vs_q <= vsync_n;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame 0 from reset
    wait (frame_start == 0);
    @(posedge frame_start);
    active_cnt = 0; hs_low = 0; vs_low = 0;
    @(posedge frame_start);
    expect_eq("active pixels per frame", active_cnt, 640 * 480);
    expect_eq("hsync low pixels per frame", hs_low, 96 * 525);
    expect_eq("vsync low pixels per frame", vs_low, 2 * 800);
    expect_eq("line length", line_len, 800);
    expect_eq("frame length", frame_len, 800 * 525);
    expect_eq("hsync starts at", hs_start, 640 + 16);
    expect_eq("vsync starts at line", vs_lines, 480 + 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
