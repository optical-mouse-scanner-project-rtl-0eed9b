// vga_raster_tb: self-checking test of the VGA raster controller.
// Fills the aggregate and inset memories (testbench models with a
// one-clock read) with patterns, then captures one whole frame at the
// rising edges of vga_clk and compares every visible pixel with the
// expected screen: the inset scaled 4x at (64,64), the aggregate at
// (256,176), the red 16x16 outline around the mouse position, black
// elsewhere. Also checks 307200 visible pixels per frame and a frame
// period of 800x525 pixels of two clocks each.
`timescale 1ns/1ps
module vga_raster_tb;
  import oms_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [6:0]  pos_x = 7'd30, pos_y = 7'd100;
  logic [7:0]  ins_raddr;
  logic [5:0]  ins_rdata;
  logic [13:0] agg_raddr;
  logic [5:0]  agg_rdata;
  logic        vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0]  vga_r, vga_g, vga_b;
  logic        frame_start;
  int          checks = 0, failures = 0;

  vga_raster dut (.*);

  always #10 clk = ~clk;

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] agg [16384];
  logic [5:0] ins [256];
  always @(posedge clk) begin
    agg_rdata <= agg[agg_raddr];
    ins_rdata <= ins[ins_raddr];
  end

  function automatic logic [29:0] expected(input int x, input int y);
    logic [9:0] g;
    int gx, gy, px, py;
    gx = x - 256; gy = y - 176;
    px = pos_x; py = pos_y;
    if (gx >= 0 && gx < 128 && gy >= 0 && gy < 128) begin
      if (((gx == px - 8 || gx == px + 7) && gy >= py - 8 && gy <= py + 7) ||
          ((gy == py - 8 || gy == py + 7) && gx >= px - 8 && gx <= px + 7))
        return {10'h3FF, 10'h000, 10'h000};
      g = {agg[gy * 128 + gx], agg[gy * 128 + gx][5:2]};
      return {g, g, g};
    end
    if (x >= 64 && x < 128 && y >= 64 && y < 128) begin
      g = {ins[((y - 64) / 4) * 16 + (x - 64) / 4], ins[((y - 64) / 4) * 16 + (x - 64) / 4][5:2]};
      return {g, g, g};
    end
    return '0;
  endfunction

  int   k = -1, bad = 0, visible = 0, marker_px = 0;
  int   cyc = 0, vs_rise = -1, frame_clocks = 0;
  logic vs_q = 1;
  always @(posedge clk) cyc++;
  always @(posedge vga_clk) begin
    if (vga_vs && !vs_q) begin
      if (vs_rise >= 0) frame_clocks = cyc - vs_rise;
      vs_rise = cyc;
      if (k >= 0) visible = k;
      k = 0;
    end
    vs_q <= vga_vs;
    if (vga_blank_n && k >= 0) begin
      if (k < 640 * 480) begin
        if ({vga_r, vga_g, vga_b} !== expected(k % 640, k / 640)) begin
          bad++;
          if (bad < 5) $display("FAIL: pixel (%0d,%0d) = %h %h %h", k % 640, k / 640, vga_r, vga_g, vga_b);
        end
        if (vga_r == 10'h3FF && vga_g == 0) marker_px++;
      end
      k++;
    end
  end

  initial begin
    foreach (agg[i]) agg[i] = 6'(i * 7 + (i >> 7));
    foreach (ins[i]) ins[i] = 6'(i * 5 + 3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // two vsync ends: the frame between them is fully checked
    while (vs_rise < 0) @(posedge clk);
    while (visible == 0) @(posedge clk);
    checks += visible;   // one comparison per visible pixel
    if (bad != 0) begin failures++; $display("FAIL: %0d pixels wrong", bad); end
    checks++;
    if (visible != 640 * 480) begin failures++; $display("FAIL: %0d visible pixels", visible); end
    checks++;
    if (frame_clocks != 800 * 525 * 2) begin failures++; $display("FAIL: frame %0d clocks", frame_clocks); end
    checks++;
    if (marker_px != 60) begin failures++; $display("FAIL: %0d marker pixels", marker_px); end
    checks++;
    if (vga_sync_n !== 1'b0) begin failures++; $display("FAIL: sync"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
