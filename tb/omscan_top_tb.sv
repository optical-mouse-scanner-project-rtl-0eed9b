// omscan_top_tb: end-to-end test of the scanner with a fast sensor
// model (serial waits shortened to 50 clocks) and 14 samples; all other
// parameters at their defaults. The scenario and the checks are in
// omscan_checker.
`timescale 1ns/1ps
module omscan_top_tb;
  import oms_pkg::*;

  logic        clk, rst_n;
  logic        mouse_pd, mouse_sclk, mouse_sdio_o, mouse_sdio_oe, mouse_sdio_i, mouse_l_n, mouse_r_n;
  logic        vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0]  vga_r, vga_g, vga_b;
  mode_t       mode;
  logic [6:0]  pos_x, pos_y;
  logic [2:0]  queue_count;
  logic        queue_stall, clearing, serial_busy, frame_start;
  logic [15:0] samples_captured, samples_placed, clipped_pixels;
  logic [7:0]  motion_status;
  int          checks, failures;
  logic        done;

  omscan_top #(.T_SRAD(50), .T_WGAP(50)) dut (.*);
  omscan_checker #(.T_SRAD(50), .N_SAMPLES(12)) chk (.*);

  initial begin
    #400ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
