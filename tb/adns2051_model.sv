// adns2051_model: behavioural model of the ADNS-2051 optical mouse
// sensor's serial port and the registers the scanner uses. Not
// synthesizable; testbench use only.
//
// Serial port: SCLK idles high; the sensor samples SDIO on rising edges.
// A transaction starts with an address byte, MSB first, bit 7 = 1 for a
// write. A write is followed by its data byte. For a read the sensor
// drives the 8 data bits after each of the next 8 falling edges and lets
// go of SDIO after the 8th rising edge. A first data falling edge sooner
// than TSRAD_NS after the address byte counts as a timing violation.
//
// Registers: Motion (0x02) has MOT set while accumulated motion is
// non-zero; Delta_X (0x03) / Delta_Y (0x04) return it and clear it;
// Configuration_bits (0x0a) is read/write, writing PixDump = 1 starts a
// pixel dump; Data_Out_Lower (0x0c) then returns 0x80 (not ready) for the
// first INVALID_FIRST reads and once more before every 64th pixel, and
// otherwise pixel values pixval(frame, n) for n = 0 .. 255.
// The testbench adds motion with add_motion().
`timescale 1ns/1ps
module adns2051_model
  import oms_tb_pkg::*;
#(
  parameter real TSRAD_NS      = 100000.0,
  parameter int  INVALID_FIRST = 3
) (
  input  logic sclk,
  input  logic sdio,      // resolved bus value
  input  logic pd,
  output logic sdio_out,
  output logic sdio_oe
);

  logic [7:0] cfg = 8'h00;
  int         acc_x = 0, acc_y = 0;
  int         frame = -1;
  int         pix_n = 0;
  int         invalid_left = 0;
  int         writes = 0, reads = 0;
  int         timing_violations = 0;
  int         invalid_reads = 0;
  int         pd_low = 0;

  logic [7:0] sh = 0;
  logic [7:0] wr_addr = 0;
  int         rise_cnt = 0;
  logic       rd_phase = 0;
  int         rd_bits = 0;
  logic [7:0] rbyte = 0;
  realtime    t_addr_done = 0;
  logic       seen_fall = 0;   // ignore the power-up SCLK edge

  initial begin
    sdio_out = 1'b1;
    sdio_oe  = 1'b0;
  end

  task automatic add_motion(input int dx, input int dy);
    acc_x += dx;
    acc_y += dy;
  endtask

  function automatic logic [7:0] sat8(input int v);
    if (v > 127)  return 8'h7F;
    if (v < -128) return 8'h80;
    return 8'(v);
  endfunction

  function automatic logic [7:0] read_reg(input logic [6:0] a);
    logic [7:0] v;
    v = 8'h00;
    case (a)
      7'h02: v = {(acc_x != 0 || acc_y != 0), 7'b0};
      7'h03: begin v = sat8(acc_x); acc_x = 0; end
      7'h04: begin v = sat8(acc_y); acc_y = 0; end
      7'h0a: v = cfg;
      7'h0c: begin
        if (!cfg[3] || pix_n > 255) v = 8'h80;
        else if (invalid_left > 0) begin
          invalid_left--;
          invalid_reads++;
          v = 8'h80;
        end else begin
          v = {2'b00, pixval(frame, pix_n)};
          pix_n++;
          if (pix_n % 64 == 0) invalid_left = 1;
        end
      end
      default: v = 8'h00;
    endcase
    return v;
  endfunction

  task automatic write_reg(input logic [6:0] a, input logic [7:0] d);
    writes++;
    if (a == 7'h0a) begin
      if (d[3] && !cfg[3]) begin
        frame++;
        pix_n = 0;
        invalid_left = INVALID_FIRST;
      end
      cfg = d;
    end
  endtask

  always @(negedge pd) pd_low++;

  always @(negedge sclk) begin
    seen_fall = 1;
    if (rd_phase) begin
      if (rd_bits == 0 && ($realtime - t_addr_done) < TSRAD_NS)
        timing_violations++;
      sdio_oe  <= 1'b1;
      sdio_out <= rbyte[7 - rd_bits];
    end
  end

  always @(posedge sclk) begin
    if (!seen_fall) begin
      // not a transaction edge
    end else if (rd_phase) begin
      rd_bits++;
      if (rd_bits == 8) begin
        rd_phase = 0;
        rise_cnt = 0;
        sdio_oe  <= 1'b0;
      end
    end else begin
      sh = {sh[6:0], sdio};
      rise_cnt++;
      if (rise_cnt == 8) begin
        if (sh[7]) begin
          wr_addr = sh;
        end else begin
          reads++;
          rbyte = read_reg(sh[6:0]);
          rd_phase = 1;
          rd_bits = 0;
          rise_cnt = 0;
          t_addr_done = $realtime;
        end
      end else if (rise_cnt == 16) begin
        write_reg(wr_addr[6:0], sh);
        rise_cnt = 0;
      end
    end
  end

endmodule
