// gpio: pin interface between the scanner logic and the mouse.
//
// Five mouse signals are used: PD (output, held high so the sensor stays
// powered), SDIO (bidirectional serial data), SCLK (serial clock output)
// and the left/right button lines L and R (inputs, active low).
// The inputs from the mouse (L, R and SDIO read-back) pass through
// two-flop synchronisers, so the logic sees them two clocks late. The
// outputs (SCLK, SDIO data and SDIO drive enable) are registered in the
// pad flops, one clock late. SDIO is split into _o/_oe/_i here; the
// tristate buffer belongs to the FPGA pad.
// The pin set and PD held high follow the scanner's GPIO wiring; the
// synchronisers and output registers are this design's choice (the
// document says nothing about synchronisation).
module gpio (
  input  logic clk,
  input  logic rst_n,
  // pins towards the mouse
  output logic pin_pd,
  output logic pin_sclk,
  output logic pin_sdio_o,
  output logic pin_sdio_oe,
  input  logic pin_sdio_i,
  input  logic pin_l_n,
  input  logic pin_r_n,
  // core side
  input  logic sclk,
  input  logic sdio_o,
  input  logic sdio_oe,
  output logic sdio_i,
  output logic left_n,
  output logic right_n
);

  logic [1:0] l_sync, r_sync, d_sync;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      l_sync      <= 2'b11;   // buttons released
      r_sync      <= 2'b11;
      d_sync      <= 2'b11;   // idle bus reads high
      pin_sclk    <= 1'b1;    // serial clock idles high
      pin_sdio_o  <= 1'b0;
      pin_sdio_oe <= 1'b0;
    end else begin
      l_sync      <= {l_sync[0], pin_l_n};
      r_sync      <= {r_sync[0], pin_r_n};
      d_sync      <= {d_sync[0], pin_sdio_i};
      pin_sclk    <= sclk;
      pin_sdio_o  <= sdio_o;
      pin_sdio_oe <= sdio_oe;
    end

  assign pin_pd  = 1'b1;
  assign left_n  = l_sync[1];
  assign right_n = r_sync[1];
  assign sdio_i  = d_sync[1];

endmodule
