// oms_pkg: types and constants shared by the optical mouse scanner.
//
// The scanner reads 16x16 grayscale images (6 bits per pixel) and X/Y
// motion from an ADNS-2051 mouse sensor over its two-wire serial port and
// pastes each image into a 128x128 aggregate shown on a 640x480 VGA screen.
// The register addresses and bit positions below are those of the sensor's
// register map (Motion 0x02, Delta_X 0x03, Delta_Y 0x04,
// Configuration_bits 0x0a, Data_Out_Lower 0x0c). The encoding of the
// operating mode is this design's own choice.
package oms_pkg;

  // Image sample geometry
  localparam int PIX_W      = 6;    // grayscale bits per pixel
  localparam int SAMPLE_DIM = 16;   // sample is SAMPLE_DIM x SAMPLE_DIM
  localparam int SAMPLE_PIX = SAMPLE_DIM * SAMPLE_DIM;

  // Aggregate image geometry
  localparam int AGG_DIM    = 128;
  localparam int AGG_AW     = 14;   // log2(AGG_DIM*AGG_DIM)

  // Operating mode, selected by the mouse buttons
  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,
    MODE_SCAN  = 2'd1,
    MODE_RESET = 2'd2
  } mode_t;

  // ADNS-2051 register addresses (7 bits, MSB of the serial address byte
  // is the write flag)
  localparam logic [6:0] REG_MOTION         = 7'h02;
  localparam logic [6:0] REG_DELTA_X        = 7'h03;
  localparam logic [6:0] REG_DELTA_Y        = 7'h04;
  localparam logic [6:0] REG_CONFIG         = 7'h0a;
  localparam logic [6:0] REG_DATA_OUT_LOWER = 7'h0c;

  // Bit positions
  // (Motion also holds FAULT in bit 5, OVFY in bit 4, OVFX in bit 3; the
  // scanner only reports them.)
  localparam int MOTION_MOT   = 7;
  localparam int CFG_PIXDUMP  = 3;
  localparam int CFG_SLEEP    = 0;
  localparam int DOL_INVALID  = 7;   // Data_Out_Lower MSB: 1 = not ready

  // Configuration_bits values written by the polling FSM
  localparam logic [7:0] CFG_AWAKE      = 8'(1 << CFG_SLEEP);          // Sleep = 1
  localparam logic [7:0] CFG_AWAKE_DUMP = CFG_AWAKE | 8'(1 << CFG_PIXDUMP);

  // Motion carried with each image sample (two's complement counts)
  typedef struct packed {
    logic signed [7:0] dx;
    logic signed [7:0] dy;
  } motion_t;

endpackage
