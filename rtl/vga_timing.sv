// vga_timing: horizontal and vertical raster counters for 640x480 VGA.
//
// hcount runs 0 .. H_TOTAL-1 and vcount 0 .. V_TOTAL-1, advancing once per
// clock in which pix_en is high. Each line is H_ACTIVE visible pixels,
// then front porch, sync pulse and back porch; each frame likewise in
// lines. hsync_n and vsync_n are low during the sync pulses; active is
// high on visible pixels. All outputs are registered and change in the
// clock after a pix_en.
// The 640x480 raster and its ~25 MHz pixel rate are the scanner's; the
// porch and sync widths are the standard 640x480 at 60 Hz values and are
// this design's choice.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_en,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       active,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       frame_start   // one pix_en wide, at (0,0)
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [9:0] h_n, v_n;

  always_comb begin
    h_n = hcount + 1'b1;
    v_n = vcount;
    if (hcount == 10'(H_TOTAL - 1)) begin
      h_n = '0;
      v_n = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hcount      <= '0;
      vcount      <= '0;
      active      <= 1'b1;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      frame_start <= 1'b1;
    end else if (pix_en) begin
      hcount      <= h_n;
      vcount      <= v_n;
      active      <= (h_n < 10'(H_ACTIVE)) && (v_n < 10'(V_ACTIVE));
      hsync_n     <= !((h_n >= 10'(H_ACTIVE + H_FP)) && (h_n < 10'(H_ACTIVE + H_FP + H_SYNC)));
      vsync_n     <= !((v_n >= 10'(V_ACTIVE + V_FP)) && (v_n < 10'(V_ACTIVE + V_FP + V_SYNC)));
      frame_start <= (h_n == '0) && (v_n == '0);
    end

endmodule
