// vga_raster: VGA raster controller that shows the scan.
//
// The screen is 640x480 at a pixel rate of half of clk (25 MHz from a
// 50 MHz clk; vga_clk is that pixel clock, rising mid-way through each
// pixel). On a black background it draws two images:
//   - the inset: the 16x16 current sample, each pixel as a 4x4 block,
//     64x64 screen pixels with its top-left corner at (INSET_X0, INSET_Y0);
//   - the aggregate: the 128x128 scan, one screen pixel per image pixel,
//     top-left corner at (AGG_X0, AGG_Y0), with the mouse position marked
//     by a red 16x16 outline centred on (pos_x, pos_y).
// Each 6-bit gray level g becomes the 10-bit level {g, g[5:2]} on all
// three channels.
//
// Pipeline: the counters of vga_timing change after a pix_en clock; the
// image addresses follow combinationally, the frame buffers answer one
// clock later, and all VGA outputs (syncs, blank, colour) are registered
// together on the next pix_en clock, so they stay aligned. The outputs
// lag the counters by one pixel.
// The screen size, the 64x64 inset and 128x128 aggregate, the 10-bit
// colour and the marked mouse position follow the scanner description;
// the placement of the two images, the marker shape and the grey-to-RGB
// rule are this design's choices.
module vga_raster
  import oms_pkg::*;
#(
  parameter int unsigned INSET_X0 = 64,
  parameter int unsigned INSET_Y0 = 64,
  parameter int unsigned AGG_X0   = 256,
  parameter int unsigned AGG_Y0   = 176
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [6:0]        pos_x,
  input  logic [6:0]        pos_y,
  // frame buffer read ports
  output logic [7:0]        ins_raddr,
  input  logic [PIX_W-1:0]  ins_rdata,
  output logic [AGG_AW-1:0] agg_raddr,
  input  logic [PIX_W-1:0]  agg_rdata,
  // VGA DAC
  output logic              vga_clk,
  output logic              vga_hs,
  output logic              vga_vs,
  output logic              vga_blank_n,
  output logic              vga_sync_n,
  output logic [9:0]        vga_r,
  output logic [9:0]        vga_g,
  output logic [9:0]        vga_b,
  output logic              frame_start
);

  localparam int unsigned INSET_DIM = SAMPLE_DIM * 4;

  logic       pix_en;
  logic [9:0] hcount, vcount;
  logic       active, hsync_n, vsync_n;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pix_en <= 1'b0;
    else        pix_en <= ~pix_en;

  vga_timing u_timing (
    .clk, .rst_n, .pix_en,
    .hcount, .vcount, .active, .hsync_n, .vsync_n, .frame_start
  );

  // region decode and addresses (valid while the counters are stable)
  logic [9:0] ix, iy, gx, gy;
  logic       in_inset, in_agg;
  assign ix = hcount - 10'(INSET_X0);
  assign iy = vcount - 10'(INSET_Y0);
  assign gx = hcount - 10'(AGG_X0);
  assign gy = vcount - 10'(AGG_Y0);
  assign in_inset = (hcount >= 10'(INSET_X0)) && (ix < 10'(INSET_DIM)) &&
                    (vcount >= 10'(INSET_Y0)) && (iy < 10'(INSET_DIM));
  assign in_agg   = (hcount >= 10'(AGG_X0)) && (gx < 10'(AGG_DIM)) &&
                    (vcount >= 10'(AGG_Y0)) && (gy < 10'(AGG_DIM));
  assign ins_raddr = {iy[5:2], ix[5:2]};
  assign agg_raddr = {gy[6:0], gx[6:0]};

  // mouse position marker: outline of the 16x16 box centred on pos
  logic signed [10:0] mx0, mx1, my0, my1, sx, sy;
  logic               on_marker;
  assign mx0 = $signed({4'b0, pos_x}) - 11'sd8;
  assign mx1 = $signed({4'b0, pos_x}) + 11'sd7;
  assign my0 = $signed({4'b0, pos_y}) - 11'sd8;
  assign my1 = $signed({4'b0, pos_y}) + 11'sd7;
  assign sx  = $signed({1'b0, gx});
  assign sy  = $signed({1'b0, gy});
  assign on_marker = in_agg &&
    ((((sx == mx0) || (sx == mx1)) && (sy >= my0) && (sy <= my1)) ||
     (((sy == my0) || (sy == my1)) && (sx >= mx0) && (sx <= mx1)));

  function automatic logic [9:0] gray10(input logic [PIX_W-1:0] g);
    return {g, g[5:2]};
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      vga_clk     <= 1'b0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
    end else begin
      vga_clk <= ~pix_en;
      if (pix_en) begin
        vga_hs      <= hsync_n;
        vga_vs      <= vsync_n;
        vga_blank_n <= active;
        if (!active) begin
          {vga_r, vga_g, vga_b} <= '0;
        end else if (on_marker) begin
          vga_r <= 10'h3FF;
          vga_g <= '0;
          vga_b <= '0;
        end else if (in_agg) begin
          vga_r <= gray10(agg_rdata);
          vga_g <= gray10(agg_rdata);
          vga_b <= gray10(agg_rdata);
        end else if (in_inset) begin
          vga_r <= gray10(ins_rdata);
          vga_g <= gray10(ins_rdata);
          vga_b <= gray10(ins_rdata);
        end else begin
          {vga_r, vga_g, vga_b} <= '0;
        end
      end
    end

  assign vga_sync_n = 1'b0;   // no sync-on-green

endmodule
