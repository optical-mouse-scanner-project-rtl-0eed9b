// omscan_top: optical mouse scanner.
//
// An ADNS-2051 mouse sensor is read over its serial port (SCLK, SDIO) and
// every time the mouse has moved, its 16x16 image and the X/Y motion are
// captured as one sample. Samples wait in a five-deep queue; an
// aggregation engine pastes each one into a 128x128 aggregate image at the
// accumulated mouse position and keeps the latest one as the inset. A VGA
// raster controller shows the inset (scaled to 64x64), the aggregate and
// a marker at the mouse position on a 640x480 screen. The left mouse
// button (held) scans, the right button clears the scan.
//
//   mouse pins <-> gpio <-> adns_serial <-> polling_fsm -> sample_queue
//   gpio -> click_fsm -> mode            sample_queue -> aggregator
//   aggregator -> frame_buffer (aggregate, inset) -> vga_raster -> VGA DAC
//
// Everything runs on one clock, clk (50 MHz at the default parameters);
// the serial clock and the VGA pixel clock are derived by clock enables.
// Reset (rst_n) is asynchronous, active low. After reset the sensor is
// configured and both images are cleared (16384 clocks).
// The status outputs (mode, position, queue level, sample counts, last
// Motion register value) are what a host processor would read; no
// processor is part of this design.
// The block structure follows the scanner's system architecture; putting
// the aggregation in hardware instead of software, and keeping all image
// memory on chip instead of in the external SRAM, are this design's
// choices.
module omscan_top
  import oms_pkg::*;
#(
  parameter int unsigned SCLK_HALF   = 6,
  parameter int unsigned T_SRAD      = 5000,
  parameter int unsigned T_WGAP      = 5000,
  parameter int unsigned T_RGAP      = 13,
  parameter int unsigned QUEUE_DEPTH = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // mouse
  output logic        mouse_pd,
  output logic        mouse_sclk,
  output logic        mouse_sdio_o,
  output logic        mouse_sdio_oe,
  input  logic        mouse_sdio_i,
  input  logic        mouse_l_n,
  input  logic        mouse_r_n,
  // VGA
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  // status
  output mode_t       mode,
  output logic [6:0]  pos_x,
  output logic [6:0]  pos_y,
  output logic [$clog2(QUEUE_DEPTH+1)-1:0] queue_count,
  output logic        queue_stall,
  output logic [15:0] samples_captured,
  output logic [15:0] samples_placed,
  output logic [7:0]  motion_status,
  output logic        clearing,
  output logic        serial_busy,
  output logic [15:0] clipped_pixels,
  output logic        frame_start
);

  // gpio <-> core
  logic sclk, sdio_o, sdio_oe, sdio_i, left_n, right_n;

  gpio u_gpio (
    .clk, .rst_n,
    .pin_pd(mouse_pd), .pin_sclk(mouse_sclk), .pin_sdio_o(mouse_sdio_o),
    .pin_sdio_oe(mouse_sdio_oe), .pin_sdio_i(mouse_sdio_i),
    .pin_l_n(mouse_l_n), .pin_r_n(mouse_r_n),
    .sclk, .sdio_o, .sdio_oe, .sdio_i, .left_n, .right_n
  );

  click_fsm u_click (.clk, .rst_n, .left_n, .right_n, .mode);

  // serial port
  logic       spi_req, spi_we, spi_done;
  logic [6:0] spi_addr;
  logic [7:0] spi_wdata, spi_rdata;

  adns_serial #(
    .SCLK_HALF(SCLK_HALF), .T_SRAD(T_SRAD), .T_WGAP(T_WGAP), .T_RGAP(T_RGAP)
  ) u_serial (
    .clk, .rst_n,
    .req(spi_req), .we(spi_we), .addr(spi_addr), .wdata(spi_wdata),
    .busy(serial_busy), .done(spi_done), .rdata(spi_rdata),
    .sclk, .sdio_o, .sdio_oe, .sdio_i
  );

  // polling FSM -> queue
  logic             q_full, q_wr_en, q_push, q_empty, q_pop;
  logic [7:0]       q_wr_addr, q_rd_addr;
  logic [PIX_W-1:0] q_wr_data, q_rd_data;
  motion_t          q_push_hdr, q_head_hdr;

  polling_fsm u_psm (
    .clk, .rst_n, .mode,
    .spi_req, .spi_we, .spi_addr, .spi_wdata, .spi_done, .spi_rdata,
    .q_full, .q_wr_en, .q_wr_addr, .q_wr_data, .q_push, .q_push_hdr,
    .stall(queue_stall), .motion_status, .samples(samples_captured)
  );

  sample_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
    .clk, .rst_n, .flush(mode == MODE_RESET),
    .wr_en(q_wr_en), .wr_addr(q_wr_addr), .wr_data(q_wr_data),
    .push(q_push), .push_hdr(q_push_hdr), .full(q_full),
    .rd_addr(q_rd_addr), .rd_data(q_rd_data), .head_hdr(q_head_hdr),
    .pop(q_pop), .empty(q_empty), .count(queue_count)
  );

  // aggregation
  logic              agg_we, ins_we;
  logic [AGG_AW-1:0] agg_waddr, agg_raddr;
  logic [7:0]        ins_waddr, ins_raddr;
  logic [PIX_W-1:0]  agg_wdata, ins_wdata, agg_rdata, ins_rdata;

  aggregator u_agg (
    .clk, .rst_n, .mode,
    .q_empty, .q_head_hdr, .q_rd_addr, .q_rd_data, .q_pop,
    .agg_we, .agg_waddr, .agg_wdata,
    .ins_we, .ins_waddr, .ins_wdata,
    .pos_x, .pos_y, .clearing, .samples(samples_placed), .clipped(clipped_pixels)
  );

  frame_buffer #(.DEPTH(AGG_DIM * AGG_DIM), .DATA_W(PIX_W)) u_agg_mem (
    .clk, .we(agg_we), .waddr(agg_waddr), .wdata(agg_wdata),
    .raddr(agg_raddr), .rdata(agg_rdata)
  );

  frame_buffer #(.DEPTH(SAMPLE_PIX), .DATA_W(PIX_W)) u_ins_mem (
    .clk, .we(ins_we), .waddr(ins_waddr), .wdata(ins_wdata),
    .raddr(ins_raddr), .rdata(ins_rdata)
  );

  // display

  vga_raster u_vga (
    .clk, .rst_n, .pos_x, .pos_y,
    .ins_raddr, .ins_rdata, .agg_raddr, .agg_rdata,
    .vga_clk, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n,
    .vga_r, .vga_g, .vga_b, .frame_start
  );

endmodule
