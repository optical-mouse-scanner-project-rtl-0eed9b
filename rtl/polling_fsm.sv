// polling_fsm: the polling state machine (PSM) that turns sensor register
// reads into image samples.
//
// After reset it writes Configuration_bits with Sleep = 1 (sensor always
// awake). Its main loop, run only while the mode is Scan and the sample
// queue has a free slot, is:
//   1. read Motion; if MOT = 0, poll again;
//   2. read Delta_X, then Delta_Y (two's complement counts);
//   3. write Configuration_bits with PixDump = 1 to start a pixel dump;
//   4. read Data_Out_Lower 256 times with a valid MSB (= 0); a read with
//      MSB = 1 is not ready and is repeated. Pixel value n (bits 5:0) is
//      written to address n of the sample being built, n = 0x00 .. 0xFF;
//   5. write Configuration_bits with PixDump = 0, push the finished sample
//      (pixels plus Delta_X/Delta_Y) into the queue and poll again.
// A full queue stalls the loop before step 1; the sensor keeps
// accumulating motion meanwhile, so none is lost. If the mode goes to
// Reset while a sample is being built, the sensor sequence is still run to
// its end (so PixDump is cleared) but the sample is dropped.
//
// Interface: one serial request at a time to adns_serial (spi_req pulse,
// wait for spi_done). Pixel writes are single-cycle q_wr_en strobes;
// q_push pulses once per finished sample together with q_push_hdr.
// Timing: a sample costs 3 reads + 2 writes + at least 256 reads on the
// serial port, each read about 16 SCLK periods plus the 100 us address-to-
// data wait, so about 27 ms per sample at the default sizes.
// The loop, the register names, bits and addresses follow the scanner's
// acquisition algorithm and register descriptions; keeping Sleep = 1 in
// the PixDump writes, the stall point and the drop-on-reset rule are this
// design's choices.
module polling_fsm
  import oms_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_t       mode,
  // serial port master
  output logic        spi_req,
  output logic        spi_we,
  output logic [6:0]  spi_addr,
  output logic [7:0]  spi_wdata,
  input  logic        spi_done,
  input  logic [7:0]  spi_rdata,
  // sample queue, write side
  input  logic        q_full,
  output logic        q_wr_en,
  output logic [7:0]  q_wr_addr,
  output logic [PIX_W-1:0] q_wr_data,
  output logic        q_push,
  output motion_t     q_push_hdr,
  // status
  output logic        stall,         // waiting for a free queue slot
  output logic [7:0]  motion_status, // last Motion register value read
  output logic [15:0] samples        // samples pushed since reset
);

  typedef enum logic [3:0] {
    P_START, P_INIT_CFG, P_POLL, P_MOT, P_DX, P_DY, P_DUMP_ON, P_PIX, P_DUMP_OFF
  } pstate_t;

  pstate_t    state;
  logic [7:0] pix_addr;
  logic       abort;
  motion_t    hdr;

  assign stall = (state == P_POLL) && (mode == MODE_SCAN) && q_full;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state         <= P_START;
      spi_req       <= 1'b0;
      spi_we        <= 1'b0;
      spi_addr      <= '0;
      spi_wdata     <= '0;
      pix_addr      <= '0;
      abort         <= 1'b0;
      hdr           <= '0;
      q_wr_en       <= 1'b0;
      q_wr_addr     <= '0;
      q_wr_data     <= '0;
      q_push        <= 1'b0;
      q_push_hdr    <= '0;
      motion_status <= '0;
      samples       <= '0;
    end else begin
      spi_req <= 1'b0;
      q_wr_en <= 1'b0;
      q_push  <= 1'b0;
      if (mode == MODE_RESET && state != P_POLL) abort <= 1'b1;

      unique case (state)
        P_START: begin
          spi_req   <= 1'b1;
          spi_we    <= 1'b1;
          spi_addr  <= REG_CONFIG;
          spi_wdata <= CFG_AWAKE;
          state     <= P_INIT_CFG;
        end
        P_INIT_CFG: if (spi_done) state <= P_POLL;
        P_POLL: if (mode == MODE_SCAN && !q_full) begin
          abort    <= 1'b0;
          spi_req  <= 1'b1;
          spi_we   <= 1'b0;
          spi_addr <= REG_MOTION;
          state    <= P_MOT;
        end
        P_MOT: if (spi_done) begin
          motion_status <= spi_rdata;
          if (spi_rdata[MOTION_MOT]) begin
            spi_req  <= 1'b1;
            spi_addr <= REG_DELTA_X;
            state    <= P_DX;
          end else begin
            state <= P_POLL;
          end
        end
        P_DX: if (spi_done) begin
          hdr.dx   <= spi_rdata;
          spi_req  <= 1'b1;
          spi_addr <= REG_DELTA_Y;
          state    <= P_DY;
        end
        P_DY: if (spi_done) begin
          hdr.dy    <= spi_rdata;
          spi_req   <= 1'b1;
          spi_we    <= 1'b1;
          spi_addr  <= REG_CONFIG;
          spi_wdata <= CFG_AWAKE_DUMP;
          state     <= P_DUMP_ON;
        end
        P_DUMP_ON: if (spi_done) begin
          pix_addr <= 8'h00;
          spi_req  <= 1'b1;
          spi_we   <= 1'b0;
          spi_addr <= REG_DATA_OUT_LOWER;
          state    <= P_PIX;
        end
        P_PIX: if (spi_done) begin
          if (spi_rdata[DOL_INVALID]) begin
            spi_req <= 1'b1;                 // not ready: read again
          end else begin
            q_wr_en   <= 1'b1;
            q_wr_addr <= pix_addr;
            q_wr_data <= spi_rdata[PIX_W-1:0];
            if (pix_addr == 8'hFF) begin
              spi_req   <= 1'b1;
              spi_we    <= 1'b1;
              spi_addr  <= REG_CONFIG;
              spi_wdata <= CFG_AWAKE;
              state     <= P_DUMP_OFF;
            end else begin
              pix_addr <= pix_addr + 1'b1;
              spi_req  <= 1'b1;
            end
          end
        end
        P_DUMP_OFF: if (spi_done) begin
          if (!abort && mode != MODE_RESET) begin
            q_push     <= 1'b1;
            q_push_hdr <= hdr;
            samples    <= samples + 1'b1;
          end
          state <= P_POLL;
        end
        default: state <= P_START;
      endcase
    end

endmodule
