// adns_serial: master for the ADNS-2051 synchronous half-duplex serial port.
//
// One transaction reads or writes one 8-bit sensor register. The master
// sends an address byte, MSB first, whose top bit is 1 for a write and 0
// for a read. For a write the data byte follows at once. For a read the
// master releases SDIO, waits T_SRAD clocks for the sensor to fetch the
// register, then clocks the data byte in. SCLK idles high. The master
// changes SDIO after each falling edge, the sensor samples on the rising
// edge. In the read data phase the sensor drives SDIO after each falling
// edge and the master samples just before the rising edge. The master
// lets go of SDIO one clock after its last rising edge, so the sensor
// never sees the bus change at the edge it samples on. After every
// transaction the bus rests for T_WGAP (after a write) or T_RGAP (after a
// read) clocks before done pulses.
//
// Interface: pulse req with we/addr/wdata while busy is low; done pulses
// for one clock when the transaction and its rest time are over, with
// rdata valid from then on. SCLK half period is SCLK_HALF clocks of clk.
// Defaults are for a 50 MHz clk: SCLK_HALF = 6 gives 4.17 MHz, the fastest
// whole divider not above the 4.5 MHz serial clock the scanner runs the
// sensor at. The sdio_i path may lag the pin by up to SCLK_HALF-2 clocks
// (the gpio block adds three).
// The 4.5 MHz clock and the register access follow the scanner design; the
// byte framing and the T_SRAD/T_WGAP/T_RGAP waits (100 us, 100 us, 250 ns)
// come from the sensor's published serial-port timing. The clock-enable
// divider in place of a separate PLL clock is this design's choice.
module adns_serial #(
  parameter int unsigned SCLK_HALF = 6,
  parameter int unsigned T_SRAD    = 5000,
  parameter int unsigned T_WGAP    = 5000,
  parameter int unsigned T_RGAP    = 13
) (
  input  logic       clk,
  input  logic       rst_n,
  // request side
  input  logic       req,
  input  logic       we,
  input  logic [6:0] addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic [7:0] rdata,
  // serial pins (through gpio)
  output logic       sclk,
  output logic       sdio_o,
  output logic       sdio_oe,
  input  logic       sdio_i
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_WDATA, S_SRAD, S_RDATA, S_GAP} state_t;

  localparam int unsigned TW = $clog2((T_SRAD > T_WGAP ? T_SRAD : T_WGAP) + SCLK_HALF + 2);

  state_t        state;
  logic [TW-1:0] timer;
  logic [2:0]    bitcnt;
  logic [7:0]    sh;
  logic [7:0]    wbyte;
  logic          wr;
  logic          tick;

  assign tick = (timer == '0);
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_IDLE;
      timer   <= '0;
      bitcnt  <= '0;
      sh      <= '0;
      wbyte   <= '0;
      wr      <= 1'b0;
      sclk    <= 1'b1;
      sdio_o  <= 1'b0;
      sdio_oe <= 1'b0;
      done    <= 1'b0;
      rdata   <= '0;
    end else begin
      done <= 1'b0;
      if (!tick) timer <= timer - 1'b1;
      unique case (state)
        S_IDLE: if (req) begin
          sh      <= {we, addr};
          wbyte   <= wdata;
          wr      <= we;
          bitcnt  <= '0;
          sdio_oe <= 1'b1;
          timer   <= TW'(SCLK_HALF - 1);
          state   <= S_ADDR;
        end
        S_ADDR, S_WDATA: if (tick) begin
          timer <= TW'(SCLK_HALF - 1);
          if (sclk) begin
            sclk   <= 1'b0;
            sdio_o <= sh[7];
          end else begin
            sclk   <= 1'b1;
            sh     <= {sh[6:0], 1'b0};
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt == 3'd7) begin
              if (state == S_WDATA) begin
                timer   <= TW'(T_WGAP);
                state   <= S_GAP;
              end else if (wr) begin
                sh    <= wbyte;
                state <= S_WDATA;
              end else begin
                timer   <= TW'(T_SRAD);
                state   <= S_SRAD;
              end
            end
          end
        end
        S_SRAD: begin
          sdio_oe <= 1'b0;   // released one clock after the last rising edge
          if (tick) begin
            timer <= TW'(SCLK_HALF - 1);
            state <= S_RDATA;
          end
        end
        S_RDATA: if (tick) begin
          timer <= TW'(SCLK_HALF - 1);
          if (sclk) begin
            sclk <= 1'b0;
          end else begin
            sclk   <= 1'b1;
            sh     <= {sh[6:0], sdio_i};
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt == 3'd7) begin
              rdata <= {sh[6:0], sdio_i};
              timer <= TW'(T_RGAP);
              state <= S_GAP;
            end
          end
        end
        S_GAP: begin
          sdio_oe <= 1'b0;
          if (tick) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

  // A request is only accepted while the port is free.
  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n) req |-> !busy)
    else $error("adns_serial: request while busy");

endmodule
