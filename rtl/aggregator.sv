// aggregator: builds the aggregate scan from the queued image samples.
//
// For each sample at the head of the queue it (1) adds the sample's
// Delta_X/Delta_Y to the running mouse position, (2) copies the 256
// pixels into the AGG_DIM x AGG_DIM aggregate image so that the sample is
// centred on that position, and into the 16x16 inset image, then (3) pops
// the sample. Pixels that fall outside the aggregate are dropped.
//
// Geometry. Sample address a (0x00..0xFF) counts from the bottom-right
// pixel upwards, column by column: a[3:0] is the row from the bottom and
// a[7:4] the column from the right. With row r = 15 - a[3:0] from the top
// and column c = 15 - a[7:4] from the left, the pixel goes to aggregate
// (x, y) = (pos_x - 8 + c, pos_y - 8 + r), and to inset word r*16 + c.
// One motion count moves the position by one aggregate pixel; +X is to
// the right and +Y is up (screen y decreases). The position starts at the
// centre and is clamped to 0 .. AGG_DIM-1.
//
// Mode Reset: on entering it, the position returns to the centre and both
// images are cleared to 0 (one word per clock, AGG_DIM*AGG_DIM clocks); a
// copy in progress is abandoned (the queue is flushed by the top). The
// same clear runs after rst_n. Idle and Scan both drain the queue.
//
// Timing: one pixel per clock, a sample takes 256 + 3 clocks. Queue read
// data arrives one clock after the address. Write ports are
// combinational strobes into the frame buffers.
// The pixel address map, centring each sample on its position and the
// clearing on Reset follow the scanner description; the document runs this
// loop as software on a processor, here it is a hardware engine. The
// count-to-pixel scale, axis signs, start position and clamping are this
// design's choices.
module aggregator
  import oms_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  mode_t            mode,
  // sample queue, read side
  input  logic             q_empty,
  input  motion_t          q_head_hdr,
  output logic [7:0]       q_rd_addr,
  input  logic [PIX_W-1:0] q_rd_data,
  output logic             q_pop,
  // aggregate image write port
  output logic             agg_we,
  output logic [AGG_AW-1:0] agg_waddr,
  output logic [PIX_W-1:0] agg_wdata,
  // inset image write port
  output logic             ins_we,
  output logic [7:0]       ins_waddr,
  output logic [PIX_W-1:0] ins_wdata,
  // status
  output logic [6:0]       pos_x,
  output logic [6:0]       pos_y,
  output logic             clearing,
  output logic [15:0]      samples,   // samples placed since reset
  output logic [15:0]      clipped    // pixels dropped off the edge
);

  localparam logic [6:0] CENTER = 7'(AGG_DIM / 2);

  typedef enum logic [1:0] {A_CLEAR, A_IDLE, A_COPY} astate_t;

  astate_t           state;
  logic [AGG_AW-1:0] clr_addr;
  logic              cleared;
  logic [7:0]        rd_addr;
  logic              issued_all;
  logic              p1_valid;
  logic [7:0]        p1_addr;

  assign clearing  = (state == A_CLEAR);
  assign q_rd_addr = rd_addr;

  // position update, clamped
  function automatic logic [6:0] clamp(input logic signed [9:0] v);
    if (v < 0)                        return 7'd0;
    else if (v > 10'sd127)            return 7'd127;
    else                              return v[6:0];
  endfunction

  logic signed [9:0] nx, ny;
  assign nx = $signed({3'b000, pos_x}) + 10'(q_head_hdr.dx);
  assign ny = $signed({3'b000, pos_y}) - 10'(q_head_hdr.dy);

  // placement of the pixel read last clock
  logic [3:0]        col, row;
  logic signed [9:0] ax, ay;
  logic              in_range;
  assign col = ~p1_addr[7:4];
  assign row = ~p1_addr[3:0];
  assign ax  = $signed({3'b000, pos_x}) - 10'sd8 + $signed({6'b0, col});
  assign ay  = $signed({3'b000, pos_y}) - 10'sd8 + $signed({6'b0, row});
  assign in_range = (ax >= 0) && (ax < 10'(AGG_DIM)) && (ay >= 0) && (ay < 10'(AGG_DIM));

  logic copy_wr;
  assign copy_wr = (state == A_COPY) && p1_valid && (mode != MODE_RESET);

  always_comb begin
    if (state == A_CLEAR) begin
      agg_we    = 1'b1;
      agg_waddr = clr_addr;
      agg_wdata = '0;
      ins_we    = (clr_addr < AGG_AW'(SAMPLE_PIX));
      ins_waddr = clr_addr[7:0];
      ins_wdata = '0;
    end else begin
      agg_we    = copy_wr && in_range;
      agg_waddr = {ay[6:0], ax[6:0]};
      agg_wdata = q_rd_data;
      ins_we    = copy_wr;
      ins_waddr = {row, col};
      ins_wdata = q_rd_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= A_CLEAR;
      clr_addr   <= '0;
      cleared    <= 1'b0;
      rd_addr    <= '0;
      issued_all <= 1'b0;
      p1_valid   <= 1'b0;
      p1_addr    <= '0;
      q_pop      <= 1'b0;
      pos_x      <= CENTER;
      pos_y      <= CENTER;
      samples    <= '0;
      clipped    <= '0;
    end else begin
      q_pop <= 1'b0;
      unique case (state)
        A_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == '1) begin
            cleared <= 1'b1;
            state   <= A_IDLE;
          end
        end
        A_IDLE: begin
          if (mode == MODE_RESET) begin
            if (!cleared) begin
              pos_x    <= CENTER;
              pos_y    <= CENTER;
              clr_addr <= '0;
              state    <= A_CLEAR;
            end
          end else begin
            cleared <= 1'b0;
            // q_pop from the last copy is still in flight for one clock
            if (!q_empty && !q_pop) begin
              pos_x      <= clamp(nx);
              pos_y      <= clamp(ny);
              rd_addr    <= 8'h00;
              issued_all <= 1'b0;
              p1_valid   <= 1'b0;
              state      <= A_COPY;
            end
          end
        end
        A_COPY: begin
          if (mode == MODE_RESET) begin
            p1_valid <= 1'b0;
            state    <= A_IDLE;
          end else begin
            p1_valid <= !issued_all;
            p1_addr  <= rd_addr;
            if (!issued_all) begin
              rd_addr <= rd_addr + 1'b1;
              if (rd_addr == 8'hFF) issued_all <= 1'b1;
            end
            if (p1_valid && !in_range) clipped <= clipped + 1'b1;
            if (p1_valid && p1_addr == 8'hFF) begin
              q_pop    <= 1'b1;
              samples  <= samples + 1'b1;
              p1_valid <= 1'b0;
              state    <= A_IDLE;
            end
          end
        end
        default: state <= A_IDLE;
      endcase
    end

endmodule
