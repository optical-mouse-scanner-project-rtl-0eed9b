// sample_queue: pixel sample buffer between the polling FSM and the
// aggregator.
//
// Holds up to DEPTH image samples of SAMPLE_PIX pixels (PIX_W bits each),
// each with the Delta_X/Delta_Y read with it. Samples leave in the order
// they arrived: the producer builds the sample in the tail slot (random
// pixel writes by address) and then pushes it with its motion header; the
// consumer reads pixels of the head slot by address and pops it when done.
// The pixel store is one memory of DEPTH*SAMPLE_PIX words, addressed
// slot*SAMPLE_PIX + pixel, with a registered (one-clock) read.
//
// Interface: wr_en/wr_addr/wr_data write into the tail slot (allowed while
// not full); push commits it. rd_addr -> rd_data one clock later from the
// head slot; head_hdr is the head sample's motion; pop frees the head.
// flush empties the queue in one clock. full, empty and count are
// registered state.
// The five-sample depth, 6-bit pixels and 256-pixel samples are the
// scanner's own numbers. First-in first-out order follows the description
// of pieces added on top and taken from the bottom (the text also calls
// the structure a stack; the FIFO reading is used). The slot layout and
// the flush are this design's choices.
module sample_queue
  import oms_pkg::*;
#(
  parameter int unsigned DEPTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  // producer
  input  logic             wr_en,
  input  logic [7:0]       wr_addr,
  input  logic [PIX_W-1:0] wr_data,
  input  logic             push,
  input  motion_t          push_hdr,
  output logic             full,
  // consumer
  input  logic [7:0]       rd_addr,
  output logic [PIX_W-1:0] rd_data,
  output motion_t          head_hdr,
  input  logic             pop,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned SW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned MW = $clog2(DEPTH * SAMPLE_PIX);

  logic [PIX_W-1:0] mem [DEPTH*SAMPLE_PIX];
  motion_t          hdr [DEPTH];
  logic [SW-1:0]    head, tail;

  function automatic logic [SW-1:0] nxt(input logic [SW-1:0] p);
    return (p == SW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full  = (count == ($bits(count))'(DEPTH));
  assign empty = (count == '0);
  assign head_hdr = hdr[head];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (wr_en && !full)
      mem[MW'(tail) * MW'(SAMPLE_PIX) + MW'(wr_addr)] <= wr_data;
    rd_data <= mem[MW'(head) * MW'(SAMPLE_PIX) + MW'(rd_addr)];
    if (do_push)
      hdr[tail] <= push_hdr;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else if (flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_push) tail <= nxt(tail);
      if (do_pop)  head <= nxt(head);
      count <= count + ($bits(count))'(do_push) - ($bits(count))'(do_pop);
    end

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("sample_queue: push while full");
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("sample_queue: pop while empty");

endmodule
