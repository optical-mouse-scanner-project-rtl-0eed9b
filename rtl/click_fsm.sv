// click_fsm: operating mode of the scanner, chosen by the mouse buttons.
//
// Three states: Idle, Scan and Reset. The inputs are the left (scan) and
// right (reset) buttons, active low as they come from the mouse, already
// synchronised to clk. Written as [Reset,Scan], the next state is:
//   1X -> Reset (from every state; right click takes precedence)
//   01 -> Scan
//   00 -> Idle
// so the mode follows the buttons with one clock of latency. In Scan the
// polling FSM reads the sensor; in Idle it does not; in Reset the queue is
// flushed and the aggregate image is cleared.
// The three states and their transitions follow the scanner's button state
// diagram. Active-low buttons follow the mouse wiring. The state after
// reset (Idle) and the one-cycle registered decode are this design's
// choices.
module click_fsm
  import oms_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  left_n,   // left button, active low: scan
  input  logic  right_n,  // right button, active low: reset
  output mode_t mode
);

  logic reset_req, scan_req;
  assign reset_req = ~right_n;
  assign scan_req  = ~left_n;

  mode_t next_mode;

  always_comb begin
    next_mode = mode;
    unique case (mode)
      MODE_IDLE:  if (reset_req) next_mode = MODE_RESET;
                  else if (scan_req) next_mode = MODE_SCAN;
      MODE_SCAN:  if (reset_req) next_mode = MODE_RESET;
                  else if (!scan_req) next_mode = MODE_IDLE;
      MODE_RESET: if (!reset_req) next_mode = scan_req ? MODE_SCAN : MODE_IDLE;
      default:    next_mode = MODE_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) mode <= MODE_IDLE;
    else        mode <= next_mode;

endmodule
