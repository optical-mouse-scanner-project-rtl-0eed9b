// click_fsm_tb: self-checking test of the button mode FSM.
// Drives every [right,left] combination from every state and then a
// random button sequence, and checks that the mode one clock later is
// Reset when right is pressed, else Scan when left is pressed, else Idle.
`timescale 1ns/1ps
module click_fsm_tb;
  import oms_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  left_n = 1, right_n = 1;
  mode_t mode;
  int    checks = 0, failures = 0;
  int    seen_idle = 0, seen_scan = 0, seen_reset = 0;

  click_fsm dut (.clk, .rst_n, .left_n, .right_n, .mode);

  always #10 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mode_t expected(input logic l_n, input logic r_n);
    if (!r_n) return MODE_RESET;
    if (!l_n) return MODE_SCAN;
    return MODE_IDLE;
  endfunction

  task automatic step(input logic l_n, input logic r_n);
    @(negedge clk);
    left_n  = l_n;
    right_n = r_n;
    @(posedge clk);
    #1;
    checks++;
    if (mode !== expected(l_n, r_n)) begin
      failures++;
      $display("FAIL: buttons l_n=%b r_n=%b mode=%s", l_n, r_n, mode.name());
    end
    case (mode)
      MODE_IDLE:  seen_idle++;
      MODE_SCAN:  seen_scan++;
      MODE_RESET: seen_reset++;
      default: ;
    endcase
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (mode !== MODE_IDLE) begin failures++; $display("FAIL: mode in reset"); end
    rst_n = 1;
    // every transition: from each state, each input
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < 4; i++) begin
        case (s)
          0: step(1, 1);
          1: step(0, 1);
          2: step(1, 0);
          default: ;
        endcase
        step(i[0], i[1]);
      end
    repeat (300) step(1'($urandom), 1'($urandom));
    checks++;
    if (seen_idle == 0 || seen_scan == 0 || seen_reset == 0) begin
      failures++;
      $display("FAIL: a mode was never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
