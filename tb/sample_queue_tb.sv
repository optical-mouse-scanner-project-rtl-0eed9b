// sample_queue_tb: self-checking test of the five-deep sample queue.
// Fills it with five distinct samples and checks full; drains two and
// checks first-in first-out order of headers and every pixel; refills,
// interleaves, then checks flush. A reference queue of sample ids in the
// testbench predicts the head at every step.
`timescale 1ns/1ps
module sample_queue_tb;
  import oms_pkg::*;

  logic       clk = 0, rst_n = 0, flush = 0;
  logic       wr_en = 0, push = 0, pop = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  logic [5:0] wr_data = 0, rd_data;
  motion_t    push_hdr = '0, head_hdr;
  logic       full, empty;
  logic [2:0] count;
  int         checks = 0, failures = 0;
  int         ref_q[$];
  int         next_id = 0;
  int         fulls = 0;

  sample_queue dut (.*);

  always #10 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0] pix(input int id, input int a);
    return 6'((a * 3 + id * 17 + (a >> 5)) & 63);
  endfunction

  task automatic produce();
    int id;
    id = next_id++;
    for (int a = 255; a >= 0; a--) begin   // any order: written by address
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(a); wr_data = pix(id, a);
    end
    @(negedge clk);
    wr_en = 0;
    push = 1; push_hdr.dx = 8'(id); push_hdr.dy = 8'(-id);
    @(negedge clk);
    push = 0;
    ref_q.push_back(id);
  endtask

  task automatic consume();
    int id;
    id = ref_q.pop_front();
    checks++;
    if (head_hdr.dx !== 8'(id) || head_hdr.dy !== 8'(-id)) begin
      failures++; $display("FAIL: header of sample %0d", id);
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      rd_addr = 8'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== pix(id, a)) begin
        failures++;
        if (failures < 10) $display("FAIL: sample %0d pixel %0d", id, a);
      end
    end
    @(negedge clk);
    pop = 1;
    @(negedge clk);
    pop = 0;
  endtask

  task automatic check_level();
    checks++;
    if (count != 3'(ref_q.size()) || full != (ref_q.size() == 5) || empty != (ref_q.size() == 0)) begin
      failures++;
      $display("FAIL: count=%0d full=%b empty=%b, expected %0d", count, full, empty, ref_q.size());
    end
    if (full) fulls++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check_level();
    for (int i = 0; i < 5; i++) begin produce(); check_level(); end
    consume(); check_level();
    consume(); check_level();
    for (int i = 0; i < 2; i++) begin produce(); check_level(); end
    for (int i = 0; i < 12; i++) begin
      consume(); check_level();
      produce(); check_level();
    end
    while (ref_q.size() > 0) begin consume(); check_level(); end
    produce(); produce(); check_level();
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    ref_q.delete();
    check_level();
    produce(); check_level(); consume(); check_level();
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
