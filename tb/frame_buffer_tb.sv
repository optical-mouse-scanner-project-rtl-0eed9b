// frame_buffer_tb: self-checking test of the dual-port image memory at
// its default 128x128 size. Fills every word with a known pattern, reads
// all back with the one-clock read latency, and checks that a read of the
// word being written returns the old value.
`timescale 1ns/1ps
module frame_buffer_tb;
  localparam int DEPTH = 16384;
  localparam int AW = 14;
  logic          clk = 0;
  logic          we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [5:0]    wdata = 0, rdata;
  int            checks = 0, failures = 0;

  frame_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #10 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0] pat(input int a, input int k);
    return 6'((a * 7 + (a >> 6) + k * 13) & 63);
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = pat(a, 0);
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== pat(a, 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: word %0d = %0d", a, rdata);
      end
    end
    // read during write of the same word: old data, new data next time
    for (int i = 0; i < 200; i++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = pat(a, 1); raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== pat(a, 0)) begin failures++; $display("FAIL: read-during-write %0d", a); end
      @(negedge clk);
      we = 0;
      @(posedge clk); #1;
      checks++;
      if (rdata !== pat(a, 1)) begin failures++; $display("FAIL: rewrite %0d", a); end
      @(negedge clk);
      we = 1; wdata = pat(a, 0);
      @(negedge clk);
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
