// aggregator_tb: self-checking test of the aggregation engine.
// A queue model in the testbench serves samples (registered pixel read,
// head header, empty, pop). Every write into the aggregate and inset is
// captured into testbench images, which are compared after each sample
// with a reference built independently: the position is accumulated and
// clamped, and sample pixel (column c from the left, row r from the top)
// is placed at (x-8+c, y-8+r). Checks the clear after reset and on
// entering Reset (16384 clocks), clipping at the image edge, the clamp,
// and the 256-pixel copy time.
`timescale 1ns/1ps
module aggregator_tb;
  import oms_pkg::*;

  logic        clk = 0, rst_n = 0;
  mode_t       mode = MODE_IDLE;
  logic        q_empty;
  motion_t     q_head_hdr;
  logic [7:0]  q_rd_addr;
  logic [5:0]  q_rd_data;
  logic        q_pop;
  logic        agg_we, ins_we;
  logic [13:0] agg_waddr;
  logic [7:0]  ins_waddr;
  logic [5:0]  agg_wdata, ins_wdata;
  logic [6:0]  pos_x, pos_y;
  logic        clearing;
  logic [15:0] samples, clipped;
  int          checks = 0, failures = 0;

  aggregator dut (.*);

  always #10 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // queue model
  typedef struct { int dx; int dy; logic [5:0] px[256]; } sample_t;
  sample_t q[$];
  assign q_empty = (q.size() == 0);
  always_comb begin
    q_head_hdr = '0;
    if (q.size() > 0) begin
      q_head_hdr.dx = 8'(q[0].dx);
      q_head_hdr.dy = 8'(q[0].dy);
    end
  end
  always @(posedge clk) begin
    if (q.size() > 0) q_rd_data <= q[0].px[q_rd_addr];
    if (q_pop && q.size() > 0) void'(q.pop_front());
  end

  // captured images
  logic [5:0] agg [16384];
  logic [5:0] ins [256];
  int         agg_writes = 0, clear_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (agg_we) begin agg[agg_waddr] <= agg_wdata; agg_writes++; end
    if (ins_we) ins[ins_waddr] <= ins_wdata;
    if (clearing) clear_cycles++;
  end

  // reference
  logic [5:0] ref_agg [16384];
  logic [5:0] ref_ins [256];
  int         rx = 64, ry = 64, ref_clipped = 0;

  function automatic int clampi(input int v);
    return (v < 0) ? 0 : (v > 127) ? 127 : v;
  endfunction

  task automatic ref_place(input sample_t s);
    rx = clampi(rx + s.dx);
    ry = clampi(ry - s.dy);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        int a, x, y;
        a = ((15 - c) << 4) | (15 - r);   // address map: from bottom-right, upwards
        x = rx - 8 + c;
        y = ry - 8 + r;
        ref_ins[r * 16 + c] = s.px[a];
        if (x >= 0 && x < 128 && y >= 0 && y < 128) ref_agg[y * 128 + x] = s.px[a];
        else ref_clipped++;
      end
  endtask

  task automatic ref_clear();
    foreach (ref_agg[i]) ref_agg[i] = 0;
    foreach (ref_ins[i]) ref_ins[i] = 0;
    rx = 64; ry = 64;
  endtask

  task automatic compare(input string what);
    int bad_a, bad_i;
    bad_a = 0; bad_i = 0;
    foreach (ref_agg[i]) if (agg[i] !== ref_agg[i]) bad_a++;
    foreach (ref_ins[i]) if (ins[i] !== ref_ins[i]) bad_i++;
    checks++;
    if (bad_a != 0 || bad_i != 0 || pos_x != 7'(rx) || pos_y != 7'(ry)) begin
      failures++;
      $display("FAIL: %s: %0d aggregate and %0d inset pixels differ, pos (%0d,%0d) expected (%0d,%0d)",
               what, bad_a, bad_i, pos_x, pos_y, rx, ry);
    end
  endtask

  int seed = 1;
  task automatic send(input int dx, input int dy);
    sample_t s;
    int t;
    s.dx = dx; s.dy = dy;
    for (int a = 0; a < 256; a++) s.px[a] = 6'($urandom);
    ref_place(s);
    @(negedge clk);
    q.push_back(s);
    t = 0;
    while (q.size() > 0 && t < 10000) begin @(negedge clk); t++; end
    checks++;
    if (t > 256 + 4) begin failures++; $display("FAIL: sample took %0d clocks", t); end
    repeat (3) @(negedge clk);
    compare($sformatf("sample (%0d,%0d)", dx, dy));
  endtask

  initial begin
    foreach (agg[i]) agg[i] = 6'h3F;
    foreach (ins[i]) ins[i] = 6'h3F;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ref_clear();
    while (!clearing) @(negedge clk);
    while (clearing) @(negedge clk);
    checks++;
    if (clear_cycles != 16384 || agg_writes != 16384) begin
      failures++; $display("FAIL: clear took %0d clocks, %0d writes", clear_cycles, agg_writes);
    end
    compare("after reset");
    send(0, 0);
    send(5, -3);
    send(-20, 17);
    mode = MODE_SCAN;
    send(30, 30);
    send(100, 0);      // clamped at the right edge, clipped
    send(-60, -100);   // clamped at the bottom
    send(-128, 127);   // to the top-left corner
    checks++;
    if (int'(clipped) != ref_clipped || ref_clipped == 0) begin
      failures++; $display("FAIL: clipped %0d expected %0d", clipped, ref_clipped);
    end
    // Reset clears and recentres
    clear_cycles = 0;
    @(negedge clk) mode = MODE_RESET;
    ref_clear();
    repeat (20000) @(negedge clk);
    checks++;
    if (clear_cycles != 16384) begin failures++; $display("FAIL: reset clear %0d clocks", clear_cycles); end
    compare("after Reset mode");
    mode = MODE_IDLE;
    for (int i = 0; i < 30; i++) send(int'($urandom_range(0, 40)) - 20, int'($urandom_range(0, 40)) - 20);
    checks++;
    if (samples != 16'(37)) begin failures++; $display("FAIL: sample count %0d", samples); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
