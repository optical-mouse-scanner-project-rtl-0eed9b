// gpio_tb: self-checking test of the mouse pin interface.
// Drives random pin inputs and core outputs and checks that L, R and SDIO
// reach the core exactly two clocks later, that SCLK and SDIO drive reach
// the pins one clock later, and that PD stays high.
`timescale 1ns/1ps
module gpio_tb;
  logic clk = 0, rst_n = 0;
  logic pin_pd, pin_sclk, pin_sdio_o, pin_sdio_oe;
  logic pin_sdio_i = 1, pin_l_n = 1, pin_r_n = 1;
  logic sclk = 1, sdio_o = 0, sdio_oe = 0;
  logic sdio_i, left_n, right_n;
  int   checks = 0, failures = 0;
  logic [2:0] in_hist [3];   // {l, r, sdio} at the last three edges
  logic [2:0] out_hist [2];

  gpio dut (.*);

  always #10 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!(left_n && right_n && sdio_i && pin_sclk && !pin_sdio_oe)) begin
      failures++; $display("FAIL: reset values");
    end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      {pin_l_n, pin_r_n, pin_sdio_i} = 3'($urandom);
      {sclk, sdio_o, sdio_oe}        = 3'($urandom);
      in_hist[2] = in_hist[1];
      in_hist[1] = in_hist[0];
      in_hist[0] = {pin_l_n, pin_r_n, pin_sdio_i};
      out_hist[1] = out_hist[0];
      out_hist[0] = {sclk, sdio_o, sdio_oe};
      @(posedge clk);
      #1;
      if (i >= 2) begin
        checks++;
        // in_hist[0] was sampled at this edge; two edges ago -> in_hist[1]
        if ({left_n, right_n, sdio_i} !== in_hist[1]) begin
          failures++;
          $display("FAIL: input latency at %0d", i);
        end
        checks++;
        if ({pin_sclk, pin_sdio_o, pin_sdio_oe} !== out_hist[0]) begin
          failures++;
          $display("FAIL: output latency at %0d", i);
        end
      end
      checks++;
      if (pin_pd !== 1'b1) begin failures++; $display("FAIL: PD low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
