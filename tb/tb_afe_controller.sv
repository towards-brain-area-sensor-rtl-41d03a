// Self-checking testbench for afe_controller with sar_logic and an ideal
// analog model (4-to-1 multiplexer, sample-and-hold, comparator). Each
// channel gets a different random level; checked: the buffered samples match
// their channels, the multiplexer select matches the channel while the DAC
// samples, samples_valid comes 41 cycles after start (four 10-cycle
// conversions), and a start while busy is ignored.
`timescale 1ns/1ps
module tb_afe_controller;
  logic clk = 0, rst = 1, start = 0;
  logic [1:0] mux_sel;
  logic sar_start, sar_done, sample, cmp;
  logic [7:0] sar_data, dac_code, held;
  logic [31:0] samples;
  logic samples_valid;
  logic [7:0] vin [4];
  int checks = 0, failures = 0;
  int sampled_ch [$];

  afe_controller #(.N_CH(4), .BITS(8)) dut (.*);
  sar_logic #(.BITS(8)) u_sar (.clk, .rst, .start(sar_start), .cmp, .sample,
                               .dac_code, .data(sar_data), .done(sar_done));
  always #5 clk = ~clk;

  always @(posedge clk) if (sample) begin
    held <= vin[mux_sel];
    sampled_ch.push_back(int'(mux_sel));
  end
  assign cmp = (held >= dac_code);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    held = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 100; t++) begin
      int lat = 0;
      foreach (vin[c]) vin[c] = 8'($urandom);
      sampled_ch.delete();
      @(negedge clk) start = 1;
      @(negedge clk) start = 0; lat = 1;
      while (!samples_valid && lat < 100) begin
        if (lat == 15) start = 1;               // ignored: conversion in progress
        else start = 0;
        @(negedge clk); lat++;
      end
      start = 0;
      checks += 3;
      if (lat != 41) begin failures++; $display("latency %0d", lat); end
      if (samples !== {vin[0], vin[1], vin[2], vin[3]}) begin
        failures++; $display("samples %h exp %h%h%h%h", samples, vin[0], vin[1], vin[2], vin[3]);
      end
      if (sampled_ch.size() != 4 || sampled_ch[0] != 0 || sampled_ch[1] != 1 ||
          sampled_ch[2] != 2 || sampled_ch[3] != 3) begin
        failures++; $display("channel order wrong");
      end
      repeat ($urandom_range(1, 5)) @(negedge clk);
      checks++;
      if (sar_start) failures++;      // idle until the next frame
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
