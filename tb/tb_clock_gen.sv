// Self-checking testbench for clock_gen: with a 44 MHz crystal clock the
// system clock period must be 16 crystal periods (2.75 MHz) or 32 (1.375 MHz)
// with FreqDivCtrl set, and with IntXOorExtClk = 0 the LO and the system clock
// must follow the external clock instead.
`timescale 1ns/1ps
module tb_clock_gen;
  logic xtal_clk = 0, ext_clk = 0, int_xo_sel = 1, div32 = 0, rst = 1;
  logic lo_clk, sys_clk;
  int checks = 0, failures = 0;
  int n_xtal = 0, n_ext = 0;

  clock_gen dut (.*);
  always #11.364 xtal_clk = ~xtal_clk;   // 44 MHz
  always #50     ext_clk  = ~ext_clk;    // 10 MHz external clock
  always @(posedge xtal_clk) n_xtal++;
  always @(posedge ext_clk)  n_ext++;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure the number of source clock edges between sys_clk rising edges
  task automatic measure(input bit use_ext, input int exp_ratio);
    int a, b;
    repeat (2) @(posedge sys_clk);
    for (int k = 0; k < 20; k++) begin
      a = use_ext ? n_ext : n_xtal;
      @(posedge sys_clk);
      b = use_ext ? n_ext : n_xtal;
      checks++;
      if (b - a != exp_ratio) begin
        failures++; $display("ratio %0d exp %0d (ext=%0b)", b - a, exp_ratio, use_ext);
      end
    end
  endtask

  initial begin
    #100 rst = 0;
    measure(0, 16);
    // 2.75 MHz: period 16 x 22.727 ns = 363.6 ns
    begin
      realtime t0, t1;
      @(posedge sys_clk) t0 = $realtime;
      @(posedge sys_clk) t1 = $realtime;
      checks++;
      if (t1 - t0 < 362.0 || t1 - t0 > 365.0) begin failures++; $display("period %f", t1 - t0); end
    end
    div32 = 1;
    measure(0, 32);
    int_xo_sel = 0;
    measure(1, 32);
    div32 = 0;
    measure(1, 16);
    // lo_clk follows the selected source
    for (int k = 0; k < 50; k++) begin
      #7.3;
      checks++;
      if (lo_clk !== ext_clk) failures++;
    end
    int_xo_sel = 1;
    for (int k = 0; k < 50; k++) begin
      #7.3;
      checks++;
      if (lo_clk !== xtal_clk) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
