// Self-checking testbench for the ook_transmitter behavioural model: with a
// 44 MHz LO and TX_IN = 1 the output carries 21 pulses per LO period
// (924 MHz); with TX_IN = 0 it is silent; an OOK bit pattern at 2.75 Mb/s
// produces 16 x 21 = 336 pulses for every '1' bit and none for a '0' bit.
// While the carrier is on, every pulse is also timed: consecutive rising
// edges must be 1/924 MHz = 1.082 ns apart and each pulse must be high for
// one inverter delay of the second ring, 1/(2 x 21 x 44 MHz) = 0.541 ns.
// A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_ook_transmitter;
  logic lo_clk = 0, tx_in = 0, tx_out;
  int checks = 0, failures = 0;
  int npulse = 0;

  ook_transmitter dut (.*);
  always #11.3636 lo_clk = ~lo_clk;
  always @(posedge tx_out) npulse++;

  // pulse timing while the carrier is steadily on
  bit      timing_on = 0;
  int      n_timed = 0;
  realtime t_rise = 0, t_prev = 0;
  always @(posedge tx_out) begin
    t_prev = t_rise;
    t_rise = $realtime;
    if (timing_on && t_prev > 0) begin
      checks++; n_timed++;
      if (t_rise - t_prev < 1.032 || t_rise - t_prev > 1.132) begin
        failures++; $display("pulse spacing %f ns", t_rise - t_prev);
      end
    end
  end
  always @(negedge tx_out) if (timing_on) begin
    checks++;
    if ($realtime - t_rise < 0.49 || $realtime - t_rise > 0.59) begin
      failures++; $display("pulse width %f ns", $realtime - t_rise);
    end
  end

  initial begin : watchdog
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    realtime t0;
    bit [15:0] pattern = 16'b1011_0010_1110_0001;
    repeat (20) @(posedge lo_clk);
    // carrier frequency: pulses over 100 LO periods
    @(posedge lo_clk) tx_in = 1;
    repeat (2) @(posedge lo_clk);
    n0 = npulse; t0 = $realtime;
    timing_on = 1;
    repeat (100) @(posedge lo_clk);
    timing_on = 0;
    checks++;
    if (npulse - n0 != 2100) begin failures++; $display("pulses %0d", npulse - n0); end
    checks++;
    if ((npulse - n0) / (($realtime - t0) * 1e-3) < 923.0 ||
        (npulse - n0) / (($realtime - t0) * 1e-3) > 925.0) begin
      failures++; $display("carrier off frequency");
    end
    // carrier off
    @(posedge lo_clk) tx_in = 0;
    @(posedge lo_clk);
    n0 = npulse;
    repeat (100) @(posedge lo_clk);
    checks++;
    if (npulse != n0) begin failures++; $display("output while off: %0d", npulse - n0); end
    // OOK bits, 16 LO periods per bit; count pulses bit by bit
    for (int b = 15; b >= 0; b--) begin
      @(negedge lo_clk) tx_in = pattern[b];
      n0 = npulse;
      repeat (16) @(negedge lo_clk);
      checks++;
      if (pattern[b] ? (npulse - n0 < 335 || npulse - n0 > 337) : (npulse != n0)) begin
        failures++; $display("bit %0d: %0d pulses", b, npulse - n0);
      end
    end
    // a random OOK stream at 2.75 Mb/s
    for (int b = 0; b < 200; b++) begin
      bit v;
      v = 1'($urandom);
      @(negedge lo_clk) tx_in = v;
      n0 = npulse;
      repeat (16) @(negedge lo_clk);
      checks++;
      if (v ? (npulse - n0 < 335 || npulse - n0 > 337) : (npulse != n0)) begin
        failures++; $display("random bit %0d: %0d pulses", b, npulse - n0);
      end
    end
    checks++;
    if (n_timed < 2000) begin failures++; $display("only %0d pulses timed", n_timed); end
    // a random OOK stream at 2.75 Mb/s
    for (int b = 0; b < 200; b++) begin
      bit v;
      v = 1'($urandom);
      @(negedge lo_clk) tx_in = v;
      n0 = npulse;
      repeat (16) @(negedge lo_clk);
      checks++;
      if (v ? (npulse - n0 < 335 || npulse - n0 > 337) : (npulse != n0)) begin
        failures++; $display("random bit %0d: %0d pulses", b, npulse - n0);
      end
    end
    checks++;
    if (n_timed < 2000) begin failures++; $display("only %0d pulses timed", n_timed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
