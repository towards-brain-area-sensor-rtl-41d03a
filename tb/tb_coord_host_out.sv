// Testbench for coord_host_out, the coordinator's DATAout/CLKout sender.
//
// Random 40-bit records are loaded one packet slot (65 system clocks) apart,
// as the coordinator does. A host model samples DATAout on every rising edge
// of the gated CLKout and rebuilds each record; checked are the bit values
// (MSB first), exactly 40 CLKout pulses per record, CLKout staying low between
// records, and that the first pulse comes one system clock after `load`.
// A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_coord_host_out;
  logic clk = 0, rst = 1, load = 0;
  logic [39:0] record;
  logic data_out, clk_out;
  logic [39:0] got;
  int n = 0, checks = 0, failures = 0;
  realtime t_load, t_first;

  coord_host_out dut (.clk, .rst, .load, .record, .data_out, .clk_out);

  always #5 clk = ~clk;
  always @(posedge clk_out) begin
    if (n == 0) t_first = $realtime;
    got = {got[38:0], data_out};
    n++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] r;
    repeat (4) @(negedge clk);
    rst = 0;
    n = 0;                            // forget pulses from before reset
    repeat (20) @(negedge clk);
    check(n == 0, "no CLKout pulses while idle");
    for (int k = 0; k < 100; k++) begin
      r = {$urandom, 8'($urandom)};
      n = 0;
      record = r; load = 1;
      @(posedge clk) t_load = $realtime;
      @(negedge clk) load = 0; record = '0;
      repeat (64) @(negedge clk);
      check(n == 40, $sformatf("record %0d: %0d CLKout pulses", k, n));
      check(got == r, $sformatf("record %0d: got %h expected %h", k, got, r));
      check(t_first - t_load == 5.0, "first CLKout half a system clock after load");
      check(clk_out == 0 && data_out == 0, "pins idle after the record");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
