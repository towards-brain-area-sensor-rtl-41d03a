// Self-checking testbench for sar_logic with an ideal comparator model:
// the held input is a random 8-bit level and the comparator answers
// (input >= DAC code). Checked: the result equals the input level, `done`
// comes exactly 10 cycles after `start` (275 kS/s at 2.75 MHz), back-to-back
// conversions keep a 10-cycle period, and `sample` is high exactly once per
// conversion, in the cycle after start.
`timescale 1ns/1ps
module tb_sar_logic;
  logic clk = 0, rst = 1, start = 0, cmp;
  logic sample, done;
  logic [7:0] dac_code, data;
  logic [7:0] vin, held;
  int checks = 0, failures = 0;

  sar_logic #(.BITS(8)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (sample) held <= vin;   // sample-and-hold
  assign cmp = (held >= dac_code);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    held = 0; vin = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // single conversions, including the end points
    for (int t = 0; t < 300; t++) begin
      int lat = 0, nsamp = 0;
      logic [7:0] v = (t == 0) ? 8'h00 : (t == 1) ? 8'hFF : 8'($urandom);
      vin = v;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0; lat = 1;
      checks++; if (!sample) begin failures++; $display("no sample cycle"); end
      @(negedge clk); lat++;
      vin = ~v;     // input changes after sampling: must not matter
      while (!done && lat < 20) begin
        if (sample) nsamp++;
        @(negedge clk); lat++;
      end
      checks += 2;
      if (lat != 10) begin failures++; $display("latency %0d", lat); end
      if (data !== v) begin failures++; $display("result %h exp %h", data, v); end
      @(negedge clk);
    end
    // back-to-back: start held high, 10 cycles per result
    begin
      int last = -1, n = 0;
      start = 1;
      for (int c = 0; c < 200; c++) begin
        vin = 8'(c * 37);
        @(negedge clk);
        if (done) begin
          if (last >= 0) begin
            checks++;
            if (c - last != 10) begin failures++; $display("period %0d", c - last); end
          end
          last = c; n++;
        end
      end
      start = 0;
      checks++; if (n < 19) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
