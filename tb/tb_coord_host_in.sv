// Testbench for coord_host_in, the coordinator's DATAin/CLKin receiver.
//
// A host model drives 32-bit words with a gated clock several times slower
// than the system clock (random low/high times), MSB first, sampled by the
// receiver on CLKin rising edges. Checked against the words sent: the reset
// configuration, each complete word appearing on beacon_cfg with a single
// cfg_update pulse, beacon_cfg holding between words, and a transfer broken
// off half-way (followed by a long idle gap) being discarded without shifting
// the framing of the next word. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_coord_host_in;
  logic clk = 0, rst = 1, clk_in = 0, data_in = 0;
  logic [31:0] beacon_cfg;
  logic        cfg_update;
  int checks = 0, failures = 0, updates = 0;

  coord_host_in dut (.clk, .rst, .clk_in, .data_in, .beacon_cfg, .cfg_update);

  always #5 clk = ~clk;
  always @(posedge clk) if (cfg_update) updates++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_bits(input logic [31:0] w, input int n);
    for (int i = 31; i > 31 - n; i--) begin
      data_in = w[i];
      repeat (2 + $urandom_range(3)) @(negedge clk);
      clk_in = 1;
      repeat (2 + $urandom_range(3)) @(negedge clk);
      clk_in = 0;
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    int u0;
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(beacon_cfg == 32'h00204060, "reset configuration");
    for (int k = 0; k < 40; k++) begin
      w = $urandom;
      u0 = updates;
      if (k % 5 == 4) begin
        send_bits(~w, 13);                       // aborted transfer
        repeat (300) @(negedge clk);
        check(updates == u0, "aborted transfer gives no update");
      end
      send_bits(w, 31);
      repeat (10) @(negedge clk);
      check(updates == u0, "no update before the 32nd bit");
      check(beacon_cfg != w || k == 0 && w == 32'h00204060, "old word held until the 32nd bit");
      send_bits(w << 31, 1);
      repeat (6) @(negedge clk);
      check(updates == u0 + 1, "one update per word");
      check(beacon_cfg == w, $sformatf("word %0d: got %h expected %h", k, beacon_cfg, w));
      repeat ($urandom_range(20)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
