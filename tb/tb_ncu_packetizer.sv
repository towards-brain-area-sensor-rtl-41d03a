// Self-checking testbench for ncu_packetizer: random beacons and sensor
// packets are compared bit by bit with the reference framing, including the
// packet lengths (57 and 65 bits), the one-cycle start latency and the idle
// (carrier off) level between packets.
`timescale 1ns/1ps
module tb_ncu_packetizer;
  import tb_link_pkg::*;
  logic clk = 0, rst = 1, master = 0, start = 0;
  logic [39:0] bytes = '0;
  logic tx_bit, busy;
  int checks = 0, failures = 0;

  ncu_packetizer dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 120; t++) begin
      logic [7:0] b[$];
      bitq_t exp;
      int nb;
      b.delete();
      master = t[0];
      nb = master ? 4 : 5;
      bytes = {$urandom, 8'($urandom)};
      if (t % 10 == 3) bytes = '1;          // worst case: all ones
      for (int i = 0; i < nb; i++) b.push_back(bytes[39 - 8*i -: 8]);
      exp = frame_bits(master, b);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      // first bit is visible in the cycle after the start edge
      for (int i = 0; i < exp.size(); i++) begin
        checks++;
        if (tx_bit !== exp[i] || !busy) begin
          failures++;
          $display("pkt %0d bit %0d: got %b exp %b busy %b", t, i, tx_bit, exp[i], busy);
        end
        @(negedge clk);
      end
      checks++;
      if (busy || tx_bit !== 1'b0) begin failures++; $display("pkt %0d too long", t); end
      checks++;
      if (exp.size() != (master ? 57 : 65)) failures++;
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (tx_bit !== 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
