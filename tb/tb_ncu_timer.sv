// Self-checking testbench for ncu_timer. Master mode: frame_start every 317
// cycles, never a slot_start. Slave mode: after a beacon SYNC the counter
// holds SYNC_LOAD, the node's slot starts at bit time 57 + 65*address of every
// frame, the watchdog drops sync after WDT_FRAMES frames without a beacon
// (and not before), and an address without a slot never transmits.
`timescale 1ns/1ps
module tb_ncu_timer;
  logic clk = 0, rst = 1, master = 1, beacon_sync = 0;
  logic [2:0] addr = 0;
  logic [8:0] bit_cnt;
  logic synced, frame_start, slot_start, wdt_expired;
  int checks = 0, failures = 0;
  localparam int WDT = 3;

  ncu_timer #(.WDT_FRAMES(WDT)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    int last, n;
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- master ----
    last = -1; n = 0;
    for (int c = 0; c < 317 * 4; c++) begin
      @(negedge clk);
      check(!slot_start, "master slot_start");
      if (frame_start) begin
        if (last >= 0) check(c - last == 317, "master frame period");
        last = c; n++;
      end
    end
    check(n == 4, "master frame count");
    // ---- slave, several addresses ----
    for (int a = 0; a < 6; a++) begin
      int since;
      rst = 1; master = 0; addr = 3'(a);
      @(negedge clk) rst = 0;
      repeat (50) @(negedge clk);
      check(!synced, "synced before beacon");
      for (int f = 0; f < 3; f++) begin
        beacon_sync = 1;
        @(negedge clk) beacon_sync = 0;
        check(bit_cnt == 9'(12 + 2) && synced, "load after beacon sync");
        // slot start expected at bit time 57 + 65a
        since = 0;
        for (int c = 14; c < 317 + 14 - 1; c++) begin
          if (slot_start) begin
            check(a < 4 && c == 57 + 65 * a && bit_cnt == 9'(c), "slot position");
            since++;
          end
          if (frame_start) check(c == 317, "slave frame_start position");
          @(negedge clk);
        end
        check(since == (a < 4 ? 1 : 0), "one slot per frame");
      end
      // no more beacons: synced must hold for WDT frames, then drop
      n = 0;
      while (synced && n < 317 * (WDT + 2)) begin
        if (a < 4 && slot_start) check(1, "slot during watchdog wait");
        @(negedge clk); n++;
      end
      // counter is at 13 (where the next beacon would be seen): expiry on the
      // wrap that ends the WDT-th frame without a beacon
      check(!synced && n == (316 - 13 + 1) + 317 * (WDT - 1), $sformatf("watchdog expiry after %0d cycles", n));
      repeat (400) begin
        @(negedge clk);
        check(!slot_start && !frame_start, "silent after watchdog");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one-cycle expiry pulse coincides with the loss of sync
  logic synced_q = 0;
  always @(posedge clk) begin
    if (!rst && !master && synced_q && !synced) begin
      checks++;
      if (!wdt_expired) begin failures++; $display("no wdt_expired pulse"); end
    end
    synced_q <= rst ? 1'b0 : synced;
  end
endmodule
