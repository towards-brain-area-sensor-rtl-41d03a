// Self-checking testbench for ncu_depacketizer. Streams built by the
// reference framing are fed with random idle gaps. Checked: sync_det timing
// (the cycle after the last SYNC bit), accepted packets and their bytes,
// rejection of packets with a flipped payload/CRC bit or a flipped stuffed
// bit, and that a sensor (slave mode) ignores sensor packets while it waits
// for a beacon, and a coordinator ignores beacons.
`timescale 1ns/1ps
module tb_ncu_depacketizer;
  import tb_link_pkg::*;
  logic clk = 0, rst = 1, master = 0, rx_bit = 0;
  logic sync_det, frame_valid, frame_err;
  logic [39:0] bytes;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0, n_sync = 0;

  ncu_depacketizer dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (frame_valid) n_valid++;
    if (frame_err)   n_err++;
    if (sync_det)    n_sync++;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one packet of `kind` (1 beacon / 0 sensor) while the DUT is in mode
  // `master`; corrupt bit `flip` (-1: none); check the outcome
  task automatic send(input bit kind, input int flip);
    logic [7:0] b[$];
    bitq_t q;
    int nb = kind ? 4 : 5;
    logic [39:0] v = {$urandom, 8'($urandom)};
    int v0, e0, s0;
    bit expect_rx = (kind != master);   // beacon to sensor, sensor packet to coordinator
    for (int i = 0; i < nb; i++) b.push_back(v[39 - 8*i -: 8]);
    q = frame_bits(kind, b);
    if (flip >= 0) q[flip] = !q[flip];
    v0 = n_valid; e0 = n_err; s0 = n_sync;
    foreach (q[i]) begin
      @(negedge clk) rx_bit = q[i];
      // last SYNC bit on rx_bit now: sync_det must be high in the next cycle
      if (expect_rx && i == (kind ? 11 : 10)) begin
        @(negedge clk) rx_bit = q[i+1];
        checks++;
        if (!sync_det) begin failures++; $display("sync_det missing"); end
        i++;
      end
    end
    @(negedge clk) rx_bit = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (!expect_rx) begin
      if (n_sync != s0 || n_valid != v0 || n_err != e0) begin
        failures++; $display("packet of the other kind not ignored");
      end
    end else if (flip < 0) begin
      if (n_valid != v0 + 1) begin failures++; $display("good packet not accepted"); end
      else begin
        checks++;
        if (bytes !== (kind ? {v[39:8], 8'h00} : v)) begin
          failures++; $display("bytes %h exp %h", bytes, v);
        end
      end
    end else begin
      if (n_err != e0 + 1 || n_valid != v0) begin
        failures++; $display("corrupted packet (bit %0d) not rejected", flip);
      end
    end
    repeat ($urandom_range(0, 20)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      master = t[1];
      case ($urandom_range(0, 5))
        0:       send(!master, -1);
        1:       send(master, -1);                       // other kind: ignored
        2:       send(!master, (master ? 11 : 12) + 9 * $urandom_range(0, 4) + 8); // stuffed bit
        3:       send(!master, (master ? 11 : 12) + $urandom_range(0, 44));  // any body bit
        default: send(!master, -1);
      endcase
    end
    $display("valid=%0d err=%0d", n_valid, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
