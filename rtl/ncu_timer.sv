// NCU master/slave TDMA timer.
//
// Counts bit times 0..FRAME_LEN-1 of the 317-bit time frame. In master mode
// the counter runs freely and the coordinator sends its beacon at count 0.
// In slave mode the counter is re-aligned every time the depacketizer finds
// a beacon SYNC: it is loaded with the count the master has reached at that
// moment, so all nodes agree on slot boundaries to the bit. The sensor then
// starts its packet at the first bit time of the slot given by its hardware
// MAC address (slot = address; addresses >= N_SENSORS never transmit).
// A watchdog counts frame boundaries without a beacon; after WDT_FRAMES
// consecutive missing beacons the sensor drops out of sync and only listens.
// Beacon-driven resynchronisation, address-based slots and the watchdog follow
// the protocol description; the watchdog length is this design's choice.
//
// Timing: `frame_start` and `slot_start` are combinational and high during
// the cycle in which the counter holds the slot's first bit time; a
// packetizer started then puts its first bit on the air one cycle later.
// SYNC_LOAD accounts for the transmit register of the sender and the receive
// register of the depacketizer (two cycles).
`timescale 1ns/1ps
module ncu_timer
  import brain_asnet_pkg::*;
#(
  parameter int unsigned WDT_FRAMES = 3,
  parameter int unsigned SYNC_LOAD  = BEACON_SYNC_LEN + 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              master,
  input  logic [ADDR_W-1:0] addr,
  input  logic              beacon_sync,   // beacon SYNC detected (slave)
  output logic [8:0]        bit_cnt,
  output logic              synced,
  output logic              frame_start,   // beacon slot begins
  output logic              slot_start,    // this sensor's slot begins
  output logic              wdt_expired    // one-cycle pulse when sync is lost
);
  logic [3:0] wdt_cnt;
  logic       wrap;

  assign wrap        = (bit_cnt == 9'(FRAME_LEN - 1));
  assign frame_start = synced && (bit_cnt == 9'd0);
  assign slot_start  = synced && !master && (addr < ADDR_W'(N_SENSORS)) &&
                       (bit_cnt == 9'(slot_first_bit(32'(addr))));

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_cnt     <= '0;
      synced      <= 1'b0;
      wdt_cnt     <= '0;
      wdt_expired <= 1'b0;
    end else begin
      wdt_expired <= 1'b0;
      if (master) begin
        synced  <= 1'b1;
        wdt_cnt <= '0;
        bit_cnt <= wrap ? '0 : bit_cnt + 9'd1;
      end else if (beacon_sync) begin
        synced  <= 1'b1;
        wdt_cnt <= '0;
        bit_cnt <= 9'(SYNC_LOAD);
      end else begin
        bit_cnt <= wrap ? '0 : bit_cnt + 9'd1;
        if (wrap && synced) begin
          if (wdt_cnt == 4'(WDT_FRAMES)) begin
            synced      <= 1'b0;
            wdt_expired <= 1'b1;
            wdt_cnt     <= '0;
          end else begin
            wdt_cnt <= wdt_cnt + 4'd1;
          end
        end
      end
    end
  end
endmodule
