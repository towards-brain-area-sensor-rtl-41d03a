// Shared constants of the Brain-ASNET link protocol ("modified HDLC").
//
// One TDMA time frame is 317 bits long: a 57-bit beacon slot followed by four
// 65-bit sensor slots. Every byte field after the SYNC pattern is followed by
// one stuffed '0', so the frame length is fixed and no run of more than eight
// '1's can occur outside a SYNC pattern. The beacon SYNC (0, ten 1s, 0) and the
// sensor SYNC (0, nine 1s, 0) therefore cannot be imitated by payload bits.
//
// Frame lengths, SYNC lengths, four sensors of four channels and CRC-8 follow
// the protocol description. The exact SYNC bit patterns, the CRC polynomial
// (0xD5, initial value 0), the MSB-first bit order and the beacon payload layout
// (one {address, AFE configuration} byte per sensor) are this design's choices.
`timescale 1ns/1ps
package brain_asnet_pkg;
  localparam int unsigned N_SENSORS     = 4;     // sensor nodes (= sensor slots)
  localparam int unsigned N_CHANNELS    = 4;     // recording channels per sensor
  localparam int unsigned ADDR_W        = 3;     // SAddr0..2 pins
  localparam int unsigned AFE_CFG_W     = 5;     // AFE0..4 pins
  localparam int unsigned SAMPLE_W      = 8;     // SAR ADC resolution

  localparam int unsigned BEACON_SYNC_LEN = 12;
  localparam int unsigned SENSOR_SYNC_LEN = 11;
  localparam logic [11:0] BEACON_SYNC     = 12'b0111_1111_1110;
  localparam logic [10:0] SENSOR_SYNC     = 11'b011_1111_1110;

  localparam int unsigned BEACON_BYTES  = N_SENSORS;        // payload bytes of a beacon
  localparam int unsigned SENSOR_BYTES  = 1 + N_CHANNELS;   // address/control + samples

  // 9 bits per byte (8 data + stuffed 0), CRC byte included
  localparam int unsigned BEACON_LEN  = BEACON_SYNC_LEN + 9 * (BEACON_BYTES + 1);  // 57
  localparam int unsigned SENSOR_LEN  = SENSOR_SYNC_LEN + 9 * (SENSOR_BYTES + 1);  // 65
  localparam int unsigned FRAME_LEN   = BEACON_LEN + N_SENSORS * SENSOR_LEN;       // 317

  localparam logic [7:0] CRC8_POLY = 8'hD5;

  // Bit time (frame counter value) at which sensor slot s starts
  function automatic int unsigned slot_first_bit(input int unsigned s);
    return BEACON_LEN + s * SENSOR_LEN;
  endfunction
endpackage
