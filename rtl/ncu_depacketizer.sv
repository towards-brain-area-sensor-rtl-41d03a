// NCU master/slave depacketizer.
//
// Hunts the received bit stream for a SYNC pattern: the 11-bit sensor SYNC in
// master (coordinator) mode, the 12-bit beacon SYNC in slave (sensor) mode, so
// a sensor that has lost synchronisation ignores other sensors' packets until
// the next beacon. After a SYNC it reads the fixed number of byte fields
// (5 in master mode, 4 in slave mode) and the CRC-8 byte, dropping the zero
// stuffed after each byte. A packet is accepted (`frame_valid`) when the CRC
// matches and every stuffed bit was 0; otherwise `frame_err` pulses. Hunting
// resumes right after the last stuffed bit. The check-and-strip structure
// follows the design's depacketizer; counters and registers are this design's.
//
// Timing: `rx_bit` is registered on entry. `sync_det` is high for one cycle,
// the cycle after the last SYNC bit was on `rx_bit`. `frame_valid` /
// `frame_err` pulse the cycle after the last stuffed bit was registered and
// `bytes` (byte 0 in [39:32]) holds the received fields from then on.
`timescale 1ns/1ps
module ncu_depacketizer
  import brain_asnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        master,       // 1: receive sensor packets, 0: beacons
  input  logic        rx_bit,
  output logic        sync_det,
  output logic        frame_valid,
  output logic        frame_err,
  output logic [39:0] bytes
);
  typedef enum logic {HUNT, RECV} state_t;
  state_t      state;
  logic [11:0] shreg;        // shreg[0] is the newest received bit
  logic [39:0] data_sr;
  logic [7:0]  rcrc;
  logic [3:0]  bit_idx;
  logic [2:0]  byte_idx;
  logic [2:0]  nbytes;
  logic        stuff_err;
  logic        b;
  logic        crc_en;
  logic [7:0]  crc;

  assign b     = shreg[0];
  assign nbytes = master ? 3'(SENSOR_BYTES) : 3'(BEACON_BYTES);
  assign sync_det = (state == HUNT) &&
                    (master ? (shreg[10:0] == SENSOR_SYNC) : (shreg == BEACON_SYNC));
  assign crc_en = (state == RECV) && bit_idx != 4'd8 && byte_idx != nbytes;

  crc8 u_crc (.clk, .rst, .clear(sync_det), .en(crc_en), .din(b), .crc);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= HUNT;
      shreg       <= '0;
      data_sr     <= '0;
      rcrc        <= '0;
      bit_idx     <= '0;
      byte_idx    <= '0;
      stuff_err   <= 1'b0;
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      bytes       <= '0;
    end else begin
      shreg       <= {shreg[10:0], rx_bit};
      frame_valid <= 1'b0;
      frame_err   <= 1'b0;
      case (state)
        HUNT: if (sync_det) begin
          state     <= RECV;
          bit_idx   <= '0;
          byte_idx  <= '0;
          stuff_err <= 1'b0;
          data_sr   <= '0;
        end
        RECV: begin
          if (bit_idx == 4'd8) begin
            bit_idx  <= '0;
            byte_idx <= byte_idx + 3'd1;
            if (byte_idx == nbytes) begin
              state <= HUNT;
              if (crc == rcrc && !stuff_err && !b) begin
                frame_valid <= 1'b1;
                bytes <= master ? data_sr : {data_sr[31:0], 8'h00};
              end else begin
                frame_err <= 1'b1;
              end
            end else if (b) begin
              stuff_err <= 1'b1;
            end
          end else begin
            bit_idx <= bit_idx + 4'd1;
            if (byte_idx == nbytes) rcrc    <= {rcrc[6:0], b};
            else                    data_sr <= {data_sr[38:0], b};
          end
        end
        default: state <= HUNT;
      endcase
    end
  end
endmodule
