// NCU master/slave packetizer.
//
// Serialises one modified-HDLC packet: the SYNC pattern, then each byte field
// MSB first followed by one stuffed '0', then the CRC-8 frame check sequence
// (also followed by a '0'). In master (coordinator) mode it sends a beacon:
// the 12-bit beacon SYNC and BEACON_BYTES payload bytes (bytes[39:8]). In
// slave (sensor) mode it sends the 11-bit sensor SYNC and SENSOR_BYTES bytes
// (address/control byte in bytes[39:32], then the channel samples).
// One shared datapath serves both modes, as in the combined master-slave
// packetizer of the design; the counter/shift-register structure is this
// design's own.
//
// Timing: `start` is sampled on a clock edge; the first SYNC bit is on
// `tx_bit` during the following cycle and one bit follows per clock, so a
// beacon occupies 57 cycles and a sensor packet 65. `tx_bit` is 0 (carrier
// off) whenever no packet is being sent. `busy` is high from the cycle after
// `start` through the last bit; a new `start` is accepted once it is low.
`timescale 1ns/1ps
module ncu_packetizer
  import brain_asnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        master,     // 1: beacon, 0: sensor packet
  input  logic        start,
  input  logic [39:0] bytes,      // byte 0 in [39:32], sent first
  output logic        tx_bit,
  output logic        busy
);
  typedef enum logic [1:0] {IDLE, SYNC, BODY, LAST} state_t;
  state_t      state;
  logic [11:0] sync_sr;
  logic [3:0]  sync_left;
  logic [39:0] data_sr;
  logic [7:0]  crc_sr;
  logic [3:0]  bit_idx;    // 0..7 data/CRC bit, 8 stuffed zero (next bit to send)
  logic [2:0]  byte_idx;   // 0..nbytes-1 payload, nbytes = CRC
  logic [2:0]  nbytes;

  logic        crc_en, crc_clr;
  logic [7:0]  crc;
  logic        body_bit;
  logic        body_phase;  // this edge emits a body bit

  crc8 u_crc (.clk, .rst, .clear(crc_clr), .en(crc_en), .din(data_sr[39]), .crc);

  assign body_phase = (state == BODY) || (state == SYNC && sync_left == 0);
  assign body_bit   = (bit_idx == 4'd8)     ? 1'b0 :
                      (byte_idx == nbytes)  ? crc_sr[7] : data_sr[39];
  assign crc_en     = body_phase && bit_idx != 4'd8 && byte_idx != nbytes;
  assign crc_clr    = (state == IDLE);
  assign busy       = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      tx_bit    <= 1'b0;
      sync_sr   <= '0;
      sync_left <= '0;
      data_sr   <= '0;
      crc_sr    <= '0;
      bit_idx   <= '0;
      byte_idx  <= '0;
      nbytes    <= '0;
    end else begin
      case (state)
        IDLE: begin
          tx_bit <= 1'b0;
          if (start) begin
            // first SYNC bit now, remaining ones from the shift register
            if (master) begin
              sync_sr   <= {BEACON_SYNC[10:0], 1'b0};
              sync_left <= 4'(BEACON_SYNC_LEN - 1);
              nbytes    <= 3'(BEACON_BYTES);
              tx_bit    <= BEACON_SYNC[11];
            end else begin
              sync_sr   <= {SENSOR_SYNC[9:0], 2'b00};
              sync_left <= 4'(SENSOR_SYNC_LEN - 1);
              nbytes    <= 3'(SENSOR_BYTES);
              tx_bit    <= SENSOR_SYNC[10];
            end
            data_sr  <= bytes;
            bit_idx  <= '0;
            byte_idx <= '0;
            state    <= SYNC;
          end
        end
        SYNC, BODY: begin
          if (!body_phase) begin
            tx_bit    <= sync_sr[11];
            sync_sr   <= {sync_sr[10:0], 1'b0};
            sync_left <= sync_left - 4'd1;
          end else begin
            state  <= BODY;
            tx_bit <= body_bit;
            if (bit_idx == 4'd8) begin
              bit_idx  <= '0;
              byte_idx <= byte_idx + 3'd1;
              // remainder is complete once the last payload bit has been shifted in
              if (byte_idx == nbytes - 3'd1) crc_sr <= crc;
              if (byte_idx == nbytes)        state  <= LAST;
            end else begin
              bit_idx <= bit_idx + 4'd1;
              if (byte_idx == nbytes) crc_sr  <= {crc_sr[6:0], 1'b0};
              else                    data_sr <= {data_sr[38:0], 1'b0};
            end
          end
        end
        LAST: begin      // last stuffed zero is on the line this cycle
          tx_bit <= 1'b0;
          state  <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a new packet may only be requested while the previous one is finished
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
