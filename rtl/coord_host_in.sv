// Coordinator host input: receives the beacon configuration from the host
// (USB microcontroller) on the DATAin/CLKin pins.
//
// CLKin is a gated clock from the host, slower than the system clock; it and
// DATAin are brought into the system clock domain with two flip-flops, and
// DATAin is shifted in (MSB first) on every rising CLKin edge. After 32 bits
// (one {address, AFE configuration} byte per sensor, sensor slot 0 first) the
// word is moved into `beacon_cfg`, which the master packetizer sends in every
// beacon until the next word arrives. The bit count restarts whenever CLKin
// stays low for 256 system clocks, so a partial transfer does not shift the
// framing of the next one. The pins are the design's; the 32-bit word format,
// synchroniser and time-out are this design's choices.
`timescale 1ns/1ps
module coord_host_in (
  input  logic        clk,
  input  logic        rst,
  input  logic        clk_in,
  input  logic        data_in,
  output logic [31:0] beacon_cfg,
  output logic        cfg_update     // one-cycle pulse when a word is taken
);
  logic [2:0]  cs;      // CLKin synchroniser and edge detector
  logic [1:0]  ds;
  logic [31:0] sr;
  logic [4:0]  nbits;
  logic [7:0]  idle;
  logic        rise;

  assign rise = cs[1] && !cs[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      cs         <= '0;
      ds         <= '0;
      sr         <= '0;
      nbits      <= '0;
      idle       <= '0;
      cfg_update <= 1'b0;
      beacon_cfg <= {8'h00, 8'h20, 8'h40, 8'h60};  // addresses 0..3, gain code 0
    end else begin
      cs         <= {cs[1:0], clk_in};
      ds         <= {ds[0], data_in};
      cfg_update <= 1'b0;
      if (rise) begin
        idle  <= '0;
        sr    <= {sr[30:0], ds[1]};
        nbits <= nbits + 5'd1;
        if (nbits == 5'd31) begin
          beacon_cfg <= {sr[30:0], ds[1]};
          cfg_update <= 1'b1;
        end
      end else if (idle == 8'hFF) begin
        nbits <= '0;
      end else begin
        idle <= idle + 8'd1;
      end
    end
  end
endmodule
