// Serial CRC-8 divider used for the frame check sequence (FCS) of every
// packet. One data bit is shifted in per clock while `en` is high, MSB of each
// byte first; `clear` restarts the remainder at 0. The remainder is readable
// on `crc` the cycle after the last bit. The FCS is computed over the byte
// fields after the SYNC pattern only, without the stuffed zeros.
// The protocol specifies a CRC-8 divider; the polynomial (default 0xD5,
// x^8+x^7+x^6+x^4+x^2+1) and the zero initial value are this design's choice.
`timescale 1ns/1ps
module crc8 #(
  parameter logic [7:0] POLY = brain_asnet_pkg::CRC8_POLY
) (
  input  logic       clk,
  input  logic       rst,    // synchronous, active high
  input  logic       clear,  // restart the remainder (has priority over en)
  input  logic       en,     // shift in din this cycle
  input  logic       din,
  output logic [7:0] crc
);
  logic fb;
  assign fb = crc[7] ^ din;

  always_ff @(posedge clk) begin
    if (rst || clear) crc <= '0;
    else if (en)      crc <= {crc[6:0], 1'b0} ^ (fb ? POLY : 8'h00);
  end
endmodule
