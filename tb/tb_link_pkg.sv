// Reference model of the link framing used by the testbenches: builds the
// bit sequence of a beacon or sensor packet from its byte fields, written
// directly from the frame description (SYNC, bytes MSB first each followed
// by a 0, CRC-8 with polynomial 0xD5 and initial value 0, followed by a 0).
`timescale 1ns/1ps
package tb_link_pkg;
  typedef bit bitq_t[$];

  function automatic logic [7:0] crc_of(input logic [7:0] b[$]);
    logic [7:0] r = 8'h00;
    foreach (b[i])
      for (int k = 7; k >= 0; k--) begin
        logic top = r[7] ^ b[i][k];
        r = {r[6:0], 1'b0};
        if (top) r ^= 8'hD5;
      end
    return r;
  endfunction

  // master = 1: beacon (12-bit SYNC 0 1111111111 0), else sensor SYNC (0 111111111 0)
  function automatic bitq_t frame_bits(input bit master, input logic [7:0] b[$]);
    bitq_t q;
    int ones = master ? 10 : 9;
    logic [7:0] c = crc_of(b);
    q.push_back(0);
    repeat (ones) q.push_back(1);
    q.push_back(0);
    foreach (b[i]) begin
      for (int k = 7; k >= 0; k--) q.push_back(b[i][k]);
      q.push_back(0);
    end
    for (int k = 7; k >= 0; k--) q.push_back(c[k]);
    q.push_back(0);
    return q;
  endfunction
endpackage
