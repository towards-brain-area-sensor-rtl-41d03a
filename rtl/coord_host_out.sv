// Coordinator host output: sends every sensor packet that the coordinator
// received without error to the host on the DATAout/CLKout pins.
//
// On `load` the 40 received bits (address/control byte, then the four channel
// samples) are captured and shifted out MSB first, one bit per system clock.
// CLKout is the system clock gated by a registered enable: it rises in the
// middle of each data bit (on the falling system clock edge), so the host
// samples DATAout on CLKout rising edges. 40 bits fit in the 65-bit time
// until the next sensor packet can arrive. Gated clock and data pins are the
// design's; the bit order and the gating scheme are this design's choice.
`timescale 1ns/1ps
module coord_host_out (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [39:0] record,
  output logic        data_out,
  output logic        clk_out
);
  logic [39:0] sr;
  logic [5:0]  left;
  logic        en;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr       <= '0;
      left     <= '0;
      en       <= 1'b0;
      data_out <= 1'b0;
    end else if (load) begin
      data_out <= record[39];
      sr       <= {record[38:0], 1'b0};
      left     <= 6'd39;
      en       <= 1'b1;
    end else if (left != 0) begin
      data_out <= sr[39];
      sr       <= {sr[38:0], 1'b0};
      left     <= left - 6'd1;
    end else begin
      en       <= 1'b0;
      data_out <= 1'b0;
    end
  end

  assign clk_out = en & ~clk;
endmodule
