// Reset synchroniser: the power-on reset asserts the system reset at once
// and releases it two system clock edges after the reset input falls.
`timescale 1ns/1ps
module reset_sync (
  input  logic clk,
  input  logic rst_in,   // asynchronous, active high
  output logic rst_out   // active high, released synchronously
);
  logic [1:0] sr;
  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) sr <= 2'b11;
    else        sr <= {sr[0], 1'b0};
  end
  assign rst_out = sr[1];
endmodule
