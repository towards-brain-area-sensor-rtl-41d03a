// System clock generation.
//
// Selects the local oscillator (LO): the on-chip 44 MHz crystal oscillator
// when `int_xo_sel` is 1, or the external clock pin otherwise. The LO also
// injects the transmitter's ring oscillators. A 5-bit ripple-free counter
// divides the LO by 16 (`div32` = 0, 2.75 MHz system clock, the default) or
// by 32 (`div32` = 1, 1.375 MHz). With the 317-bit time frame this gives the
// 8.675 kS/s or 4.338 kS/s per-channel sampling rates.
// The two division ratios and both clock sources are the design's; the
// counter implementation and the asynchronous reset are this design's own.
// The clock source and ratio are configuration pins, meant to be static:
// changing them while running may shorten one system clock period.
`timescale 1ns/1ps
module clock_gen (
  input  logic xtal_clk,    // crystal oscillator output
  input  logic ext_clk,     // EXT_Clk pin
  input  logic int_xo_sel,  // IntXOorExtClk pin: 1 = crystal
  input  logic div32,       // FreqDivCtrl pin: 1 = divide by 32
  input  logic rst,         // asynchronous, active high
  output logic lo_clk,
  output logic sys_clk
);
  logic [4:0] cnt;

  assign lo_clk = int_xo_sel ? xtal_clk : ext_clk;

  always_ff @(posedge lo_clk or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 5'd1;
  end

  assign sys_clk = div32 ? cnt[4] : cnt[3];
endmodule
