// Edge-combining power amplifier (EC-PA) of the OOK transmitter, logic view.
//
// Each of the N open-drain gates conducts while two adjacent stages of the
// second ring oscillator are both high and the transmit data TX_IN is 1:
//   TX_OUT = TX_IN * (B1*B2 + B2*B3 + ... + BN*B1).
// With N = 21 stages of a 44 MHz ring each product is a pulse one inverter
// delay wide, and the 21 pulses fall at evenly spaced times, so their sum is
// a 21 x 44 MHz = 924 MHz carrier that is switched on and off by the data
// (on-off keying). In silicon the products are currents summed into the
// antenna load; here they are ORed into one logic signal. The combining
// equation is the design's.
`timescale 1ns/1ps
module ook_ec_pa #(
  parameter int unsigned N = 21
) (
  input  logic [N-1:0] ph,      // ring stages B1..BN
  input  logic         tx_in,   // OOK data
  output logic         tx_out   // combined carrier pulses
);
  logic [N-1:0] prod;
  assign prod   = ph & {ph[0], ph[N-1:1]};   // B(i) * B(i+1), wrapping
  assign tx_out = tx_in & (|prod);
endmodule
