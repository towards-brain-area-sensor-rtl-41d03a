// Behavioural model of the ultra-low-power OOK RF transmitter.
//
// A first ILRO of 7 inverters is injection-locked to the 44 MHz local
// oscillator, a second ILRO of 21 inverters is locked to the first, and the
// edge-combining PA multiplies the 44 MHz ring frequency by 21 to a 924 MHz
// carrier gated by the transmit data. The ring oscillators are delay-based
// behavioural models (see ilro); the combining logic is the ook_ec_pa
// module. The output is a logic pulse train standing for the RF current into
// the antenna; amplitude, power and spectrum are not modelled.
// The two-stage structure and stage counts are the design's.
`timescale 1ns/1ps
module ook_transmitter #(
  parameter int unsigned N1        = 7,
  parameter int unsigned N2        = 21,
  parameter real         F_LO_MHZ  = 44.0
) (
  input  logic lo_clk,   // 44 MHz local oscillator
  input  logic tx_in,    // data to transmit (1 = carrier on)
  output logic tx_out    // TxOutAnt
);
  logic [N1-1:0] ph1;
  logic [N2-1:0] ph2;

  ilro #(.N(N1), .F_INJ_MHZ(F_LO_MHZ)) u_ilro1 (.inj(lo_clk), .ph(ph1));
  ilro #(.N(N2), .F_INJ_MHZ(F_LO_MHZ)) u_ilro2 (.inj(ph1[N1-1]), .ph(ph2));
  ook_ec_pa #(.N(N2)) u_pa (.ph(ph2), .tx_in, .tx_out);
endmodule
