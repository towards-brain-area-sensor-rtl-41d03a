// Behavioural model (not synthesizable logic) of an injection-locked ring
// oscillator (ILRO) of the OOK transmitter.
//
// The real circuit is a ring of N CMOS inverters (N odd) whose free-running
// frequency 1/(2*N*tp) is tuned to the 44 MHz injection frequency, so that
// the ring locks to the injected signal. This model describes the locked
// state: the injection reaches stage 0 through one inverter delay, so stage i
// is the injection signal delayed by (i+1)*tp and inverted for odd i, with
// tp = 1/(2*N*f_inj). No stage switches in the same instant as the injection
// edge, which keeps the simulated pulse train free of zero-width glitches.
// Adjacent stages therefore have the one-delay
// offset and inversion of a real ring, and the N phases are spread evenly
// over half a period. Locking dynamics, phase noise and the free-running
// behaviour are not modelled. Stage counts (7 and 21) and the 44 MHz lock
// frequency are the design's; the delay formulation is the model's.
// Synthesis ignores the delays, so there every even stage reduces to the
// injection input and every odd stage to its inverse; only simulation shows
// the phase spread.
`timescale 1ns/1ps
module ilro #(
  parameter int unsigned N         = 21,
  parameter real         F_INJ_MHZ = 44.0
) (
  input  logic         inj,
  output logic [N-1:0] ph
);
  localparam real TP_NS = 1000.0 / (F_INJ_MHZ * 2.0 * N);

  for (genvar i = 0; i < N; i++) begin : g_stage
    if (i % 2 == 0) begin : g_even
      assign #(TP_NS * (i + 1)) ph[i] = inj;
    end else begin : g_odd
      assign #(TP_NS * (i + 1)) ph[i] = ~inj;
    end
  end
endmodule
