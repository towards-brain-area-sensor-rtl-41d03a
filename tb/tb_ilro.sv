// Self-checking testbench for the ilro behavioural model (21 stages, locked to
// 44 MHz): every stage runs at the injection frequency, stage i+1 is the
// inverse of stage i delayed by one inverter delay tp = 1/(2*21*44 MHz), and
// the injection reaches stage 0 after one delay: even stages rise (i+1)*tp
// after the injection's rising edge, odd stages (i+1)*tp after its falling
// edge.
`timescale 1ns/1ps
module tb_ilro;
  localparam int N = 21;
  localparam real TP = 1000.0 / (44.0 * 2 * N);
  logic inj = 0;
  logic [N-1:0] ph;
  int checks = 0, failures = 0;
  realtime rise [N];
  int nrise [N];

  ilro #(.N(N), .F_INJ_MHZ(44.0)) dut (.inj, .ph);
  always #11.3636 inj = ~inj;

  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge ph[i]) begin
      if (nrise[i] > 0 && $realtime > 200) begin
        checks++;
        if ($realtime - rise[i] < 22.70 || $realtime - rise[i] > 22.76) begin
          failures++; $display("stage %0d period %f", i, $realtime - rise[i]);
        end
      end
      rise[i] = $realtime;
      nrise[i]++;
    end
  end

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_in;
    foreach (nrise[i]) nrise[i] = 0;
    #500;
    // edge timing relative to the injection edge
    @(posedge inj) t_in = $realtime;
    #22.0;
    for (int i = 0; i < N; i++) begin
      // even stages rise tp*(i+1) after the injection rising edge,
      // odd stages rise tp*(i+1) after the injection falling edge
      realtime exp, got;
      exp = t_in + TP * (i + 1) + ((i % 2) ? 11.3636 : 0.0);
      got = rise[i];
      if (got < t_in) got += 22.7272;   // odd stage rising before t_in in this period
      checks++;
      if (got - exp > 0.01 || exp - got > 0.01) begin
        failures++; $display("stage %0d rise at %f exp %f", i, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
