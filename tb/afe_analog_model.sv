// Testbench model of a sensor's analog front-end: four input channels, the
// 4-to-1 analog multiplexer, the sample-and-hold of the capacitive DAC, the
// ideal 8-bit DAC and the comparator (1.2 V reference). Channel levels are
// generated: channel c of sensor ID at its k-th conversion round sits in
// the middle of code (ID*61 + c*17 + k*5 + 3) mod 256. When channel 3 has
// been sampled the round's four codes are reported on `round_codes` with a
// pulse on `round_done`, so the testbench knows which samples to expect.
`timescale 1ns/1ps
module afe_analog_model #(
  parameter int ID = 0
) (
  input  logic        clk,          // system clock of the sensor
  input  logic [1:0]  mux_sel,
  input  logic        sample,
  input  logic [7:0]  dac_code,
  output logic        cmp,
  output logic [31:0] round_codes,
  output logic        round_done
);
  localparam real VREF = 1.2;
  int  k = 0;
  initial begin
    round_done  = 1'b0;
    round_codes = '0;
  end
  real held = 0.0;
  logic [7:0] codes [4];

  function automatic logic [7:0] code_of(input int c, input int kk);
    return 8'((ID * 61 + c * 17 + kk * 5 + 3) % 256);
  endfunction

  always @(posedge clk) begin
    round_done <= 1'b0;
    if (sample) begin
      // level in the middle of the code's quantisation step
      held = (real'(code_of(int'(mux_sel), k)) + 0.5) * VREF / 256.0;
      codes[mux_sel] = code_of(int'(mux_sel), k);
      if (mux_sel == 2'd3) begin
        round_codes <= {codes[0], codes[1], codes[2], codes[3]};
        round_done  <= 1'b1;
        k++;
      end
    end
  end

  assign cmp = (held >= real'(dac_code) * VREF / 256.0);
endmodule
