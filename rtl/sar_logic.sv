// Successive-approximation register (SAR) logic of the 8-bit SAR ADC.
//
// A conversion takes 10 clock cycles: one cycle in which the sample-and-hold
// DAC tracks the input (`sample` high), eight bit-trial cycles from MSB to
// LSB, and one cycle in which the result is presented (`done` high). In each
// trial the bit under test is set in `dac_code`; the comparator answers
// `cmp` = 1 when the held input is at or above the DAC level, and the bit is
// kept, otherwise cleared. At a 2.75 MHz system clock this gives the
// 275 kS/s conversion rate of the converter. A new `start` is accepted in
// the done cycle, so conversions can follow each other back to back.
// The register/timing function follows the design's SA register; the exact
// cycle allocation (one sample cycle, one done cycle) is this design's choice.
`timescale 1ns/1ps
module sar_logic #(
  parameter int unsigned BITS = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic            cmp,       // comparator: held input >= DAC level
  output logic            sample,    // track phase of the capacitive DAC
  output logic [BITS-1:0] dac_code,
  output logic [BITS-1:0] data,
  output logic            done
);
  typedef enum logic [1:0] {IDLE, SAMPLE, CONV, DONE} state_t;
  state_t          state;
  logic [BITS-1:0] mask;   // one-hot bit under test

  assign sample = (state == SAMPLE);
  assign done   = (state == DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      mask     <= '0;
      dac_code <= '0;
      data     <= '0;
    end else begin
      case (state)
        IDLE, DONE: if (start) state <= SAMPLE; else state <= IDLE;
        SAMPLE: begin
          mask     <= {1'b1, {(BITS-1){1'b0}}};
          dac_code <= {1'b1, {(BITS-1){1'b0}}};
          state    <= CONV;
        end
        CONV: begin
          mask <= mask >> 1;
          if (mask[0]) begin
            data  <= cmp ? dac_code : (dac_code & ~mask);
            state <= DONE;
          end else begin
            dac_code <= (cmp ? dac_code : (dac_code & ~mask)) | (mask >> 1);
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
