// AFE controller of the sensor node.
//
// Once per time frame (`start`, at the beginning of the beacon slot) it
// steps the 4-to-1 analog multiplexer through the recording channels and
// has the SAR logic convert each one; the four 8-bit results are buffered in
// `samples` (channel 0 in [31:24]) for the slave packetizer, which picks them
// up at the start of the sensor's slot. So each channel is sampled at the
// frame rate, f_clk / 317 (8.675 kS/s at 2.75 MHz).
// The multiplexer select changes on the clock edge on which the SAR logic
// enters its sample cycle, so the select is stable while the DAC tracks.
// Four conversions take 40 cycles, well inside the 57-cycle beacon slot.
// The channel sequence and the buffer are this design's realisation of the
// controller's stated job (bridging the multiplexed ADC output and the
// packetizer).
`timescale 1ns/1ps
module afe_controller #(
  parameter int unsigned N_CH  = 4,
  parameter int unsigned BITS  = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  output logic [$clog2(N_CH)-1:0] mux_sel,
  output logic                   sar_start,
  input  logic                   sar_done,
  input  logic [BITS-1:0]        sar_data,
  output logic [N_CH*BITS-1:0]   samples,
  output logic                   samples_valid
);
  logic busy;
  logic last;

  assign last      = (mux_sel == $clog2(N_CH)'(N_CH - 1));
  assign sar_start = (!busy && start) || (busy && sar_done && !last);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy          <= 1'b0;
      mux_sel       <= '0;
      samples       <= '0;
      samples_valid <= 1'b0;
    end else begin
      samples_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          mux_sel <= '0;
        end
      end else if (sar_done) begin
        samples[(N_CH - 1 - 32'(mux_sel)) * BITS +: BITS] <= sar_data;
        if (last) begin
          busy          <= 1'b0;
          samples_valid <= 1'b1;
        end else begin
          mux_sel <= mux_sel + 1'b1;
        end
      end
    end
  end
endmodule
