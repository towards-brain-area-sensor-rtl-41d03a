// Brain-ASNET SoC: one chip that works either as an implantable sensor node
// (M_Sbar = 0) or as the network coordinator's RF front-end and network
// controller (M_Sbar = 1).
//
// Both roles share the clock generation, the network control unit (NCU:
// TDMA timer, master/slave packetizer and depacketizer) and the OOK
// transmitter. The coordinator sends a 57-bit beacon at the start of each
// 317-bit time frame, carrying the host's {address, AFE configuration} byte
// for each sensor, and passes every error-free sensor packet to the host on
// DATAout/CLKout. A sensor listens for the beacon SYNC, aligns its timer to
// it, takes its AFE configuration byte from the beacon (AFE0..4 pins), digitises
// its four channels once per frame with the SAR ADC (during the beacon slot)
// and sends them in the 65-bit slot of its hardware address (SAddr pins). Its
// first packet goes out in the first frame that starts after it gained sync. A sensor that misses
// WDT_FRAMES beacons in a row falls back to listening. Once in sync, a sensor
// powers its receiver (rx_en) only for the 57 bit times of the beacon and its
// transmitter (tx_en) only for its own 65-bit packet, i.e. 18 % and 20.5 % of
// the frame; the document's average receiver and transmitter powers imply
// these duty cycles, the enable outputs themselves are this design's.
//
// Analog parts are outside this module: the crystal oscillator (xtal_clk
// input), the OOK receiver (rx_data input: demodulated bits), the analog
// multiplexer, capacitive DAC and comparator of the ADC (adc_mux_sel,
// adc_sample and adc_dac_code outputs, adc_cmp input) and the neural
// amplifiers (afe_cfg outputs). The transmitter's ring oscillators are
// included as a behavioural model; its output tx_out_ant is a logic pulse
// train at 924 MHz while tx_data is 1.
//
// Test pins follow the chip's pin list: TRX_bypass = 1 connects the NCU to
// the TxIN_NCUOUT / RxOUT_NCUIN pins instead of the RF transceiver;
// TRX_Indp = 1 separates the transceiver from the NCU and drives the
// transmitter from TxIN_NCUOUT while RxOUT_NCUIN shows the receiver output.
// These bidirectional pins appear as _i/_o/_oe triples. The mapping of the
// bypass pin is this design's reading of the pin list. The status outputs
// synced, pkt_valid, pkt_err and wdt_expired are observation outputs for test.
// Timing: all NCU logic runs on the system clock (LO / 16 or / 32); one
// transmitted bit per system clock, so the link rate is 2.75 Mb/s.
`timescale 1ns/1ps
module brain_asnet_soc
  import brain_asnet_pkg::*;
#(
  parameter int unsigned WDT_FRAMES = 3
) (
  // clocking and configuration pins
  input  logic                 xtal_clk,       // crystal oscillator output
  input  logic                 ext_clk,        // EXT_Clk
  input  logic                 int_xo_sel,     // IntXOorExtClk
  input  logic                 freq_div32,     // FreqDivCtrl
  input  logic                 por,            // POR, active high
  input  logic                 m_sbar,         // M_Sbar: 1 coordinator, 0 sensor
  input  logic [ADDR_W-1:0]    saddr,          // SAddr0..2
  // RF side
  input  logic                 rx_data,        // OOK receiver output
  output logic                 tx_data,        // bit sent to the transmitter
  output logic                 tx_out_ant,     // TxOutAnt (behavioural RF)
  output logic                 rx_en,          // receiver power enable
  output logic                 tx_en,          // transmitter power enable
  // test pins
  input  logic                 trx_bypass,
  input  logic                 trx_indp,
  input  logic                 txin_ncuout_i,
  output logic                 txin_ncuout_o,
  output logic                 txin_ncuout_oe,
  input  logic                 rxout_ncuin_i,
  output logic                 rxout_ncuin_o,
  output logic                 rxout_ncuin_oe,
  // coordinator host interface
  input  logic                 data_in,        // DATAin
  input  logic                 clk_in,         // CLKin
  output logic                 data_out,       // DATAout
  output logic                 clk_out,        // CLKout
  // sensor analog front-end interface
  output logic [AFE_CFG_W-1:0] afe_cfg,        // AFE0..4
  output logic [1:0]           adc_mux_sel,
  output logic                 adc_sample,
  output logic [SAMPLE_W-1:0]  adc_dac_code,
  input  logic                 adc_cmp,
  // status
  output logic                 sys_clk,
  output logic                 synced,
  output logic                 pkt_valid,
  output logic                 pkt_err,
  output logic                 wdt_expired
);
  logic        lo_clk, rst;
  logic        ncu_tx, ncu_rx;
  logic [8:0]  bit_cnt;
  logic        frame_start, slot_start;
  logic        sync_det;
  logic [39:0] rx_bytes, tx_bytes;
  logic [31:0] beacon_cfg, samples;
  logic        cfg_update, samples_valid;
  logic        sar_start, sar_done;
  logic [7:0]  sar_data;
  logic        pk_busy;
  logic        have_samples;
  logic        beacon_win;

  clock_gen u_clk (
    .xtal_clk, .ext_clk, .int_xo_sel, .div32(freq_div32), .rst(por),
    .lo_clk, .sys_clk
  );

  reset_sync u_rst (.clk(sys_clk), .rst_in(por), .rst_out(rst));

  // Transceiver duty cycling. The beacon occupies bit times 1..BEACON_LEN of
  // the frame (the packetizer starts one clock after frame_start). A synced
  // sensor powers its receiver only then and its transmitter only while its
  // own packet is sent; out of sync it listens all the time. The coordinator
  // listens whenever it is not sending the beacon. A receiver that is off
  // delivers 0s.
  assign beacon_win = (bit_cnt != 9'd0) && (bit_cnt <= 9'(BEACON_LEN));
  assign rx_en      = trx_indp || (!trx_bypass &&
                      (m_sbar ? !beacon_win : (!synced || beacon_win)));
  assign tx_en      = trx_indp || (!trx_bypass && pk_busy);

  // transceiver / NCU test multiplexing
  assign ncu_rx         = trx_bypass ? rxout_ncuin_i : (rx_data && rx_en);
  assign tx_data        = trx_indp ? txin_ncuout_i : (trx_bypass ? 1'b0 : ncu_tx);
  assign txin_ncuout_o  = ncu_tx;
  assign txin_ncuout_oe = !trx_indp;
  assign rxout_ncuin_o  = rx_data;
  assign rxout_ncuin_oe = trx_indp;

  // ---------------- network control unit ----------------
  ncu_timer #(.WDT_FRAMES(WDT_FRAMES)) u_timer (
    .clk(sys_clk), .rst, .master(m_sbar), .addr(saddr),
    .beacon_sync(sync_det && !m_sbar),
    .bit_cnt, .synced, .frame_start, .slot_start, .wdt_expired
  );

  assign tx_bytes = m_sbar ? {beacon_cfg, 8'h00} : {saddr, afe_cfg, samples};

  ncu_packetizer u_pkt (
    .clk(sys_clk), .rst, .master(m_sbar),
    .start(m_sbar ? frame_start : (slot_start && have_samples)),
    .bytes(tx_bytes), .tx_bit(ncu_tx), .busy(pk_busy)
  );

  ncu_depacketizer u_depkt (
    .clk(sys_clk), .rst, .master(m_sbar), .rx_bit(ncu_rx),
    .sync_det, .frame_valid(pkt_valid), .frame_err(pkt_err), .bytes(rx_bytes)
  );

  // sensor: take the beacon byte that carries this node's address
  always_ff @(posedge sys_clk) begin
    if (rst) afe_cfg <= '0;
    else if (pkt_valid && !m_sbar) begin
      for (int b = 0; b < BEACON_BYTES; b++)
        if (rx_bytes[39 - 8*b -: ADDR_W] == saddr)
          afe_cfg <= rx_bytes[39 - 8*b - ADDR_W -: AFE_CFG_W];
    end
  end

  // coordinator: host interface
  coord_host_in u_hin (
    .clk(sys_clk), .rst, .clk_in, .data_in, .beacon_cfg, .cfg_update
  );

  coord_host_out u_hout (
    .clk(sys_clk), .rst, .load(pkt_valid && m_sbar), .record(rx_bytes),
    .data_out, .clk_out
  );

  // ---------------- sensor analog front-end control ----------------
  afe_controller #(.N_CH(N_CHANNELS), .BITS(SAMPLE_W)) u_afe (
    .clk(sys_clk), .rst, .start(frame_start && !m_sbar),
    .mux_sel(adc_mux_sel), .sar_start, .sar_done, .sar_data,
    .samples, .samples_valid
  );

  sar_logic #(.BITS(SAMPLE_W)) u_sar (
    .clk(sys_clk), .rst, .start(sar_start), .cmp(adc_cmp),
    .sample(adc_sample), .dac_code(adc_dac_code), .data(sar_data), .done(sar_done)
  );

  // a sensor sends only samples converted since it last (re)gained sync
  always_ff @(posedge sys_clk) begin
    if (rst || !synced)     have_samples <= 1'b0;
    else if (samples_valid) have_samples <= 1'b1;
  end

  // ---------------- OOK transmitter ----------------
  ook_transmitter u_tx (.lo_clk, .tx_in(tx_data), .tx_out(tx_out_ant));
endmodule
