// End-to-end testbench of the Brain-ASNET SoC at its default parameters: one
// chip configured as coordinator and four as sensor nodes (addresses 0..3),
// each with its own 44 MHz crystal clock (same frequency, phase shifted by
// 2.3 ns per node) and released from reset at different times, so their
// system clocks run at different, fractional phase offsets. The RF
// link is modelled as an ideal shared on-off channel: the air carries a '1'
// while any node's transmitter is on, and every receiver outputs the air.
// Sensor 3 runs with its transceiver bypassed and talks through its test pins.
//
// The run goes through: sensors powered on before and after the coordinator,
// synchronisation of all sensors, sample transport to the host (DATAout /
// CLKout) checked against the analog levels each sensor converted, a new
// beacon configuration sent from the host (DATAin / CLKin) and applied by
// address, a bit error in a sensor packet (rejected by the coordinator's
// CRC), a bit error in a beacon (rejected by every sensor, which nevertheless
// stays in sync and keeps its configuration), a sensor that misses
// beacons while still hearing other sensors (watchdog, no false sync on
// sensor SYNC, resync), a silent coordinator (every sensor's watchdog, resync),
// a switch of all chips to the divide-by-32 clock, and the coordinator's
// separated-transceiver test mode. Each of these is counted and must happen.
// Frame timing is checked from the host records: one record per sensor per
// 317-bit frame, i.e. every 317 x 16 (or x 32) crystal periods.
`timescale 1ns/1ps
module tb_brain_asnet_soc;
  import brain_asnet_pkg::*;
  localparam int  NS = 4;            // sensors 0..3, node 4 = coordinator
  localparam int  C  = 4;
  localparam real TX = 22.728;       // crystal period (ns), 44 MHz
  localparam int  F16 = 317 * 16;    // crystal periods per time frame

  logic xtal = 0;
  always #(TX / 2) xtal = ~xtal;

  // each chip has its own crystal: same frequency, phase shifted by a
  // fraction of a period, so no two chips ever clock in the same instant
  logic xtal_n [NS+1];
  for (genvar n = 0; n <= NS; n++) begin : g_xtal
    assign #(2.3 * n) xtal_n[n] = xtal;
  end

  logic        por [NS+1];
  logic        freq_div32 = 0;
  logic        trx_indp_c = 0, txin_c = 0;
  logic        tx_data [NS+1], tx_out_ant [NS+1], txo [NS+1], txo_oe [NS+1];
  logic        rxo [NS+1], rxo_oe [NS+1];
  logic        data_out, clk_out;
  logic        data_in = 0, clk_in = 0;
  logic [4:0]  afe_cfg [NS+1];
  logic [1:0]  mux_sel [NS+1];
  logic        adc_sample [NS+1], adc_cmp [NS+1];
  logic [7:0]  dac [NS+1];
  logic        sys_clk [NS+1], synced [NS+1], pkt_valid [NS+1], pkt_err [NS+1], wdt_exp [NS+1];
  logic [31:0] round_codes [NS];
  logic        round_done [NS];
  logic        rx_node [NS+1];
  logic        rx_en [NS+1], tx_en [NS+1];

  // channel
  logic block_coord = 0, flip = 0, flip_s = 0;
  logic block_beacon_s2 = 0;
  logic air;
  always_comb begin
    air = (tx_data[C] && !block_coord);
    for (int s = 0; s < NS; s++) air |= (s == 3) ? txo[3] : tx_data[s];
  end
  always_comb begin
    for (int s = 0; s < NS; s++) rx_node[s] = air ^ flip_s;
    if (block_beacon_s2 && tx_data[C]) rx_node[2] = 1'b0;
    rx_node[C] = air ^ flip;
  end

  for (genvar n = 0; n <= NS; n++) begin : g_node
    brain_asnet_soc u_chip (
      .xtal_clk(xtal_n[n]), .ext_clk(1'b0), .int_xo_sel(1'b1), .freq_div32,
      .por(por[n]), .m_sbar(n == C), .saddr(3'(n == C ? 0 : n)),
      .rx_data(n == 3 ? 1'b0 : rx_node[n]), .tx_data(tx_data[n]), .tx_out_ant(tx_out_ant[n]),
      .rx_en(rx_en[n]), .tx_en(tx_en[n]),
      .trx_bypass(n == 3), .trx_indp(n == C ? trx_indp_c : 1'b0),
      .txin_ncuout_i(n == C ? txin_c : 1'b0), .txin_ncuout_o(txo[n]), .txin_ncuout_oe(txo_oe[n]),
      .rxout_ncuin_i(n == 3 ? rx_node[3] : 1'b0), .rxout_ncuin_o(rxo[n]), .rxout_ncuin_oe(rxo_oe[n]),
      .data_in(n == C ? data_in : 1'b0), .clk_in(n == C ? clk_in : 1'b0),
      .data_out(), .clk_out(),
      .afe_cfg(afe_cfg[n]), .adc_mux_sel(mux_sel[n]), .adc_sample(adc_sample[n]),
      .adc_dac_code(dac[n]), .adc_cmp(n == C ? 1'b0 : adc_cmp[n]),
      .sys_clk(sys_clk[n]), .synced(synced[n]), .pkt_valid(pkt_valid[n]),
      .pkt_err(pkt_err[n]), .wdt_expired(wdt_exp[n])
    );
    if (n < NS) begin : g_afe
      afe_analog_model #(.ID(n)) u_afe (
        .clk(sys_clk[n]), .mux_sel(mux_sel[n]), .sample(adc_sample[n]),
        .dac_code(dac[n]), .cmp(adc_cmp[n]),
        .round_codes(round_codes[n]), .round_done(round_done[n])
      );
    end
  end
  assign data_out = g_node[C].u_chip.data_out;
  assign clk_out  = g_node[C].u_chip.clk_out;

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int n_sync [NS], n_wdt [NS], n_rec [NS], n_per [NS];
  int n_pkt_err = 0, n_flip = 0, n_cfg_applied = 0, n_ignored = 0, n_tx_pulse = 0;
  int n_indp = 0, n_div32_rec = 0, n_rxo = 0;
  int n_duty [NS+1];
  int n_bcn_err [NS];
  logic [31:0] expq [NS][$];
  logic [4:0]  cfg_now [NS], cfg_prev [NS];
  realtime     last_rec [NS];
  int          period_x;              // crystal periods per frame now
  bit          per_ok = 1;            // record period checks enabled

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  for (genvar s = 0; s < NS; s++) begin : g_mon
    logic synced_q = 0;
    always @(posedge sys_clk[s]) begin
      if (synced[s] && !synced_q) n_sync[s]++;
      synced_q <= synced[s];
      if (wdt_exp[s]) n_wdt[s]++;
    end
    always @(posedge round_done[s]) expq[s].push_back(round_codes[s]);
    always @(posedge sys_clk[s]) if (pkt_err[s]) n_bcn_err[s]++;
  end

  // transceiver duty cycle: over every complete 317-cycle frame in which a
  // node stayed in sync, a sensor's receiver is on for the 57 beacon bit
  // times and its transmitter for its 65-bit packet; the coordinator sends
  // 57 bits and listens for the other 260 (sensor 3 uses the bypass pins)
  for (genvar n = 0; n <= NS; n++) begin : g_duty
    int cyc = 0, on_rx = 0, on_tx = 0;
    bit clean = 0;
    always @(posedge sys_clk[n]) begin
      if (g_node[n].u_chip.bit_cnt == 9'd0) begin
        if (clean && cyc == FRAME_LEN && n != 3 && !trx_indp_c) begin
          check(on_rx == (n == C ? FRAME_LEN - BEACON_LEN : BEACON_LEN),
                $sformatf("node %0d receiver on %0d bit times", n, on_rx));
          check(on_tx == (n == C ? BEACON_LEN : SENSOR_LEN),
                $sformatf("node %0d transmitter on %0d bit times", n, on_tx));
          n_duty[n]++;
        end
        cyc = 0; on_rx = 0; on_tx = 0; clean = synced[n] && !por[n];
      end
      cyc++;
      on_rx += int'(rx_en[n]);
      on_tx += int'(tx_en[n]);
      if (!synced[n] || (n < NS && !g_node[n].u_chip.have_samples)) clean = 0;
    end
  end

  always @(posedge sys_clk[C]) if (pkt_err[C]) n_pkt_err++;

  // a transmitter only radiates while its data bit is 1; a pulse edge in the
  // same instant as a data edge is a race, not a fault, so the data is looked
  // at just before and just after the edge
  logic txd_before;
  assign #0.002 txd_before = tx_data[C];
  always @(posedge tx_out_ant[C]) begin
    logic d0;
    realtime t;
    d0 = txd_before;
    t  = $realtime;
    n_tx_pulse++;
    #0.001;
    if (!d0 && !tx_data[C]) begin
      failures++; $display("FAIL carrier while tx_data = 0 at %0.3f", t);
    end
  end

  // sensor 2 hears other sensors' packets while out of sync and ignores them
  always @(posedge sys_clk[2])
    if (!synced[2] && block_beacon_s2 && (tx_data[0] || tx_data[1])) n_ignored++;

  // host side: deserialise 40-bit records from DATAout on CLKout
  logic [39:0] rec;
  int          nbits = 0;
  realtime     last_clk = 0;
  always @(posedge clk_out) begin
    if ($realtime - last_clk > 1500.0) nbits = 0;
    last_clk = $realtime;
    rec = {rec[38:0], data_out};
    nbits++;
    if (nbits == 40) begin
      int s;
      bit found;
      found = 0;
      nbits = 0;
      s = int'(rec[39:37]);
      checks++;
      if (s >= NS) begin failures++; $display("FAIL record with address %0d", s); end
      else begin
        while (expq[s].size() > 0 && !found) begin
          if (expq[s][0] == rec[31:0]) found = 1;
          void'(expq[s].pop_front());
        end
        if (!found) begin
          failures++; $display("FAIL sensor %0d samples %h not converted", s, rec[31:0]);
        end
        check(rec[36:32] == cfg_now[s] || rec[36:32] == cfg_prev[s], "record cfg field");
        n_rec[s]++;
        if (freq_div32) n_div32_rec++;
        if (per_ok && last_rec[s] > 0 && $realtime - last_rec[s] < 1.5 * period_x * TX) begin
          n_per[s]++;
          check($realtime - last_rec[s] > period_x * TX - 2.0 &&
                $realtime - last_rec[s] < period_x * TX + 2.0,
                $sformatf("sensor %0d record period %f", s, $realtime - last_rec[s]));
        end
        last_rec[s] = $realtime;
      end
    end
  end

  initial begin : watchdog
    #12ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_frames(input real f);
    repeat (int'(f * period_x)) @(posedge xtal);
  endtask

  task automatic send_cfg(input logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      data_in = w[i];
      repeat (40) @(posedge xtal);
      clk_in = 1;
      repeat (40) @(posedge xtal);
      clk_in = 0;
    end
  endtask

  initial begin
    logic [31:0] w;
    logic [4:0]  newcfg [NS];
    int          bcn_err0 [NS];
    period_x = F16;
    // power-on reset: a rising edge on POR sets the asynchronous resets
    foreach (por[i]) por[i] = 0;
    #1;
    foreach (por[i]) por[i] = 1;
    foreach (n_duty[i]) n_duty[i] = 0;
    foreach (n_bcn_err[i]) n_bcn_err[i] = 0;
    for (int s = 0; s < NS; s++) begin
      n_sync[s] = 0; n_wdt[s] = 0; n_rec[s] = 0; n_per[s] = 0;
      cfg_now[s] = 0; cfg_prev[s] = 0; last_rec[s] = 0;
    end
    // sensors 0 and 1 power on first, then the coordinator, then sensors 2 and 3
    repeat (50) @(posedge xtal);
    por[0] = 0; repeat (3) @(posedge xtal); por[1] = 0;
    wait_frames(2); repeat (5) @(posedge xtal);
    check(!synced[0] && !synced[1], "sensors wait for a coordinator");
    por[C] = 0;
    wait_frames(2); repeat (9) @(posedge xtal);
    por[2] = 0; repeat (6) @(posedge xtal); por[3] = 0;
    wait_frames(3);
    for (int s = 0; s < NS; s++) check(synced[s] === 1'b1, $sformatf("sensor %0d synced", s));

    // new beacon configuration, addresses in permuted slot order
    for (int s = 0; s < NS; s++) newcfg[s] = 5'($urandom_range(1, 31));
    w = {3'd2, newcfg[2], 3'd0, newcfg[0], 3'd3, newcfg[3], 3'd1, newcfg[1]};
    send_cfg(w);
    for (int s = 0; s < NS; s++) begin cfg_prev[s] = cfg_now[s]; cfg_now[s] = newcfg[s]; end
    wait_frames(2);
    for (int s = 0; s < NS; s++) begin
      check(afe_cfg[s] == newcfg[s], $sformatf("sensor %0d AFE configuration", s));
      if (afe_cfg[s] == newcfg[s]) n_cfg_applied++;
    end
    wait_frames(1);
    for (int s = 0; s < NS; s++) cfg_prev[s] = cfg_now[s];

    // one bit error on the air in a packet of sensor 1
    @(posedge g_node[1].u_chip.u_pkt.busy);
    repeat (30 * 16) @(posedge xtal);
    flip = 1; n_flip++;
    repeat (16) @(posedge xtal);
    flip = 0;
    wait_frames(2);
    check(n_pkt_err >= 1, "corrupted packet rejected");

    // one bit error in a beacon body: every sensor rejects the beacon but
    // stays in sync (the SYNC pattern was intact) and keeps its configuration
    for (int s = 0; s < NS; s++) bcn_err0[s] = n_bcn_err[s];
    @(posedge g_node[C].u_chip.u_pkt.busy);
    repeat (25 * 16) @(posedge xtal);
    flip_s = 1;
    repeat (16) @(posedge xtal);
    flip_s = 0;
    wait_frames(2);
    for (int s = 0; s < NS; s++) begin
      check(n_bcn_err[s] - bcn_err0[s] == 1,
            $sformatf("sensor %0d rejected %0d beacons", s, n_bcn_err[s] - bcn_err0[s]));
      check(synced[s], $sformatf("sensor %0d in sync after a bad beacon", s));
      check(afe_cfg[s] == cfg_now[s], $sformatf("sensor %0d configuration kept", s));
    end

    // sensor 2 misses the beacons but hears the other sensors
    block_beacon_s2 = 1;
    wait_frames(5);
    check(!synced[2], "sensor 2 lost sync");
    check(synced[0] && synced[1] && synced[3], "other sensors unaffected");
    block_beacon_s2 = 0;
    wait_frames(2);
    check(synced[2], "sensor 2 resynchronised");

    // the coordinator goes silent
    block_coord = 1;
    wait_frames(5);
    for (int s = 0; s < NS; s++) check(!synced[s], $sformatf("sensor %0d lost sync", s));
    block_coord = 0;
    wait_frames(2);
    for (int s = 0; s < NS; s++) check(synced[s], $sformatf("sensor %0d back in sync", s));
    wait_frames(2);

    // all chips switch to the divide-by-32 system clock
    @(posedge xtal);
    // The dividers switch at arbitrary counter states, so a chip may lose or
    // gain a system clock edge: a sensor can then be a bit off until the
    // next beacon realigns it. Record periods are checked again once every
    // sensor has been realigned and has sent a packet at the new timing.
    freq_div32 = 1;
    period_x = 2 * F16;
    per_ok = 0;
    wait_frames(3);
    for (int s = 0; s < NS; s++) last_rec[s] = 0;
    per_ok = 1;
    wait_frames(4);
    for (int s = 0; s < NS; s++) check(synced[s], $sformatf("sensor %0d synced at /32", s));

    // coordinator transceiver separated: the TX follows the test pin
    trx_indp_c = 1;
    repeat (20) @(posedge xtal);
    for (int k = 0; k < 40; k++) begin
      txin_c = k[2];
      repeat (3) @(posedge xtal);
      check(tx_data[C] == txin_c && rxo_oe[C] && !txo_oe[C], "separated transmitter input");
      check(rxo[C] == rx_node[C], "separated receiver output");
      n_indp++;
    end
    trx_indp_c = 0; txin_c = 0;

    // every mechanism must have happened
    for (int s = 0; s < NS; s++) begin
      check(n_sync[s] >= 2, $sformatf("sensor %0d synchronised %0d times", s, n_sync[s]));
      check(n_wdt[s] >= 1, $sformatf("sensor %0d watchdog expiries %0d", s, n_wdt[s]));
      check(n_rec[s] >= 15, $sformatf("sensor %0d records %0d", s, n_rec[s]));
      check(n_per[s] >= 5, $sformatf("sensor %0d period checks %0d", s, n_per[s]));
    end
    check(n_sync[2] >= 3, "sensor 2 resynchronised twice");
    check(n_flip == 1 && n_pkt_err >= 1, "bit error injected and caught");
    check(n_cfg_applied == NS, "configuration applied");
    check(n_ignored > 0, "sensor packets heard while out of sync");
    check(n_tx_pulse > 1000, "transmitter carrier pulses");
    check(n_div32_rec >= 4, "records at divide-by-32");
    check(n_indp > 0, "separated transceiver mode");
    for (int n = 0; n <= NS; n++)
      if (n != 3) check(n_duty[n] >= 10, $sformatf("node %0d duty-cycle frames %0d", n, n_duty[n]));
    $display("duty frames=%0d/%0d/%0d/%0d", n_duty[0], n_duty[1], n_duty[2], n_duty[C]);
    $display("sync=%0d/%0d/%0d/%0d wdt=%0d/%0d/%0d/%0d rec=%0d/%0d/%0d/%0d pkt_err=%0d ignored=%0d pulses=%0d div32rec=%0d",
             n_sync[0], n_sync[1], n_sync[2], n_sync[3], n_wdt[0], n_wdt[1], n_wdt[2], n_wdt[3],
             n_rec[0], n_rec[1], n_rec[2], n_rec[3], n_pkt_err, n_ignored, n_tx_pulse, n_div32_rec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
