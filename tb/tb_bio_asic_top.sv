// End-to-end testbench: a body-area network of four chips on one 2-wire bus.
//
// One chip is the Main-Electrode (mode = 1); three are Sensing-Electrodes
// with addresses 2, 5 and 9. SE 2 converts its front-end output (a 10 Hz
// 0.3 mV differential sine); SE 5 and SE 9 convert DC levels on auxiliary
// ADC inputs (0.3015 V and 0.5503 V, expected codes 96 and 176). SCL and SDA are
// wired-AND of all open-drain drivers. Parameters are reduced (64-sample
// banks, 200-byte ME buffer, periods scaled so that one collection period
// equals one bank fill time) to keep the run short.
//
// Scenario: SE 9 is held in reset during the power-up scan and joins later;
// SE 5 is removed later; the ME is put to sleep and woken. The bench keeps
// its own log of every SE's converted samples since its last Syn-Sample and
// predicts each packet of the ME's wireless stream from it (header
// {address, bank} followed by the k-th bank of samples since the sync).
// It checks the stream byte for byte, the simultaneous start of sampling in
// all SEs, the DC codes, the 6 ms scan time bound, and counts each mechanism:
// scan, Syn-Sample, resync on a joining SE, removal of a departed SE, ping-pong
// bank switch, collection, ME buffer flush, Sleep and wake-up, unanswered
// scan frames. A mechanism that never happened counts as a failure.
module tb_bio_asic_top;
  import bio_pkg::*;
  localparam int BANK = 64, DIV = 10, CONV = 30, PKG = 200;
  localparam int FILL = BANK * DIV * CONV;           // 19200 clocks
  localparam int RP = 100_000;
  localparam int NSE = 3;
  localparam logic [3:0] IDS [NSE] = '{4'd2, 4'd5, 4'd9};
  localparam logic [2:0] SELS [NSE] = '{3'd4, 3'd0, 3'd1};

  logic clk = 1'b0;
  always #500 clk = ~clk;       // 1 MHz
  logic me_rst_n = 1;          // falls at 1 ns: a real reset edge for the asynchronous resets
  logic se_rst_n [NSE];
  logic scl, sda;
  logic [NSE:0] scl_oe, sda_oe;
  assign scl = !(|scl_oe);
  assign sda = !(|sda_oe);

  real vin_se [NSE];
  real aux [6];
  logic sleep_req = 0, tx_valid, tx_ready;
  logic [7:0] tx_data;
  logic [14:1] active_se;
  logic [1:0] bank_full_me;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  real vzero [6];
  bio_asic_top #(.SE_BANK_DEPTH(BANK), .ADC_CLK_DIV(DIV), .CONV_CYCLES(CONV),
                 .COLLECT_PERIOD(FILL), .RESCAN_PERIOD(RP), .PKG_DEPTH(PKG)) u_me (
    .clk, .rst_n(me_rst_n), .mode(1'b1), .se_id(4'd0), .gain_sel(3'd0), .bw_sel(2'd0), .adc_sel(3'd0),
    .vin(0.6), .vref(0.6), .aux_in(vzero), .sleep_req, .scl_i(scl), .sda_i(sda),
    .scl_oe(scl_oe[NSE]), .sda_oe(sda_oe[NSE]), .tx_valid, .tx_data, .tx_ready,
    .active_se, .bank_full(bank_full_me)
  );

  logic [7:0] se_tx_data [NSE];
  logic se_tx_valid [NSE];
  logic [14:1] se_active [NSE];
  logic [1:0] se_bank_full [NSE];
  logic p_restart [NSE], p_svalid [NSE], p_bankend [NSE], p_off [NSE];
  logic [7:0] p_sample [NSE];

  for (genvar s = 0; s < NSE; s++) begin : g_se
    bio_asic_top #(.SE_BANK_DEPTH(BANK), .ADC_CLK_DIV(DIV), .CONV_CYCLES(CONV),
                   .COLLECT_PERIOD(FILL), .RESCAN_PERIOD(RP), .PKG_DEPTH(PKG)) u_se (
      .clk, .rst_n(se_rst_n[s]), .mode(1'b0), .se_id(IDS[s]), .gain_sel(3'd2), .bw_sel(2'd1),
      .adc_sel(SELS[s]), .vin(vin_se[s]), .vref(0.6), .aux_in(aux), .sleep_req(1'b0),
      .scl_i(scl), .sda_i(sda), .scl_oe(scl_oe[s]), .sda_oe(sda_oe[s]),
      .tx_valid(se_tx_valid[s]), .tx_data(se_tx_data[s]), .tx_ready(1'b0),
      .active_se(se_active[s]), .bank_full(se_bank_full[s])
    );
    // internal probes for the reference model
    assign p_restart[s] = u_se.u_core.u_sense.u_fsm.adc_restart;
    assign p_svalid[s]  = u_se.u_core.u_sense.sample_valid;
    assign p_sample[s]  = u_se.u_core.u_sense.sample;
    assign p_bankend[s] = u_se.u_core.u_sense.u_fsm.wr_go && (u_se.u_core.u_sense.u_fsm.wr_ptr == 6'(BANK - 1));
    assign p_off[s]     = !u_se.u_core.afe_en && u_se.u_core.adc_sleep;
  end

  // ---------------- reference model of the SEs' sample streams ----------------
  int cyc = 0;
  byte unsigned samples [NSE][$];
  int first_sample_t [NSE];
  int sync_t [NSE];
  int n_scan = 0, n_syn = 0, n_col = 0, n_flush = 0, n_sleep = 0, n_bankswitch = 0;
  int n_noack = 0, n_resync_join = 0, n_removed = 0, n_tx_bytes = 0, n_packets = 0;
  int hdr_count [16];
  byte unsigned exp_q [$];
  int scan_start_t, max_scan_t = 0;
  logic [14:1] prev_active = '0;

  always @(posedge clk) begin
    cyc++;
    for (int s = 0; s < NSE; s++) begin
      if (p_restart[s]) begin
        samples[s].delete();
        sync_t[s] = cyc;
        first_sample_t[s] = -1;
      end
      if (p_svalid[s]) begin
        samples[s].push_back(p_sample[s]);
        if (first_sample_t[s] < 0) first_sample_t[s] = cyc;
        if (SELS[s] == 3'd0) check(p_sample[s] == 8'd96, $sformatf("DC code on SE 5: %0d", p_sample[s]));
        if (SELS[s] == 3'd1) check(p_sample[s] == 8'd176, "DC code on SE 9");
      end
      if (p_bankend[s]) n_bankswitch++;
    end
    if (u_me.u_core.u_main.ev_scan_done) begin
      n_scan++;
      if (u_me.u_core.u_main.active != prev_active) begin
        if (|(prev_active & ~u_me.u_core.u_main.active)) n_removed++;
      end
      prev_active = u_me.u_core.u_main.active;
      if (cyc - scan_start_t > max_scan_t) max_scan_t = cyc - scan_start_t;
    end
    if (u_me.u_core.u_main.ab_scan_begin) scan_start_t = cyc;
    if (u_me.u_core.u_main.ev_syn) begin
      n_syn++;
      for (int a = 0; a < 16; a++) hdr_count[a] = 0;
    end
    if (u_me.u_core.u_main.ev_collect_done) n_col++;
    if (u_me.u_core.u_main.ev_sleep) n_sleep++;
    if (u_me.u_core.u_main.tx_start) n_flush++;
    if (u_me.u_core.u_main.m_ack_valid && !u_me.u_core.u_main.m_ack_ok) n_noack++;
    if (u_me.u_core.u_main.hdr_wr) begin
      automatic logic [7:0] h = u_me.u_core.u_main.hdr_byte;
      automatic int a = int'(h[7:4]);
      automatic int s = -1;
      automatic int k = hdr_count[a];
      for (int j = 0; j < NSE; j++) if (IDS[j] == 4'(a)) s = j;
      check(s >= 0, $sformatf("packet from unknown SE %0d", a));
      check(h[0] == 1'(k % 2), $sformatf("bank index of packet %0d from SE %0d", k, a));
      exp_q.push_back(h);
      if (s >= 0) begin
        check(samples[s].size() >= BANK * (k + 1), $sformatf("SE %0d bank %0d not full when collected (%0d samples)", a, k, samples[s].size()));
        for (int i = 0; i < BANK; i++)
          exp_q.push_back((BANK * k + i < samples[s].size()) ? samples[s][BANK * k + i] : 8'hxx);
      end
      hdr_count[a]++;
      n_packets++;
    end
  end

  // ---------------- wireless stream consumer ----------------
  always @(posedge clk) begin
    tx_ready <= ($urandom_range(0, 1) == 0);
    if (tx_valid && tx_ready) begin
      n_tx_bytes++;
      check(exp_q.size() > 0, "stream byte without a packet");
      if (exp_q.size() > 0) begin
        check(tx_data == exp_q[0], $sformatf("stream byte %0d: %h exp %h", n_tx_bytes, tx_data, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
  end

  // signal sources
  always @(posedge clk) begin
    vin_se[0] = 0.6 + 0.3e-3 * $sin(2.0 * 3.14159265 * 10.0 * real'(cyc) * 1.0e-6);
    vin_se[1] = 0.6;
    vin_se[2] = 0.6;
  end

  task automatic check_sync();
    // all SEs that were synchronised together must take their first sample on the same clock
    int t;
    t = -1;
    for (int s = 0; s < NSE; s++) if (se_rst_n[s]) begin
      if (t < 0) t = first_sample_t[s];
      check(first_sample_t[s] == t && t > 0, $sformatf("SE %0d first sample at %0d, expected %0d", IDS[s], first_sample_t[s], t));
    end
  endtask

  int syn_before;
  initial begin
    aux = '{0.3015, 0.5503, 0.1, 0.2, 0.0, 0.7};
    vzero = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
    foreach (se_rst_n[s]) se_rst_n[s] = 1'b1;
    #1;
    me_rst_n = 0;
    foreach (se_rst_n[s]) se_rst_n[s] = 1'b0;
    foreach (first_sample_t[s]) first_sample_t[s] = -1;
    for (int a = 0; a < 16; a++) hdr_count[a] = 0;
    repeat (5) @(posedge clk);
    me_rst_n = 1;
    se_rst_n[0] = 1;
    se_rst_n[1] = 1;          // SE 9 stays off: it joins later
    wait (n_syn == 1);
    check(active_se == 14'b00_0000_0001_0010, $sformatf("first scan found %b", active_se));
    repeat (FILL + 2000) @(posedge clk);
    check_sync();
    // SE 9 joins; the next rescan must find it and resynchronise everyone
    se_rst_n[2] = 1;
    syn_before = n_syn;
    wait (n_syn == syn_before + 1);
    n_resync_join++;
    check(active_se == 14'b00_0001_0001_0010, $sformatf("rescan found %b", active_se));
    repeat (FILL + 2000) @(posedge clk);
    check_sync();
    repeat (3 * FILL) @(posedge clk);
    // SE 5 leaves the network
    se_rst_n[1] = 0;
    wait (n_scan >= 4 && active_se == 14'b00_0001_0000_0010);
    check(n_syn == syn_before + 1, "no resync when an SE leaves");
    repeat (2 * FILL) @(posedge clk);
    // sleep and wake
    sleep_req = 1;
    wait (n_sleep == 1);
    repeat (20) @(posedge clk);
    check(p_off[0], "SE front-end and ADC off in sleep");
    repeat (3 * FILL) @(posedge clk);
    check(!u_me.u_core.u_main.m_busy, "bus silent while asleep");
    sleep_req = 0;
    syn_before = n_syn;
    wait (n_syn == syn_before + 1);
    repeat (3 * FILL) @(posedge clk);
    check_sync();
    wait (exp_q.size() == 0 || cyc > 2_000_000);
    // ---- mechanism counts ----
    $display("scans %0d syn %0d resync-on-join %0d removed %0d collections %0d packets %0d bank switches %0d flushes %0d stream bytes %0d sleep %0d unanswered %0d longest scan %0d clocks",
             n_scan, n_syn, n_resync_join, n_removed, n_col, n_packets, n_bankswitch, n_flush, n_tx_bytes, n_sleep, n_noack, max_scan_t);
    check(n_scan >= 4, "SE-Chain Scan");
    check(n_syn >= 3, "Syn-Sample broadcast");
    check(n_resync_join == 1, "resync on a joining SE");
    check(n_removed >= 1, "departed SE removed");
    check(n_col >= 5, "periodic collection");
    check(n_bankswitch >= 4, "ping-pong bank switch");
    check(n_flush >= 2, "ME buffer flush to the wireless interface");
    check(n_sleep == 1, "sleep broadcast");
    check(n_noack > 0, "unanswered scan frames");
    check(n_tx_bytes >= 2 * (BANK + 1), "wireless stream");
    check(max_scan_t < 6000, $sformatf("scan takes %0d us, within 6 ms", max_scan_t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
