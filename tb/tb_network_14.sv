// Workload testbench: the largest network, one Main-Electrode and all 14
// Sensing-Electrodes (addresses 1..14) on one 2-wire bus, every chip at its
// default parameters (1 MHz clock, 125 kbit/s bus, 3.3 kS/s, 128-byte banks,
// 0.1 s collection period, 1536-byte ME buffer).
//
// Each SE converts a DC level on an auxiliary ADC input chosen so that its
// code is 10 + 16*(address-1); the voltage for code c is (c + 0.5)/256 of
// the 0.8 V reference. The bench checks:
//   - the power-up scan finds all 14 SEs, each frame acknowledged, within
//     6 ms;
//   - after Syn-Sample all 14 SEs take their first sample on the same clock;
//   - the first collection round sends one COLLECT frame per SE, in address
//     order, for bank 0 (memory addresses 0..127);
//   - the ME buffer fills after 11 bursts of 1 + 128 bytes and is forwarded
//     byte for byte (headers and codes) before the 12th burst is stored;
//   - the length of one collection round against its bit count: 14 frames of
//     start + 28 + 3 + 1024 bits + stop at 8 clocks per bit, plus the flush
//     and per-frame gaps.
// It prints the round length next to the 100,000-clock collection period;
// with 14 SEs a round is longer than the period, so collections run back to
// back and each SE is read once every ~0.12 s.
module tb_network_14;
  import bio_pkg::*;
  localparam int NSE = 14;

  logic clk = 1'b0;
  always #500 clk = ~clk;
  logic rst_n = 1;              // falls at 1 ns: a real reset edge for the asynchronous resets
  logic scl, sda;
  logic [NSE:0] scl_oe, sda_oe;
  assign scl = !(|scl_oe);
  assign sda = !(|sda_oe);
  real aux_se [NSE][6];
  real vzero [6];
  logic tx_valid, tx_ready;
  logic [7:0] tx_data;
  logic [14:1] active_se;
  logic [1:0] bf_me;

  function automatic logic [7:0] code_of(input int addr);
    return 8'(10 + 16 * (addr - 1));
  endfunction

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  bio_asic_top u_me (
    .clk, .rst_n, .mode(1'b1), .se_id(4'd0), .gain_sel(3'd0), .bw_sel(2'd0), .adc_sel(3'd0),
    .vin(0.6), .vref(0.6), .aux_in(vzero), .sleep_req(1'b0), .scl_i(scl), .sda_i(sda),
    .scl_oe(scl_oe[NSE]), .sda_oe(sda_oe[NSE]), .tx_valid, .tx_data, .tx_ready,
    .active_se, .bank_full(bf_me)
  );

  logic se_tx_valid [NSE];
  logic [7:0] se_tx_data [NSE];
  logic [14:1] se_active [NSE];
  logic [1:0] se_bf [NSE];
  logic p_svalid [NSE];
  logic [7:0] p_sample [NSE];

  for (genvar s = 0; s < NSE; s++) begin : g_se
    bio_asic_top u_se (
      .clk, .rst_n, .mode(1'b0), .se_id(4'(s + 1)), .gain_sel(3'd0), .bw_sel(2'd0), .adc_sel(3'd0),
      .vin(0.6), .vref(0.6), .aux_in(aux_se[s]), .sleep_req(1'b0), .scl_i(scl), .sda_i(sda),
      .scl_oe(scl_oe[s]), .sda_oe(sda_oe[s]), .tx_valid(se_tx_valid[s]), .tx_data(se_tx_data[s]),
      .tx_ready(1'b0), .active_se(se_active[s]), .bank_full(se_bf[s])
    );
    assign p_svalid[s] = u_se.u_core.u_sense.sample_valid;
    assign p_sample[s] = u_se.u_core.u_sense.sample;
  end

  // ME internals observed: command frames and events
  logic       m_start, m_ack_valid, m_ack_ok, ev_scan_done, ev_syn, ev_collect_done;
  cmd_frame_t m_frame;
  assign m_start         = u_me.u_core.u_main.m_start;
  assign m_frame         = u_me.u_core.u_main.m_frame;
  assign m_ack_valid     = u_me.u_core.u_main.m_ack_valid;
  assign m_ack_ok        = u_me.u_core.u_main.m_ack_ok;
  assign ev_scan_done    = u_me.u_core.u_main.ev_scan_done;
  assign ev_syn          = u_me.u_core.u_main.ev_syn;
  assign ev_collect_done = u_me.u_core.u_main.ev_collect_done;

  int cyc = 0, scan_end_t = -1, syn_t = -1, n_scan_ack = 0;
  int col_start_t = -1, col_end_t = -1, n_col_frames = 0, n_rounds = 0;
  int n_pkt_bytes = 0, n_pkts = 0, n_stream = 0, first_flush_t = -1;
  int first_sample_t [NSE], n_samples [NSE];
  logic [7:0] hdr;

  always @(posedge clk) begin
    cyc++;
    if (ev_scan_done && scan_end_t < 0) scan_end_t = cyc;
    if (ev_syn && syn_t < 0) syn_t = cyc;
    if (scan_end_t < 0 && m_ack_valid && m_ack_ok) n_scan_ack++;
    if (m_start && m_frame.cmd == CMD_COLLECT && n_rounds == 0) begin
      if (col_start_t < 0) col_start_t = cyc;
      n_col_frames++;
      check(m_frame.addr == 4'(n_col_frames) && m_frame.mem_start == '0 && m_frame.mem_stop == 10'd127,
            $sformatf("collect frame %0d: addr %0d range %0d..%0d", n_col_frames, m_frame.addr,
                      m_frame.mem_start, m_frame.mem_stop));
    end
    if (ev_collect_done) begin
      if (n_rounds == 0) col_end_t = cyc;
      n_rounds++;
    end
    for (int s = 0; s < NSE; s++) if (p_svalid[s]) begin
      if (n_samples[s] == 0) first_sample_t[s] = cyc;
      if (n_samples[s] < 4)
        check(p_sample[s] == code_of(s + 1), $sformatf("SE %0d code %0d", s + 1, p_sample[s]));
      n_samples[s]++;
    end
    tx_ready <= ($urandom_range(0, 3) != 0);
    if (tx_valid && tx_ready) begin
      if (first_flush_t < 0) first_flush_t = cyc;
      n_stream++;
      if (n_pkt_bytes == 0) begin
        hdr = tx_data;
        check(hdr == {4'(n_pkts + 1), 4'b0000}, $sformatf("packet %0d header %h", n_pkts, hdr));
      end else begin
        check(tx_data == code_of(int'(hdr[7:4])), $sformatf("packet %0d byte %0d = %0d", n_pkts, n_pkt_bytes, tx_data));
      end
      n_pkt_bytes++;
      if (n_pkt_bytes == 129) begin
        n_pkt_bytes = 0;
        n_pkts++;
      end
    end
  end

  int lo, hi;
  initial begin
    for (int s = 0; s < NSE; s++) begin
      aux_se[s] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
      aux_se[s][0] = (real'(code_of(s + 1)) + 0.5) * 0.8 / 256.0;
      n_samples[s] = 0;
      first_sample_t[s] = -1;
    end
    vzero = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
    #1;
    rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (syn_t > 0);
    check(scan_end_t > 0 && scan_end_t < 6000, $sformatf("SE-Chain Scan of 14 SEs took %0d us", scan_end_t));
    check(active_se == '1, $sformatf("scan found %b", active_se));
    check(n_scan_ack == NSE, $sformatf("%0d scan frames acknowledged", n_scan_ack));
    wait (col_end_t > 0);
    repeat (10) @(posedge clk);
    for (int s = 1; s < NSE; s++)
      check(first_sample_t[s] == first_sample_t[0], $sformatf("SE %0d starts sampling with SE 1", s + 1));
    check(n_col_frames == NSE, $sformatf("%0d collect frames in the first round", n_col_frames));
    check(n_pkts == 11 && n_stream == 11 * 129, $sformatf("%0d packets, %0d bytes forwarded", n_pkts, n_stream));
    check(first_flush_t > col_start_t && first_flush_t < col_end_t, "ME buffer forwarded during the round");
    // bit budget of the round: 14 frames of (start + 28 + 3 + 1024 + stop) bits
    lo = NSE * (1 + 28 + 3 + 128 * 8 + 1) * 8;
    hi = lo + lo / 20 + 11 * 129 * 8;    // gaps between frames, and the flush
    check(col_end_t - col_start_t >= lo && col_end_t - col_start_t <= hi,
          $sformatf("round of %0d clocks, expected %0d..%0d", col_end_t - col_start_t, lo, hi));
    $display("scan %0d us; collection round %0d us against a %0d us period; %0d packets forwarded",
             scan_end_t, col_end_t - col_start_t, 100_000, n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
