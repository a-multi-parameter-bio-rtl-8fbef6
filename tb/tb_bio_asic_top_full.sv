// Full-size testbench: three chips at the default parameters (1 MHz clock,
// 125 kbit/s bus, 100 kHz ADC clock, 30 clocks per conversion = 3.3 kS/s,
// 128-byte sample banks, 0.1 s collection period, 5 s rescan period,
// 1536-byte ME buffer). One Main-Electrode and two Sensing-Electrodes
// (addresses 3 and 11) that convert DC levels on auxiliary ADC inputs, so
// every stored sample has a known code (96 and 176).
//
// Runs one complete operation: power-up scan (checked against the 6 ms
// bound), Syn-Sample, six 0.1 s collections, until the ME buffer is full and
// its contents have been forwarded on the wireless stream. Checks the scan
// result, the sampling period (300 clocks) and simultaneous start in both
// SEs, the collection period, the bus bit time, and every byte of the
// forwarded stream (11 packets of 1 header + 128 data bytes).
module tb_bio_asic_top_full;
  import bio_pkg::*;
  localparam logic [3:0] IDS [2] = '{4'd3, 4'd11};
  localparam logic [7:0] CODES [2] = '{8'd96, 8'd176};

  logic clk = 1'b0;
  always #500 clk = ~clk;
  logic rst_n = 1;             // falls at 1 ns: a real reset edge for the asynchronous resets
  logic scl, sda;
  logic [2:0] scl_oe, sda_oe;
  assign scl = !(|scl_oe);
  assign sda = !(|sda_oe);
  real aux [6], vzero [6];
  logic tx_valid, tx_ready;
  logic [7:0] tx_data;
  logic [14:1] active_se;
  logic [1:0] bf_me;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  bio_asic_top u_me (
    .clk, .rst_n, .mode(1'b1), .se_id(4'd0), .gain_sel(3'd0), .bw_sel(2'd0), .adc_sel(3'd0),
    .vin(0.6), .vref(0.6), .aux_in(vzero), .sleep_req(1'b0), .scl_i(scl), .sda_i(sda),
    .scl_oe(scl_oe[2]), .sda_oe(sda_oe[2]), .tx_valid, .tx_data, .tx_ready,
    .active_se, .bank_full(bf_me)
  );

  logic se_tx_valid [2];
  logic [7:0] se_tx_data [2];
  logic [14:1] se_active [2];
  logic [1:0] se_bf [2];
  logic p_svalid [2];
  logic [7:0] p_sample [2];

  for (genvar s = 0; s < 2; s++) begin : g_se
    bio_asic_top u_se (
      .clk, .rst_n, .mode(1'b0), .se_id(IDS[s]), .gain_sel(3'd0), .bw_sel(2'd0), .adc_sel(3'(s)),
      .vin(0.6), .vref(0.6), .aux_in(aux), .sleep_req(1'b0), .scl_i(scl), .sda_i(sda),
      .scl_oe(scl_oe[s]), .sda_oe(sda_oe[s]), .tx_valid(se_tx_valid[s]), .tx_data(se_tx_data[s]),
      .tx_ready(1'b0), .active_se(se_active[s]), .bank_full(se_bf[s])
    );
    assign p_svalid[s] = u_se.u_core.u_sense.sample_valid;
    assign p_sample[s] = u_se.u_core.u_sense.sample;
  end

  int cyc = 0, scan_end_t = -1, syn_t = -1, n_pkt_bytes = 0, n_pkts = 0, n_stream = 0;
  int last_sample_t [2], first_sample_t [2], n_samples [2];
  int col_t [$];
  int scl_rise_t = -1, bit_period = -1;
  logic scl_q = 1;
  logic [7:0] hdr;

  always @(posedge clk) begin
    cyc++;
    scl_q <= scl;
    if (scl && !scl_q) begin
      if (scl_rise_t > 0 && cyc - scl_rise_t < 20) bit_period = cyc - scl_rise_t;
      scl_rise_t = cyc;
    end
    if (u_me.u_core.u_main.ev_scan_done && scan_end_t < 0) scan_end_t = cyc;
    if (u_me.u_core.u_main.ev_syn) syn_t = cyc;
    if (u_me.u_core.u_main.ev_collect_done) col_t.push_back(cyc);
    for (int s = 0; s < 2; s++) if (p_svalid[s]) begin
      check(p_sample[s] == CODES[s], $sformatf("SE %0d code %0d", IDS[s], p_sample[s]));
      if (n_samples[s] == 0) first_sample_t[s] = cyc;
      else if (n_samples[s] < 50) check(cyc - last_sample_t[s] == 300, $sformatf("sample period %0d", cyc - last_sample_t[s]));
      last_sample_t[s] = cyc;
      n_samples[s]++;
    end
    tx_ready <= ($urandom_range(0, 3) != 0);
    if (tx_valid && tx_ready) begin
      n_stream++;
      if (n_pkt_bytes == 0) begin
        hdr = tx_data;
        check(hdr[7:4] == IDS[n_pkts % 2] && hdr[3:1] == 3'b000 && hdr[0] == 1'((n_pkts / 2) % 2),
              $sformatf("packet %0d header %h", n_pkts, hdr));
      end else begin
        check(tx_data == ((hdr[7:4] == IDS[0]) ? CODES[0] : CODES[1]), $sformatf("packet %0d byte %0d = %0d", n_pkts, n_pkt_bytes, tx_data));
      end
      n_pkt_bytes++;
      if (n_pkt_bytes == 129) begin
        n_pkt_bytes = 0;
        n_pkts++;
      end
    end
  end

  initial begin
    aux = '{0.3015, 0.5503, 0.0, 0.0, 0.0, 0.0};
    vzero = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
    n_samples = '{0, 0};
    #1;
    rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (syn_t > 0);
    check(scan_end_t > 0 && scan_end_t < 6000, $sformatf("SE-Chain Scan took %0d us", scan_end_t));
    check(active_se == 14'b00_0100_0000_0100, $sformatf("scan found %b", active_se));
    wait (n_pkts == 11);
    repeat (10) @(posedge clk);
    check(n_stream == 11 * 129, $sformatf("stream bytes %0d", n_stream));
    check(bit_period == 8, $sformatf("bus bit period %0d clocks", bit_period));
    check(first_sample_t[0] == first_sample_t[1], "both SEs start sampling on the same clock");
    check(col_t.size() >= 5, "collections");
    for (int k = 1; k < col_t.size(); k++)
      check(col_t[k] - col_t[k-1] == 100_000, $sformatf("collection period %0d", col_t[k] - col_t[k-1]));
    $display("scan %0d us, %0d collections, %0d packets, %0d stream bytes, %0d samples per SE",
             scan_end_t, col_t.size(), n_pkts, n_stream, n_samples[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
