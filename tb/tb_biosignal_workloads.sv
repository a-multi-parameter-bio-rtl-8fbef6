// Workload testbench: the three recording set-ups the sensor is used for,
// run through the whole Sensing-Electrode signal chain (front-end model,
// ADC, A/D interface) at default parameters.
//
// One Main-Electrode and three Sensing-Electrodes share the bus; the ME's
// scan and Syn-Sample start the three ADCs together. Each SE converts its
// front-end output (adc_sel = 4) at the gain and bandwidth code nearest the
// set-up:
//   SE 1, ECG: 55 dB wanted, gain code 2 (56.2 dB), 260 Hz;  10 Hz, 0.4 mV
//   SE 2, EMG: 55 dB wanted, gain code 2 (56.2 dB), 1.5 kHz; 150 Hz, 0.4 mV
//   SE 3, EEG: 61 dB wanted, gain code 4 (60.8 dB), 80 Hz;   10 Hz, 50 uV
// The test tones are sines of the stated amplitude; the bench does not model
// real ECG, EMG or EEG waveforms. After 0.1 s of settling it records 0.2 s of
// samples from each SE and compares:
//   - the code amplitude, (max - min)/2, with
//     a * 7.5 * 12.5 * (2 + k*17/7) * |H(f)| * 256 / 0.8, where H is a
//     0.3 Hz first-order high-pass times a first-order low-pass at the
//     bandwidth setting (within 8 % + 1 code);
//   - the mean code with mid-scale, 127.5 for a quantiser that rounds down,
//     within 1 code + 4 % of the amplitude: a sine switched on at t = 0
//     leaves a decaying offset of about a*0.3/f behind the 0.3 Hz
//     high-pass, which has not died out after 0.3 s;
//   - the sample rate, 3.33 kS/s (300 clocks per sample), and that no code
//     reaches 0 or 255 (no clipping).
module tb_biosignal_workloads;
  import bio_pkg::*;
  localparam int NSE = 3;
  localparam real PI = 3.14159265358979;
  localparam int      GAIN [NSE] = '{2, 2, 4};
  localparam int      BW   [NSE] = '{1, 3, 0};
  localparam real     FREQ [NSE] = '{10.0, 150.0, 10.0};
  localparam real     AMP  [NSE] = '{0.4e-3, 0.4e-3, 50.0e-6};
  localparam real     FC   [4]   = '{80.0, 260.0, 400.0, 1500.0};

  logic clk = 1'b0;
  always #500 clk = ~clk;
  logic rst_n = 1;              // falls at 1 ns: a real reset edge for the asynchronous resets
  logic scl, sda;
  logic [NSE:0] scl_oe, sda_oe;
  assign scl = !(|scl_oe);
  assign sda = !(|sda_oe);
  real vzero [6];
  real vin_se [NSE];
  logic tx_valid;
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
    .scl_oe(scl_oe[NSE]), .sda_oe(sda_oe[NSE]), .tx_valid, .tx_data, .tx_ready(1'b1),
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
      .clk, .rst_n, .mode(1'b0), .se_id(4'(s + 1)), .gain_sel(3'(GAIN[s])), .bw_sel(2'(BW[s])),
      .adc_sel(3'd4), .vin(vin_se[s]), .vref(0.6), .aux_in(vzero), .sleep_req(1'b0),
      .scl_i(scl), .sda_i(sda), .scl_oe(scl_oe[s]), .sda_oe(sda_oe[s]),
      .tx_valid(se_tx_valid[s]), .tx_data(se_tx_data[s]), .tx_ready(1'b0),
      .active_se(se_active[s]), .bank_full(se_bf[s])
    );
    assign p_svalid[s] = u_se.u_core.u_sense.sample_valid;
    assign p_sample[s] = u_se.u_core.u_sense.sample;
  end

  // electrode potentials: a sine around the 0.6 V reference, updated every clock
  int cyc = 0;
  always @(negedge clk) begin
    for (int s = 0; s < NSE; s++)
      vin_se[s] = 0.6 + AMP[s] * $sin(2.0 * PI * FREQ[s] * real'(cyc) * 1.0e-6);
  end

  int first_t [NSE], last_t [NSE], n_rec [NSE], n_bad_period [NSE], n_clip [NSE];
  int cmin [NSE], cmax [NSE];
  real csum [NSE];
  int rec_from = -1, rec_to = -1;

  always @(posedge clk) begin
    cyc++;
    for (int s = 0; s < NSE; s++) if (p_svalid[s]) begin
      if (first_t[s] < 0) first_t[s] = cyc;
      else if (cyc - last_t[s] != 300) n_bad_period[s]++;
      last_t[s] = cyc;
      if (rec_from > 0 && cyc >= rec_from && cyc < rec_to) begin
        n_rec[s]++;
        csum[s] += real'(p_sample[s]);
        if (int'(p_sample[s]) < cmin[s]) cmin[s] = int'(p_sample[s]);
        if (int'(p_sample[s]) > cmax[s]) cmax[s] = int'(p_sample[s]);
        if (p_sample[s] == 8'd0 || p_sample[s] == 8'd255) n_clip[s]++;
      end
    end
  end

  function automatic real expected_amp(input int s);
    real g, w, hp, lp;
    g  = 7.5 * 12.5 * (2.0 + real'(GAIN[s]) * 17.0 / 7.0);
    w  = FREQ[s];
    hp = (w / 0.3) / $sqrt(1.0 + (w / 0.3) * (w / 0.3));
    lp = 1.0 / $sqrt(1.0 + (w / FC[BW[s]]) * (w / FC[BW[s]]));
    return AMP[s] * g * hp * lp * 256.0 / 0.8;
  endfunction

  real amp, exp_amp, mean;
  initial begin
    vzero = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
    for (int s = 0; s < NSE; s++) begin
      vin_se[s] = 0.6;
      first_t[s] = -1; last_t[s] = 0; n_rec[s] = 0; n_bad_period[s] = 0; n_clip[s] = 0;
      cmin[s] = 1000; cmax[s] = -1; csum[s] = 0.0;
    end
    #1;
    rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (first_t[0] > 0);
    check(active_se == 14'b00_0000_0000_0111, $sformatf("scan found %b", active_se));
    check(first_t[1] == first_t[0] && first_t[2] == first_t[0], "the three SEs start sampling together");
    rec_from = cyc + 100_000;
    rec_to   = rec_from + 200_000;
    wait (cyc > rec_to + 10);
    for (int s = 0; s < NSE; s++) begin
      amp = real'(cmax[s] - cmin[s]) / 2.0;
      exp_amp = expected_amp(s);
      mean = csum[s] / real'(n_rec[s]);
      check(amp > 0.92 * exp_amp - 1.0 && amp < 1.08 * exp_amp + 1.0,
            $sformatf("SE %0d amplitude %0.1f codes, expected %0.1f", s + 1, amp, exp_amp));
      check(mean > 127.5 - 1.0 - 0.04 * exp_amp && mean < 127.5 + 1.0 + 0.04 * exp_amp, $sformatf("SE %0d mean code %0.1f", s + 1, mean));
      check(n_rec[s] >= 666 && n_rec[s] <= 667, $sformatf("SE %0d recorded %0d samples in 0.2 s", s + 1, n_rec[s]));
      check(n_bad_period[s] == 0, $sformatf("SE %0d: %0d sample intervals not 300 clocks", s + 1, n_bad_period[s]));
      check(n_clip[s] == 0, $sformatf("SE %0d: %0d clipped codes", s + 1, n_clip[s]));
      $display("SE %0d: %0.0f Hz, gain code %0d, bandwidth %0.0f Hz: amplitude %0.1f codes (expected %0.1f), mean %0.1f",
               s + 1, FREQ[s], GAIN[s], FC[BW[s]], amp, exp_amp, mean);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
