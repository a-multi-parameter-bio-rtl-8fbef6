// Self-checking testbench for the afe_model behavioural model. Applies a
// 200 Hz differential sine of 0.2 mV amplitude (in band) and checks the
// output amplitude against the gain 7.5 * 12.5 * (2 + k*17/7) for all eight
// gain codes; applies a tone at each of the four cut-off frequencies (80,
// 260, 400, 1500 Hz) and checks the -3 dB amplitude (1/sqrt(2) of the
// in-band value); applies a tone far above the lowest bandwidth setting and
// checks that it is attenuated; applies a 0.2 mV step and checks that the
// 0.3 Hz high-pass lets it decay to exp(-2*pi*0.3*0.1) = 0.83 of its peak
// after 0.1 s; checks the common-mode rejection (equal inputs give VCM) and
// the rest level when disabled.
module tb_afe_model;
  logic clk = 1'b0, rst_n = 1'b0, en = 0;
  always #500 clk = ~clk;   // 1 MHz, DT = 1 us
  real vin = 0.0, vref = 0.0, vout;
  logic [2:0] gain_sel = 0;
  logic [1:0] bw_sel = 3;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  afe_model dut (.clk, .rst_n, .en, .vin, .vref, .gain_sel, .bw_sel, .vout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // runs n_settle + n_meas clocks of a sine and returns the output peak-to-peak / 2
  task automatic tone(input real f, input real a, input int n_settle, input int n_meas, output real amp);
    real mx, mn;
    mx = -1.0; mn = 10.0;
    for (int t = 0; t < n_settle + n_meas; t++) begin
      @(negedge clk);
      vin = 0.6 + a * $sin(2.0 * PI * f * real'(t) * 1.0e-6);
      if (t >= n_settle) begin
        if (vout > mx) mx = vout;
        if (vout < mn) mn = vout;
      end
    end
    amp = (mx - mn) / 2.0;
  endtask

  real amp, g, fc, peak;
  initial begin
    vref = 0.6;
    vin = 0.6;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(vout == 0.4, "rests at VCM while disabled");
    en = 1;
    repeat (100) @(negedge clk);
    check(vout > 0.399 && vout < 0.401, "common mode gives VCM");
    // all gains, 187.5 (45.5 dB) to 1781 (65 dB)
    for (int k = 0; k < 8; k++) begin
      gain_sel = 3'(k);
      tone(200.0, 0.2e-3, 15000, 10000, amp);
      g = 7.5 * 12.5 * (2.0 + real'(k) * 17.0 / 7.0);
      check(amp > 0.95 * 0.2e-3 * g && amp < 1.02 * 0.2e-3 * g, $sformatf("gain code %0d: %f V amplitude", k, amp));
    end
    // -3 dB at each cut-off frequency
    gain_sel = 0;
    for (int b = 0; b < 4; b++) begin
      bw_sel = 2'(b);
      fc = (b == 0) ? 80.0 : (b == 1) ? 260.0 : (b == 2) ? 400.0 : 1500.0;
      tone(fc, 0.2e-3, 20000, 20000, amp);
      check(amp > 0.65 * 0.2e-3 * 187.5 && amp < 0.76 * 0.2e-3 * 187.5,
            $sformatf("bandwidth code %0d: %f V at %0.0f Hz", b, amp, fc));
    end
    // 80 Hz bandwidth: a 1 kHz tone is attenuated by more than 8x
    gain_sel = 0;
    bw_sel = 0;
    tone(1000.0, 0.2e-3, 10000, 5000, amp);
    check(amp < 0.2e-3 * 187.5 / 8.0, $sformatf("1 kHz through 80 Hz setting: %f V", amp));
    bw_sel = 3;
    tone(1000.0, 0.2e-3, 10000, 5000, amp);
    check(amp > 0.2e-3 * 187.5 * 0.7, $sformatf("1 kHz through 1.5 kHz setting: %f V", amp));
    // 0.3 Hz high-pass: step response
    vin = 0.6;
    repeat (200_000) @(negedge clk);
    vin = 0.6002;
    repeat (5000) @(negedge clk);
    peak = vout - 0.4;
    check(peak > 0.95 * 0.2e-3 * 187.5 && peak < 1.02 * 0.2e-3 * 187.5, $sformatf("step peak %f V", peak));
    repeat (100_000) @(negedge clk);
    check((vout - 0.4) > 0.80 * peak && (vout - 0.4) < 0.86 * peak,
          $sformatf("after 0.1 s the step has decayed to %f of its peak", (vout - 0.4) / peak));
    en = 0;
    @(negedge clk);
    @(negedge clk);
    check(vout == 0.4, "disabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
