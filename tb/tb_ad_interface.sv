// Self-checking testbench for ad_interface: ADC clock enable period
// (ADC_CLK_DIV clocks, 100 kHz from 1 MHz), sleep while acquisition is off,
// sample hand-over with the right code, and the restart pulse realigning the
// divider.
module tb_ad_interface;
  localparam int DIV = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic acq_en = 0, restart = 0, adc_ce, adc_sleep, adc_done = 0, sample_valid;
  logic [7:0] adc_code = 0, sample;
  logic [15:0] sample_cnt;
  int checks = 0, failures = 0;

  ad_interface #(.ADC_CLK_DIV(DIV)) dut (
    .clk, .rst_n, .acq_en, .restart, .adc_ce, .adc_sleep, .adc_done, .adc_code,
    .sample_valid, .sample, .sample_cnt
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, last_ce = -1, n_ce = 0;
  always @(posedge clk) begin
    cyc++;
    if (adc_ce) begin
      if (last_ce >= 0) check(cyc - last_ce == DIV, $sformatf("ce period %0d", cyc - last_ce));
      last_ce = cyc;
      n_ce++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);
    check(adc_sleep && n_ce == 0, "ADC asleep and unclocked while acquisition off");
    acq_en = 1;
    @(negedge clk);
    check(!adc_sleep, "ADC awake");
    repeat (100) @(negedge clk);
    check(n_ce >= 9, $sformatf("ce pulses %0d", n_ce));
    for (int i = 0; i < 20; i++) begin
      adc_code = 8'($urandom);
      adc_done = 1;
      @(negedge clk);
      adc_done = 0;
      check(sample_valid && sample == adc_code, $sformatf("sample %h exp %h", sample, adc_code));
      @(negedge clk);
      check(!sample_valid, "sample_valid is one clock");
      repeat ($urandom_range(1, 20)) @(negedge clk);
    end
    check(sample_cnt == 16'd20, $sformatf("sample count %0d", sample_cnt));
    // restart: sleep one clock, then the divider starts from zero
    restart = 1;
    @(negedge clk);
    check(adc_sleep, "restart puts the ADC to sleep for a clock");
    restart = 0;
    last_ce = -1;
    begin
      int t0;
      t0 = cyc;
      @(posedge adc_ce);
      check(cyc - t0 == DIV, $sformatf("first ce %0d clocks after restart", cyc - t0));
    end
    acq_en = 0;
    adc_done = 1;
    @(negedge clk);
    adc_done = 0;
    check(!sample_valid, "no sample taken while off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
