// Self-checking testbench for sar_logic. The bench models an ideal
// comparator (held input >= dac) and checks that every conversion returns
// floor(vin) for random 8-bit inputs and the end points, that a conversion
// takes exactly CONV_CYCLES ADC clocks (30 at a 100 kHz ADC clock: 3.3 kS/s),
// that the input is tracked only in the tracking phase, and that sleep
// stops conversions.
module tb_sar_logic;
  localparam int CONV = 30, DIV = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ce = 0, sleep = 1, comp, sample, done;
  logic [7:0] dac, code;
  real vin_code, held = 0.0;
  int checks = 0, failures = 0;

  sar_logic #(.N(8), .CONV_CYCLES(CONV)) dut (.clk, .rst_n, .ce, .sleep, .comp, .sample, .dac, .code, .done);

  int div = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    div = (div == DIV - 1) ? 0 : div + 1;
    ce <= (div == 0);
    if (sample) held = vin_code;
  end
  assign comp = (held >= real'(dac));

  task automatic convert(input real v, input int exp);
    int t0;
    vin_code = v;
    @(posedge done);
    // next conversion returns v
    t0 = cyc;
    @(posedge done);
    checks++;
    if (code !== 8'(exp)) begin failures++; $display("FAIL: vin %f code %0d exp %0d", v, code, exp); end
    checks++;
    if (cyc - t0 != CONV * DIV) begin failures++; $display("FAIL: conversion period %0d", cyc - t0); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    sleep = 0;
    convert(0.0, 0);
    convert(255.9, 255);
    convert(128.0, 128);
    convert(127.99, 127);
    for (int i = 0; i < 40; i++) begin
      automatic int c = $urandom_range(0, 255);
      convert(real'(c) + 0.5, c);
    end
    // sleep: no conversions
    sleep = 1;
    begin
      int n = 0;
      fork
        begin repeat (CONV * DIV * 3) @(posedge clk); end
        begin forever begin @(posedge done); n++; end end
      join_any
      disable fork;
      checks++;
      if (n != 0 || sample) begin failures++; $display("FAIL: converted during sleep"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
