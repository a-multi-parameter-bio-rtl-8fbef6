// Self-checking testbench for the sar_adc_analog behavioural model: input
// selection (six inputs and the reference), track and hold, the comparator
// threshold at dac/256 * 0.8 V, and sleep.
module tb_sar_adc_analog;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  real vin [6];
  logic [2:0] sel = 0;
  logic sample = 0, sleep = 0, comp;
  logic [7:0] dac = 0;
  int checks = 0, failures = 0;

  sar_adc_analog dut (.clk, .vin, .sel, .sample, .sleep, .dac, .comp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 6; i++) vin[i] = 0.1 * real'(i) + 0.05;
    for (int s = 0; s < 8; s++) begin
      real v;
      v = (s < 6) ? 0.1 * real'(s) + 0.05 : 0.8;
      sel = 3'(s);
      sample = 1;
      @(negedge clk);
      sample = 0;
      vin[0] = 0.7;   // changes after the hold must not matter
      for (int c = 0; c < 256; c += 5) begin
        dac = 8'(c);
        #1;
        check(comp == (v >= 0.8 * real'(c) / 256.0), $sformatf("sel %0d dac %0d comp %b", s, c, comp));
      end
      vin[0] = 0.05;
    end
    sleep = 1;
    dac = 0;
    #1;
    check(!comp, "comparator off in sleep");
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
