// Self-checking testbench for addr_buffer: random scans against a reference
// set, checking the presence mask, new/gone detection against the previous
// scan, the active count and the next-address search from every start point.
module tb_addr_buffer;
  import bio_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic scan_begin = 0, scan_wr = 0, scan_present = 0;
  logic [3:0] scan_addr = 0, cur_addr = 0, next_addr, n_active;
  logic next_valid, new_se, gone_se;
  logic [14:1] active;
  int checks = 0, failures = 0;

  addr_buffer dut (.clk, .rst_n, .scan_begin, .scan_wr, .scan_addr, .scan_present,
    .cur_addr, .next_addr, .next_valid, .active, .new_se, .gone_se, .n_active);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [14:1] ref_set, prev_set;
  initial begin
    ref_set = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(active == '0 && n_active == 0 && !next_valid, "empty after reset");
    for (int s = 0; s < 30; s++) begin
      prev_set = ref_set;
      scan_begin = 1;
      @(negedge clk);
      scan_begin = 0;
      for (int a = 1; a <= 15; a++) begin
        automatic bit p = ($urandom_range(0, 2) == 0) ? !ref_set[a > 14 ? 14 : a] : ref_set[a > 14 ? 14 : a];
        if (s == 0) p = (a == 3 || a == 9);
        scan_wr = 1; scan_addr = 4'(a); scan_present = p;
        @(negedge clk);
        scan_wr = 0;
        if (a <= 14) ref_set[a] = p;
      end
      check(active == ref_set, $sformatf("scan %0d mask %b exp %b", s, active, ref_set));
      check(new_se == |(ref_set & ~prev_set), "new SE detection");
      check(gone_se == |(prev_set & ~ref_set), "departed SE detection");
      check(n_active == 4'($countones(ref_set)), "active count");
      for (int c = 0; c < 16; c++) begin
        int exp_a;
        exp_a = 0;
        for (int a = 14; a >= 1; a--) if (ref_set[a] && a > c) exp_a = a;
        cur_addr = 4'(c);
        #1;
        check(next_valid == (exp_a != 0) && (exp_a == 0 || next_addr == 4'(exp_a)),
              $sformatf("next after %0d: %0d/%b exp %0d", c, next_addr, next_valid, exp_a));
      end
      @(negedge clk);
    end
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
