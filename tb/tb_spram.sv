// Self-checking testbench for spram: random writes and reads against a
// reference array, checking the one-clock read latency and that rdata holds
// when the RAM is not enabled. Runs at the ME buffer size (1536 x 8).
module tb_spram;
  localparam int DEPTH = 1536;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en, we;
  logic [10:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [DEPTH];
  bit         written [DEPTH];
  int checks = 0, failures = 0;

  spram #(.DEPTH(DEPTH), .WIDTH(8)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 11'(i); wdata = 8'($urandom);
      ref_mem[i] = wdata;
      written[i] = 1;
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      addr = 11'($urandom_range(0, DEPTH - 1));
      en = 1;
      we = ($urandom_range(0, 3) == 0);
      wdata = 8'($urandom);
      if (we) ref_mem[addr] = wdata;
      else begin
        automatic logic [7:0] exp = ref_mem[addr];
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL: addr %0d got %h exp %h", addr, rdata, exp); end
        @(negedge clk);
        checks++;
        if (rdata !== exp) begin failures++; $display("FAIL: rdata did not hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
