// Self-checking testbench for wireless_tx_if: fills a RAM with known bytes,
// starts a read-out of several lengths (including zero) and consumes the
// stream with random back-pressure, checking order, count, done and that
// each byte is held until taken.
module tb_wireless_tx_if;
  localparam int DEPTH = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, mem_en, tx_valid, tx_ready = 0;
  logic [6:0] count = 0;
  logic [5:0] mem_addr;
  logic [7:0] mem_rdata, tx_data;
  logic [7:0] mem [DEPTH];
  int checks = 0, failures = 0;

  wireless_tx_if #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .start, .count, .busy, .done,
    .mem_en, .mem_addr, .mem_rdata, .tx_valid, .tx_data, .tx_ready);

  always @(posedge clk) if (mem_en) mem_rdata <= mem[mem_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int n);
    int got;
    bit seen_done;
    got = 0;
    seen_done = 0;
    @(negedge clk);
    start = 1; count = 7'(n);
    @(negedge clk);
    start = 0;
    while (!seen_done) begin
      tx_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (done) seen_done = 1;
      if (tx_valid && tx_ready) begin
        check(tx_data == mem[got], $sformatf("byte %0d %h exp %h", got, tx_data, mem[got]));
        got++;
      end
      @(negedge clk);
    end
    check(got == n, $sformatf("sent %0d of %0d", got, n));
    check(!busy, "idle after done");
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(5);
    run(0);
    run(DEPTH);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
