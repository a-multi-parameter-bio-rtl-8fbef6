// Self-checking testbench for package_controller (DEPTH = 35 bytes here, so that a burst that fits only without its header byte occurs).
// Bursts of one header byte plus LEN data bytes are written; the bench keeps
// its own copy of the expected buffer and checks the SRAM writes, the
// burst_ready answer, the flush when the next burst would not fit (tx_count =
// fill level, flush count), that nothing is written while flushing, and that
// writing restarts at address 0 after tx_done.
module tb_package_controller;
  localparam int DEPTH = 35, LEN = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic burst_req = 0, burst_ready, hdr_wr = 0, data_valid = 0;
  logic [6:0] burst_len = 7'(LEN), tx_count, fill;
  logic [7:0] hdr_byte = 0, data_byte = 0, mem_wdata;
  logic mem_en, mem_we, tx_start, tx_done = 0, flushing;
  logic [5:0] mem_addr;
  logic [15:0] flush_cnt;
  logic [7:0] mem [DEPTH];
  int checks = 0, failures = 0;

  package_controller #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .burst_req, .burst_len, .burst_ready,
    .hdr_wr, .hdr_byte, .data_valid, .data_byte, .mem_en, .mem_we, .mem_addr, .mem_wdata,
    .tx_start, .tx_count, .tx_done, .flushing, .fill, .flush_cnt);

  always @(posedge clk) if (mem_en && mem_we) mem[mem_addr] <= mem_wdata;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_start = 0, last_count = -1;
  always @(posedge clk) if (tx_start) begin
    n_start++;
    last_count = int'(tx_count);
    fork begin
      repeat (20) @(posedge clk);
      check(flushing, "flushing held until tx_done");
      tx_done <= 1;
      @(posedge clk);
      tx_done <= 0;
    end join_none
  end

  int exp_fill = 0;
  task automatic burst(input int id);
    int waited;
    waited = 0;
    @(negedge clk);
    burst_req = 1;
    while (!burst_ready) begin @(negedge clk); waited++; end
    burst_req = 0;
    if (exp_fill + 1 + LEN > DEPTH) begin
      check(waited > 0 && last_count == exp_fill, $sformatf("flush of %0d bytes (tx_count %0d)", exp_fill, last_count));
      exp_fill = 0;
    end else check(waited == 0, "ready at once when the burst fits");
    check(fill == 7'(exp_fill), $sformatf("fill %0d exp %0d", fill, exp_fill));
    hdr_wr = 1; hdr_byte = 8'(id);
    @(negedge clk);
    hdr_wr = 0;
    for (int i = 0; i < LEN; i++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      data_valid = 1; data_byte = 8'(id * 16 + i);
      @(negedge clk);
      data_valid = 0;
    end
    for (int i = 0; i <= LEN; i++)
      check(mem[exp_fill + i] == ((i == 0) ? 8'(id) : 8'(id * 16 + i - 1)), $sformatf("burst %0d byte %0d", id, i));
    exp_fill += 1 + LEN;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 10; b++) burst(b);
    check(flush_cnt == 16'(n_start) && n_start == 3, $sformatf("flushes %0d", n_start));
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
