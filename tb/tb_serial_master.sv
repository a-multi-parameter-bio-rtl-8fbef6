// Self-checking testbench for serial_master.
//
// The bench plays the Sensing-Electrode with a bit-level model written
// independently of the RTL: it watches the wired-AND bus, detects the start
// condition, collects the 28 header bits on SCL rising edges, and, when the
// address is its own, drives the acknowledge pattern and a known byte
// sequence after SCL falling edges. Checks: header bits, bit time (2*HALF
// clocks), acknowledge decode (present and absent SE), received bytes and
// their count, the stop condition, and the frame length in clocks.
module tb_serial_master;
  import bio_pkg::*;
  localparam int unsigned HALF = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               start;
  cmd_frame_t         frame;
  logic [MEMADDR_W:0] rx_bytes;
  logic busy, done, ack_valid, ack_ok, rx_valid, scl_oe, sda_oe;
  logic [ACK_W-1:0] ack_bits;
  logic [7:0] rx_byte;
  logic scl, sda, tb_sda_oe;

  assign scl = !scl_oe;
  assign sda = !(sda_oe || tb_sda_oe);

  serial_master #(.HALF(HALF)) dut (
    .clk, .rst_n, .start, .frame, .rx_bytes, .busy, .done, .ack_valid, .ack_bits,
    .ack_ok, .rx_valid, .rx_byte, .scl_oe, .sda_oe, .sda_i(sda)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- behavioural slave on the bus ----
  localparam logic [3:0] MY_ADDR = 4'd9;
  logic        scl_q = 1'b1, sda_q = 1'b1;
  logic [27:0] got_hdr;
  int          nbits, starts = 0, stops = 0;
  int          tx_pos;          // index into the answer bit stream, -1 = silent
  logic [2:0]  ack_to_send = ACK_PATTERN;
  logic [7:0]  data_seed;
  int          last_rise, bit_period;

  function automatic logic answer_bit(int pos);
    if (pos < 3) return ack_to_send[2 - pos];
    return logic'(((data_seed + 8'((pos - 3) / 8) * 8'd37) >> (7 - ((pos - 3) % 8))) & 1);
  endfunction

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    scl_q <= scl;
    sda_q <= sda;
    if (scl && scl_q && sda_q && !sda) begin
      starts++;
      nbits  = 0;
      tx_pos = -1;
    end
    if (scl && scl_q && !sda_q && sda) stops++;
    if (scl && !scl_q) begin
      if (last_rise > 0) bit_period = cyc - last_rise;
      last_rise = cyc;
      if (nbits < 28) got_hdr = {got_hdr[26:0], sda};
      nbits++;
    end
    if (!scl && scl_q) begin
      if (nbits == 28 && got_hdr[27:24] == MY_ADDR) tx_pos = 0;
      else if (tx_pos >= 0) tx_pos++;
      if (tx_pos >= 0 && tx_pos < 3 + 8 * int'(rx_bytes)) tb_sda_oe <= !answer_bit(tx_pos);
      else tb_sda_oe <= 1'b0;
    end
  end

  // ---- one transaction ----
  task automatic run_frame(input logic [3:0] addr, input int nbytes, input logic [7:0] seed,
                           input bit expect_ack);
    int t0, t1, nrx;
    logic [7:0] exp;
    frame     = '{addr: addr, mem_start: 10'h2A5, mem_stop: 10'h15A, cmd: CMD_COLLECT};
    rx_bytes  = 11'(nbytes);
    data_seed = seed;
    @(posedge clk);
    start <= 1'b1;
    t0 = cyc;
    @(posedge clk);
    start <= 1'b0;
    nrx = 0;
    while (!done) begin
      @(posedge clk);
      if (ack_valid) begin
        check(ack_ok == expect_ack, $sformatf("ack_ok=%0d for addr %0d", ack_ok, addr));
        check(ack_bits == (expect_ack ? ACK_PATTERN : 3'b111), $sformatf("ack bits %b", ack_bits));
      end
      if (rx_valid) begin
        exp = seed + 8'(nrx) * 8'd37;
        check(rx_byte == exp, $sformatf("byte %0d: got %h exp %h", nrx, rx_byte, exp));
        nrx++;
      end
    end
    t1 = cyc;
    check(got_hdr == 28'(frame), $sformatf("header %h exp %h", got_hdr, 28'(frame)));
    check(nrx == (expect_ack ? nbytes : 0), $sformatf("received %0d bytes", nrx));
    check(bit_period == 2 * HALF, $sformatf("bit period %0d", bit_period));
    // start (2*HALF) + 28 + 3 + 8n bits of 2*HALF + stop (3*HALF) + handshake clocks
    check((t1 - t0) == 2*HALF + (31 + (expect_ack ? 8*nbytes : 0)) * 2*HALF + 3*HALF + 2,
          $sformatf("frame length %0d clocks", t1 - t0));
    repeat (10) @(posedge clk);
    check(scl && sda, "bus released after frame");
  endtask

  initial begin
    tb_sda_oe = 1'b0;
    start = 1'b0;
    frame = '0;
    rx_bytes = '0;
    tx_pos = -1;
    last_rise = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    run_frame(MY_ADDR, 4, 8'h5C, 1'b1);
    run_frame(4'd3, 4, 8'h11, 1'b0);       // nobody answers
    run_frame(MY_ADDR, 0, 8'h00, 1'b1);    // ack only
    run_frame(MY_ADDR, 17, 8'hF0, 1'b1);
    check(starts == 4 && stops == 4, $sformatf("starts %0d stops %0d", starts, stops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
