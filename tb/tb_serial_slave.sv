// Self-checking testbench for serial_slave.
//
// The bench is the bus master: it drives SCL and SDA open-drain with its own
// bit timing (start, 28 header bits, acknowledge and data slots read on SCL
// high, stop) and answers the slave's memory reads from a model whose byte
// at address a is a*7+3, after a random delay of 1..4 clocks. Checks:
// decoded frame and broadcast flag, silence for other addresses, the
// acknowledge pattern, the streamed bytes, bus release, and that a restart
// in the middle of a frame is obeyed.
module tb_serial_slave;
  import bio_pkg::*;
  localparam int HALF = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic m_scl_oe = 1'b0, m_sda_oe = 1'b0, s_sda_oe;
  logic scl, sda;
  assign scl = !m_scl_oe;
  assign sda = !(m_sda_oe || s_sda_oe);

  logic [3:0] my_id = 4'd10;
  logic cmd_valid, is_bcast, rd_req, rd_valid;
  cmd_frame_t cmd_frame;
  logic [MEMADDR_W-1:0] rd_addr;
  logic [7:0] rd_data;

  serial_slave dut (
    .clk, .rst_n, .my_id, .scl_i(scl), .sda_i(sda), .sda_oe(s_sda_oe),
    .cmd_valid, .cmd_frame, .is_bcast, .rd_req, .rd_addr, .rd_valid, .rd_data
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // memory model
  always @(posedge clk) begin
    rd_valid <= 1'b0;
    if (rd_req) begin
      automatic logic [9:0] a = rd_addr;
      fork
        begin
          repeat ($urandom_range(1, 4)) @(posedge clk);
          rd_valid <= 1'b1;
          rd_data  <= 8'(a * 7 + 3);
        end
      join_none
    end
  end

  // command monitor
  int n_cmd = 0;
  cmd_frame_t last_cmd;
  logic last_bcast;
  always @(posedge clk) if (cmd_valid) begin
    n_cmd++;
    last_cmd   = cmd_frame;
    last_bcast = is_bcast;
  end

  task automatic half_wait();
    repeat (HALF) @(posedge clk);
  endtask

  task automatic bus_start();
    m_scl_oe <= 1'b0; m_sda_oe <= 1'b0; half_wait();
    m_sda_oe <= 1'b1; half_wait();
  endtask

  task automatic bus_stop();
    m_scl_oe <= 1'b1; m_sda_oe <= 1'b1; half_wait();
    m_scl_oe <= 1'b0; half_wait();
    m_sda_oe <= 1'b0; half_wait();
  endtask

  task automatic bit_out(input logic b);
    m_scl_oe <= 1'b1; @(posedge clk); m_sda_oe <= !b; repeat (HALF - 1) @(posedge clk);
    m_scl_oe <= 1'b0; half_wait();
  endtask

  task automatic bit_in(output logic b);
    m_scl_oe <= 1'b1; @(posedge clk); m_sda_oe <= 1'b0; repeat (HALF - 1) @(posedge clk);
    m_scl_oe <= 1'b0; half_wait();
    b = sda;
  endtask

  task automatic frame(input cmd_frame_t f, input int nbytes, input bit expect_ack,
                       input bit expect_cmd, input bit bcast);
    logic [27:0] h;
    logic [2:0]  ack;
    logic [7:0]  d;
    logic        b;
    int          n0;
    n0 = n_cmd;
    h = f;
    bus_start();
    for (int i = 27; i >= 0; i--) bit_out(h[i]);
    for (int i = 2; i >= 0; i--) begin bit_in(b); ack[i] = b; end
    check(ack == (expect_ack ? ACK_PATTERN : 3'b111), $sformatf("ack %b for addr %0d", ack, f.addr));
    for (int k = 0; k < nbytes; k++) begin
      for (int i = 7; i >= 0; i--) begin bit_in(b); d[i] = b; end
      check(d == 8'((int'(f.mem_start) + k) * 7 + 3), $sformatf("byte %0d = %h", k, d));
    end
    bit_in(b);
    check(b == 1'b1, "slave released SDA after its last bit");
    bus_stop();
    repeat (4) @(posedge clk);
    check((n_cmd - n0) == (expect_cmd ? 1 : 0), $sformatf("cmd count %0d", n_cmd - n0));
    if (expect_cmd) begin
      check(last_cmd == f, $sformatf("decoded frame %h exp %h", last_cmd, f));
      check(last_bcast == bcast, "broadcast flag");
    end
    check(s_sda_oe == 1'b0, "bus idle after stop");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    frame('{addr: 4'd10, mem_start: 10'd0, mem_stop: 10'd0, cmd: CMD_IDLE}, 0, 1, 1, 0);
    frame('{addr: 4'd11, mem_start: 10'd0, mem_stop: 10'd0, cmd: CMD_IDLE}, 0, 0, 0, 0);
    frame('{addr: 4'd0, mem_start: 10'd0, mem_stop: 10'd0, cmd: CMD_SYN_SAMPLE}, 0, 0, 1, 1);
    frame('{addr: 4'd10, mem_start: 10'd128, mem_stop: 10'd137, cmd: CMD_COLLECT}, 10, 1, 1, 0);
    frame('{addr: 4'd3, mem_start: 10'd0, mem_stop: 10'd5, cmd: CMD_COLLECT}, 0, 0, 0, 0);
    frame('{addr: 4'd10, mem_start: 10'd77, mem_stop: 10'd77, cmd: CMD_COLLECT}, 1, 1, 1, 0);
    // a restart in the middle of a header must resynchronise the slave
    bus_start();
    for (int i = 0; i < 9; i++) bit_out(1'b1);
    m_scl_oe <= 1'b1; half_wait();
    m_sda_oe <= 1'b0; half_wait();
    m_scl_oe <= 1'b0; half_wait();
    frame('{addr: 4'd10, mem_start: 10'd200, mem_stop: 10'd203, cmd: CMD_COLLECT}, 4, 1, 1, 0);
    frame('{addr: 4'd0, mem_start: 10'd0, mem_stop: 10'd0, cmd: CMD_SLEEP}, 0, 0, 1, 1);
    // an SE with an unconfigured address answers nothing individually
    my_id = 4'd15;
    frame('{addr: 4'd15, mem_start: 10'd0, mem_stop: 10'd0, cmd: CMD_IDLE}, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
