// Self-checking testbench for sensing_fsm with its two sample RAMs.
//
// Drives broadcast commands and a stream of samples (value = running index),
// and checks: no storage before Syn-Sample, the ADC restart pulse and
// front-end/ADC enables per state, ping-pong filling of bank 0 then bank 1
// then bank 0 again with bank_full flags, read-back of both banks through
// the read port (including reads that collide with a write to the same
// bank), address wrap across the two banks, and Sleep.
module tb_sensing_fsm;
  import bio_pkg::*;
  localparam int D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, is_bcast = 0;
  cmd_frame_t cmd_frame = '0;
  logic acq_en, afe_en, adc_restart, sample_valid = 0;
  logic [7:0] sample = 0;
  logic rd_req = 0, rd_valid;
  logic [MEMADDR_W-1:0] rd_addr = 0;
  logic [7:0] rd_data, ram_wdata;
  logic [1:0] ram_en, ram_we, bank_full, state_o;
  logic [3:0] ram_addr [2];
  logic [7:0] ram_rdata [2];
  logic wr_bank;
  int checks = 0, failures = 0;

  sensing_fsm #(.BANK_DEPTH(D)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_frame, .is_bcast, .acq_en, .afe_en, .adc_restart,
    .sample_valid, .sample, .rd_req, .rd_addr, .rd_valid, .rd_data,
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata, .bank_full, .wr_bank, .state_o
  );
  for (genvar b = 0; b < 2; b++) begin : g_ram
    spram #(.DEPTH(D), .WIDTH(8)) u_ram (.clk, .en(ram_en[b]), .we(ram_we[b]),
      .addr(ram_addr[b]), .wdata(ram_wdata), .rdata(ram_rdata[b]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bcast(input cmd_e c);
    @(negedge clk);
    cmd_valid = 1; is_bcast = 1; cmd_frame = '{addr: 4'd0, mem_start: '0, mem_stop: '0, cmd: c};
    @(negedge clk);
    cmd_valid = 0; is_bcast = 0;
    @(negedge clk);
  endtask

  task automatic push(input logic [7:0] v);
    @(negedge clk);
    sample_valid = 1; sample = v;
    @(negedge clk);
    sample_valid = 0;
  endtask

  task automatic read(input int a, output logic [7:0] d);
    @(negedge clk);
    rd_req = 1; rd_addr = 10'(a);
    @(negedge clk);
    rd_req = 0;
    while (!rd_valid) @(negedge clk);
    d = rd_data;
  endtask

  logic [7:0] d;
  int restarts = 0;
  always @(posedge clk) if (adc_restart) restarts++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(afe_en && !acq_en, "standby after reset: front-end on, ADC off");
    push(8'hEE);      // ignored: not acquiring
    bcast(CMD_SYN_SAMPLE);
    check(acq_en && restarts == 1, "Syn-Sample starts acquisition with an ADC restart");
    for (int i = 0; i < D; i++) push(8'(i));
    check(bank_full == 2'b01 && wr_bank == 1'b1, $sformatf("after bank 0: full %b wr_bank %b", bank_full, wr_bank));
    for (int i = D; i < 2 * D; i++) push(8'(i));
    check(bank_full == 2'b10 && wr_bank == 1'b0, $sformatf("after bank 1: full %b", bank_full));
    for (int a = 0; a < 2 * D; a++) begin
      read(a, d);
      check(d == 8'(a), $sformatf("addr %0d read %h", a, d));
    end
    // a read into the bank being written, in the same clock as the write
    @(negedge clk);
    sample_valid = 1; sample = 8'hA5; rd_req = 1; rd_addr = 10'd3;
    @(negedge clk);
    sample_valid = 0; rd_req = 0;
    while (!rd_valid) @(negedge clk);
    check(rd_data == 8'd3, $sformatf("colliding read got %h", rd_data));
    read(0, d);
    check(d == 8'hA5, "bank 0 being refilled from address 0");
    read(2 * D + 5, d);  // upper address bits are ignored
    check(d == 8'd5, "address wraps over the two banks");
    check(bank_full == 2'b10, "refilling bank 0 clears nothing of bank 1");
    // Syn-Sample again restarts storage at 0
    bcast(CMD_SYN_SAMPLE);
    check(restarts == 2 && bank_full == 2'b00 && wr_bank == 0, "resync clears the buffer state");
    push(8'h77);
    read(0, d);
    check(d == 8'h77, "storage restarts at address 0");
    // an addressed (non-broadcast) command does not change the state
    @(negedge clk);
    cmd_valid = 1; is_bcast = 0; cmd_frame = '{addr: 4'd5, mem_start: '0, mem_stop: '0, cmd: CMD_SLEEP};
    @(negedge clk);
    cmd_valid = 0;
    check(acq_en, "individual command does not sleep");
    bcast(CMD_SLEEP);
    check(!acq_en && !afe_en, "sleep turns front-end and ADC off");
    push(8'h99);
    read(1, d);
    check(d != 8'h99, "no storage while asleep");
    bcast(CMD_SYN_SAMPLE);
    check(acq_en && afe_en, "Syn-Sample wakes the SE");
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
