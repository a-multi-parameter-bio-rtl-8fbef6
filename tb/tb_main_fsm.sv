// Self-checking testbench for main_fsm with the address buffer.
//
// The bench stands in for the serial master (it answers each frame after a
// fixed bus time, acknowledging only addresses of SEs it declares present)
// and for the package controller (burst_ready with random delay). It logs
// every frame and checks: the power-up scan of addresses 1..14 with IDLE
// frames, the Syn-Sample broadcast after it, periodic collection of the
// present SEs in address order with alternating bank ranges, the collection
// and rescan periods, a resync only when an SE has joined, no collection
// from an SE that left, and the Sleep broadcast and wake-up sequence.
module tb_main_fsm;
  import bio_pkg::*;
  localparam int BANK = 16, CP = 4000, RP = 30000, BUS = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sleep_req = 0;
  logic m_start, m_busy = 0, m_done = 0, m_ack_valid = 0, m_ack_ok = 0;
  cmd_frame_t m_frame;
  logic [MEMADDR_W:0] m_rx_bytes;
  logic ab_scan_begin, ab_scan_wr, ab_scan_present, ab_next_valid, ab_new_se, ab_gone_se;
  logic [3:0] ab_scan_addr, ab_cur_addr, ab_next_addr, ab_n_active;
  logic [14:1] active;
  logic burst_req, burst_ready = 0, hdr_wr;
  logic [11:0] burst_len;
  logic [7:0] hdr_byte;
  logic ev_scan_done, ev_syn, ev_collect_done, ev_sleep;
  logic [3:0] state_o;

  main_fsm #(.SE_BANK_DEPTH(BANK), .COLLECT_PERIOD(CP), .RESCAN_PERIOD(RP), .PKG_DEPTH(1536)) dut (
    .clk, .rst_n, .sleep_req, .m_start, .m_frame, .m_rx_bytes, .m_busy, .m_done, .m_ack_valid, .m_ack_ok,
    .ab_scan_begin, .ab_scan_wr, .ab_scan_addr, .ab_scan_present, .ab_cur_addr, .ab_next_addr,
    .ab_next_valid, .ab_new_se, .burst_req, .burst_len, .burst_ready, .hdr_wr, .hdr_byte,
    .ev_scan_done, .ev_syn, .ev_collect_done, .ev_sleep, .state_o
  );
  addr_buffer u_ab (.clk, .rst_n, .scan_begin(ab_scan_begin), .scan_wr(ab_scan_wr),
    .scan_addr(ab_scan_addr), .scan_present(ab_scan_present), .cur_addr(ab_cur_addr),
    .next_addr(ab_next_addr), .next_valid(ab_next_valid), .active, .new_se(ab_new_se),
    .gone_se(ab_gone_se), .n_active(ab_n_active));

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  bit present [16];
  int cyc = 0;
  typedef struct { int t; cmd_frame_t f; int rx; } log_t;
  log_t flog [$];
  int hdrs = 0;

  always @(posedge clk) begin
    cyc++;
    burst_ready <= burst_req && ($urandom_range(0, 3) == 0);
    if (hdr_wr) hdrs++;
    if (m_start) begin
      automatic cmd_frame_t f = m_frame;
      automatic int rx = int'(m_rx_bytes);
      flog.push_back('{cyc, f, rx});
      m_busy <= 1;
      fork begin
        repeat (BUS) @(posedge clk);
        m_ack_valid <= 1;
        m_ack_ok <= (f.addr != 0) && present[f.addr];
        @(posedge clk);
        m_ack_valid <= 0;
        repeat (BUS) @(posedge clk);
        m_done <= 1;
        m_busy <= 0;
        @(posedge clk);
        m_done <= 0;
      end join_none
    end
  end

  // check a scan starting at flog[i]; returns the index after it
  function automatic int check_scan(int i);
    for (int a = 1; a <= 14; a++) begin
      check(i < flog.size() && flog[i].f.addr == 4'(a) && flog[i].f.cmd == CMD_IDLE && flog[i].rx == 0,
            $sformatf("scan frame %0d", a));
      i++;
    end
    return i;
  endfunction

  function automatic int check_collect(int i, bit bank, output int t0);
    t0 = (i < flog.size()) ? flog[i].t : -1;
    for (int a = 1; a <= 14; a++) if (present[a]) begin
      check(i < flog.size() && flog[i].f.addr == 4'(a) && flog[i].f.cmd == CMD_COLLECT &&
            flog[i].f.mem_start == 10'(bank * BANK) && flog[i].f.mem_stop == 10'(bank * BANK + BANK - 1) &&
            flog[i].rx == BANK, $sformatf("collect frame for SE %0d bank %0d", a, bank));
      i++;
    end
    return i;
  endfunction

  int i, t_syn, t_col, t_prev;
  bit bank;
  initial begin
    foreach (present[a]) present[a] = 0;
    present[2] = 1; present[5] = 1; present[9] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // power-up scan, sync, three collections
    wait (flog.size() >= 14 + 1 + 3 * 3);
    i = check_scan(0);
    check(flog[i].f.addr == BCAST_ADDR && flog[i].f.cmd == CMD_SYN_SAMPLE, "Syn-Sample after the scan");
    check(active == 14'b00_0001_0001_0010, $sformatf("address buffer %b", active));
    t_syn = flog[i].t;
    i++;
    bank = 0;
    t_prev = t_syn;
    for (int k = 0; k < 3; k++) begin
      i = check_collect(i, bank, t_col);
      check(t_col - t_prev >= CP - 100 && t_col - t_prev <= CP + 300, $sformatf("collection interval %0d", t_col - t_prev));
      t_prev = t_col;
      bank = !bank;
    end
    wait (hdrs >= 9);
    check(hdrs == 9, "one header per acknowledged burst");
    // an SE joins and one leaves before the rescan
    present[12] = 1;
    present[5] = 0;
    wait (flog.size() > i + 20 && flog[flog.size()-1].f.cmd == CMD_SYN_SAMPLE || cyc > RP + 20000);
    begin
      int s;
      s = -1;
      for (int k = i; k < flog.size(); k++) if (flog[k].f.cmd == CMD_IDLE && flog[k].f.addr == 1) begin s = k; break; end
      check(s > 0, "rescan happened");
      if (s > 0) begin
        check(flog[s].t >= RP && flog[s].t <= RP + t_syn + 2000, $sformatf("rescan at %0d", flog[s].t));
        i = check_scan(s);
        check(i < flog.size() && flog[i].f.cmd == CMD_SYN_SAMPLE, "Syn-Sample resent after an SE joined");
        i++;
      end
    end
    check(active == 14'b00_1001_0000_0010, $sformatf("address buffer after rescan %b", active));
    wait (flog.size() >= i + 3);
    i = check_collect(i, 0, t_col);
    // rescan with no change: no Syn-Sample
    wait (cyc > 2 * RP + 30000);
    begin
      int s, nsyn;
      s = -1;
      nsyn = 0;
      for (int k = i; k < flog.size(); k++) begin
        if (flog[k].f.cmd == CMD_IDLE && flog[k].f.addr == 1 && s < 0) s = k;
        if (flog[k].f.cmd == CMD_SYN_SAMPLE) nsyn++;
      end
      check(s > 0, "second rescan happened");
      check(nsyn == 0, "no resync when no SE joined");
    end
    // sleep and wake
    sleep_req = 1;
    wait (ev_sleep);
    check(flog[flog.size()-1].f.addr == BCAST_ADDR && flog[flog.size()-1].f.cmd == CMD_SLEEP, "Sleep broadcast");
    i = flog.size();
    repeat (3 * CP) @(posedge clk);
    check(flog.size() == i, "silent while asleep");
    sleep_req = 0;
    wait (flog.size() >= i + 15);
    i = check_scan(i);
    check(flog[i].f.cmd == CMD_SYN_SAMPLE, "wake-up resynchronises");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
