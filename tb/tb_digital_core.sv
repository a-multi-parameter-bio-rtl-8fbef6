// Self-checking testbench for digital_core (and through it main_block and
// sensing_block). Two cores share a wired-AND bus; the bench plays the ADC
// of each: on every CONV-th ADC clock enable it returns a finished code that
// counts up from 0 after each wake-up, so the expected data are known.
// Part 1: core A is ME, core B is SE 7. Checks the role-dependent disabling
// (ME: ADC asleep and front-end off; SE: never drives SCL),
// the scan result, and the wireless stream: header {7, bank} then BANK
// consecutive codes. Part 2: the Mode pins are swapped at run time; core B
// now runs the network and must find core A as SE 7 and deliver its data.
module tb_digital_core;
  import bio_pkg::*;
  localparam int BANK = 16, DIV = 10, CONV = 30, PKG = 40;
  localparam int FILL = BANK * DIV * CONV;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic mode [2];
  logic scl_oe [2], sda_oe [2], adc_ce [2], adc_sleep [2], adc_done [2], afe_en [2];
  logic tx_valid [2], tx_ready [2];
  logic [7:0] adc_code [2], tx_data [2];
  logic [14:1] active_se [2];
  logic [1:0] bank_full [2];
  logic scl, sda;
  assign scl = !(scl_oe[0] || scl_oe[1]);
  assign sda = !(sda_oe[0] || sda_oe[1]);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  for (genvar c = 0; c < 2; c++) begin : g_core
    digital_core #(.HALF(4), .SE_BANK_DEPTH(BANK), .ADC_CLK_DIV(DIV), .COLLECT_PERIOD(FILL),
                   .RESCAN_PERIOD(200_000), .PKG_DEPTH(PKG)) u_core (
      .clk, .rst_n, .mode(mode[c]), .se_id(4'd7), .sleep_req(1'b0), .scl_i(scl), .sda_i(sda),
      .scl_oe(scl_oe[c]), .sda_oe(sda_oe[c]), .adc_ce(adc_ce[c]), .adc_sleep(adc_sleep[c]),
      .adc_done(adc_done[c]), .adc_code(adc_code[c]), .afe_en(afe_en[c]),
      .tx_valid(tx_valid[c]), .tx_data(tx_data[c]), .tx_ready(tx_ready[c]),
      .active_se(active_se[c]), .bank_full(bank_full[c])
    );
  end

  // ADC models
  int ce_cnt [2], code_cnt [2];
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      adc_done[c] <= 1'b0;
      tx_ready[c] <= ($urandom_range(0, 1) == 0);
      if (adc_sleep[c]) begin
        ce_cnt[c] = 0;
        code_cnt[c] = 0;
      end else if (adc_ce[c]) begin
        ce_cnt[c]++;
        if (ce_cnt[c] == CONV) begin
          ce_cnt[c] = 0;
          adc_done[c] <= 1'b1;
          adc_code[c] <= 8'(code_cnt[c]);
          code_cnt[c]++;
        end
      end
      if (mode[c] == 1'b0) check(!scl_oe[c], "an SE never drives SCL");
      if (mode[c] == 1'b1 && rst_n) check(adc_sleep[c] && !afe_en[c] && !adc_ce[c], "ME has front-end and ADC off");
    end
  end

  // stream checker: the k-th packet since sync carries codes BANK*k .. BANK*k+BANK-1
  int pos [2], pkt [2], good_pkts [2];
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) if (tx_valid[c] && tx_ready[c]) begin
      if (pos[c] == 0) begin
        check(tx_data[c] == {4'd7, 3'b000, 1'(pkt[c] % 2)}, $sformatf("core %0d header %h", c, tx_data[c]));
      end else begin
        check(tx_data[c] == 8'(BANK * pkt[c] + pos[c] - 1), $sformatf("core %0d packet %0d byte %0d: %0d", c, pkt[c], pos[c], tx_data[c]));
      end
      pos[c]++;
      if (pos[c] == BANK + 1) begin
        pos[c] = 0;
        pkt[c]++;
        good_pkts[c]++;
      end
    end
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      pos[c] = 0; pkt[c] = 0; good_pkts[c] = 0; ce_cnt[c] = 0; code_cnt[c] = 0;
    end
    mode[0] = 1'b1;
    mode[1] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (good_pkts[0] >= 4);
    check(active_se[0] == 14'b00_0000_0100_0000, $sformatf("ME found %b", active_se[0]));
    // swap roles
    @(posedge clk);
    mode[0] = 1'b0;
    mode[1] = 1'b1;
    wait (good_pkts[1] >= 4);
    check(active_se[1] == 14'b00_0000_0100_0000, $sformatf("new ME found %b", active_se[1]));
    check(good_pkts[0] >= 4 && good_pkts[1] >= 4, "data delivered in both role assignments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
