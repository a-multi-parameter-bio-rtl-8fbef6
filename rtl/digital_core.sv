// Reconfigurable digital core of the bio-electric sensor ASIC.
//
// The Mode pin chooses the role of the electrode: mode = 1 makes it the
// Main-Electrode (ME), mode = 0 a Sensing-Electrode (SE). The core holds
// both a main block and a sensing block; the one not needed in the chosen
// role is held in reset, and in the ME role the front-end and ADC enables
// are off (the disable feature that saves power). The SCL/SDA pad drivers
// are open-drain: scl_oe/sda_oe = 1 pulls the line low. The ME drives SCL
// and SDA; an SE only SDA. The mode pin, the role-dependent disabling and
// the SCL/SDA IO cells follow the document; holding the unused block in
// reset is this design's way of disabling it.
//
// Timing: one system clock (1 MHz in the document); the SE's ADC runs on a
// clock enable derived from it.
module digital_core
  import bio_pkg::*;
#(
  parameter int unsigned HALF           = 4,
  parameter int unsigned SE_BANK_DEPTH  = 128,
  parameter int unsigned ADC_CLK_DIV    = 10,
  parameter int unsigned COLLECT_PERIOD = 100_000,
  parameter int unsigned RESCAN_PERIOD  = 5_000_000,
  parameter int unsigned PKG_DEPTH      = 1536
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode,        // 1: Main-Electrode, 0: Sensing-Electrode
  input  logic [ADDR_W-1:0] se_id,       // SE address (SE role)
  input  logic              sleep_req,   // ME role: put the network to sleep
  input  logic              scl_i,
  input  logic              sda_i,
  output logic              scl_oe,
  output logic              sda_oe,
  // SE role: ADC and front-end control
  output logic              adc_ce,
  output logic              adc_sleep,
  input  logic              adc_done,
  input  logic [7:0]        adc_code,
  output logic              afe_en,
  // ME role: stream to the wireless transmit module
  output logic              tx_valid,
  output logic [7:0]        tx_data,
  input  logic              tx_ready,
  // status
  output logic [MAX_SE:1]   active_se,
  output logic [1:0]        bank_full
);
  logic me_rst_n, se_rst_n;
  logic m_scl_oe, m_sda_oe, s_sda_oe;
  logic s_adc_ce, s_adc_sleep, s_afe_en;
  logic [3:0] me_state;
  logic [1:0] se_state;

  assign me_rst_n = rst_n && mode;
  assign se_rst_n = rst_n && !mode;

  main_block #(
    .HALF(HALF), .SE_BANK_DEPTH(SE_BANK_DEPTH), .COLLECT_PERIOD(COLLECT_PERIOD),
    .RESCAN_PERIOD(RESCAN_PERIOD), .PKG_DEPTH(PKG_DEPTH)
  ) u_main (
    .clk, .rst_n(me_rst_n), .sleep_req,
    .scl_oe(m_scl_oe), .sda_oe(m_sda_oe), .sda_i,
    .tx_valid, .tx_data, .tx_ready, .active(active_se), .state_o(me_state)
  );

  sensing_block #(.BANK_DEPTH(SE_BANK_DEPTH), .ADC_CLK_DIV(ADC_CLK_DIV)) u_sense (
    .clk, .rst_n(se_rst_n), .my_id(se_id), .scl_i, .sda_i, .sda_oe(s_sda_oe),
    .adc_ce(s_adc_ce), .adc_sleep(s_adc_sleep), .adc_done, .adc_code,
    .afe_en(s_afe_en), .bank_full, .state_o(se_state)
  );

  assign scl_oe    = mode && m_scl_oe;
  assign sda_oe    = mode ? m_sda_oe : s_sda_oe;
  assign adc_ce    = !mode && s_adc_ce;
  assign adc_sleep = mode || s_adc_sleep;
  assign afe_en    = !mode && s_afe_en;

  logic unused;
  assign unused = ^{me_state, se_state};
endmodule
