// Sensing block of the digital core: the logic active when the electrode is
// a Sensing-Electrode (SE).
//
// Connects the SE side of the serial interface (with its ID checker), the
// sensing FSM controller, the A/D interface and the two ping-pong sample
// RAMs (SRAM1, SRAM2; BANK_DEPTH bytes each, 1 kbit by default). Toward the
// ADC it provides the ADC clock enable, the sleep/restart control and takes
// the finished code; toward the analog front-end an enable. The partition
// follows the sensing block drawn in the digital core diagram.
module sensing_block
  import bio_pkg::*;
#(
  parameter int unsigned BANK_DEPTH  = 128,
  parameter int unsigned ADC_CLK_DIV = 10,
  localparam int unsigned BAW        = $clog2(BANK_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] my_id,
  input  logic              scl_i,
  input  logic              sda_i,
  output logic              sda_oe,
  output logic              adc_ce,
  output logic              adc_sleep,
  input  logic              adc_done,
  input  logic [7:0]        adc_code,
  output logic              afe_en,
  output logic [1:0]        bank_full,
  output logic [1:0]        state_o
);
  logic                 cmd_valid, is_bcast, rd_req, rd_valid;
  cmd_frame_t           cmd_frame;
  logic [MEMADDR_W-1:0] rd_addr;
  logic [7:0]           rd_data, sample, ram_wdata;
  logic                 acq_en, adc_restart, sample_valid, wr_bank;
  logic [15:0]          sample_cnt;
  logic [1:0]           ram_en, ram_we;
  logic [BAW-1:0]       ram_addr [2];
  logic [7:0]           ram_rdata [2];

  serial_slave u_slave (
    .clk, .rst_n, .my_id, .scl_i, .sda_i, .sda_oe,
    .cmd_valid, .cmd_frame, .is_bcast, .rd_req, .rd_addr, .rd_valid, .rd_data
  );

  sensing_fsm #(.BANK_DEPTH(BANK_DEPTH)) u_fsm (
    .clk, .rst_n, .cmd_valid, .cmd_frame, .is_bcast,
    .acq_en, .afe_en, .adc_restart, .sample_valid, .sample,
    .rd_req, .rd_addr, .rd_valid, .rd_data,
    .ram_en, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .bank_full, .wr_bank, .state_o
  );

  ad_interface #(.ADC_CLK_DIV(ADC_CLK_DIV)) u_adif (
    .clk, .rst_n, .acq_en, .restart(adc_restart), .adc_ce, .adc_sleep,
    .adc_done, .adc_code, .sample_valid, .sample, .sample_cnt
  );

  for (genvar b = 0; b < 2; b++) begin : g_ram
    spram #(.DEPTH(BANK_DEPTH), .WIDTH(8)) u_ram (
      .clk, .en(ram_en[b]), .we(ram_we[b]), .addr(ram_addr[b]),
      .wdata(ram_wdata), .rdata(ram_rdata[b])
    );
  end

  logic unused;
  assign unused = ^{wr_bank, sample_cnt};
endmodule
