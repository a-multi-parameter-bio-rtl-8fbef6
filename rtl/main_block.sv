// Main block of the digital core: the logic active when the electrode is the
// Main-Electrode (ME).
//
// Connects the main FSM controller, the ME side of the serial interface, the
// SE address buffer, the package controller, the ME data SRAM (PKG_DEPTH
// bytes) and the wireless TX interface. The SRAM's single port belongs to
// the package controller while it stores collected bytes and to the wireless
// TX interface while the package controller is flushing; the two never
// overlap. Bytes received from an SE go straight from the serial master to
// the package controller. The partition follows the main block drawn in the
// digital core diagram; the SRAM port sharing is this design's choice.
module main_block
  import bio_pkg::*;
#(
  parameter int unsigned HALF           = 4,
  parameter int unsigned SE_BANK_DEPTH  = 128,
  parameter int unsigned COLLECT_PERIOD = 100_000,
  parameter int unsigned RESCAN_PERIOD  = 5_000_000,
  parameter int unsigned PKG_DEPTH      = 1536,
  localparam int unsigned PAW           = $clog2(PKG_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sleep_req,
  output logic          scl_oe,
  output logic          sda_oe,
  input  logic          sda_i,
  output logic          tx_valid,
  output logic [7:0]    tx_data,
  input  logic          tx_ready,
  output logic [MAX_SE:1] active,
  output logic [3:0]    state_o
);
  logic                 m_start, m_busy, m_done, m_ack_valid, m_ack_ok, rx_valid;
  cmd_frame_t           m_frame;
  logic [MEMADDR_W:0]   m_rx_bytes;
  logic [ACK_W-1:0]     ack_bits;
  logic [7:0]           rx_byte;
  logic                 ab_scan_begin, ab_scan_wr, ab_scan_present, ab_next_valid, ab_new_se, ab_gone_se;
  logic [ADDR_W-1:0]    ab_scan_addr, ab_cur_addr, ab_next_addr, ab_n_active;
  logic                 burst_req, burst_ready, hdr_wr;
  logic [PAW:0]         burst_len, tx_count, fill;
  logic [7:0]           hdr_byte;
  logic                 ev_scan_done, ev_syn, ev_collect_done, ev_sleep;
  logic                 pk_en, pk_we, tx_start, tx_done, flushing, tx_busy, tx_mem_en;
  logic [PAW-1:0]       pk_addr, tx_mem_addr;
  logic [7:0]           pk_wdata, mem_rdata;
  logic [15:0]          flush_cnt;

  main_fsm #(
    .SE_BANK_DEPTH (SE_BANK_DEPTH),
    .COLLECT_PERIOD(COLLECT_PERIOD),
    .RESCAN_PERIOD (RESCAN_PERIOD),
    .PKG_DEPTH     (PKG_DEPTH)
  ) u_fsm (
    .clk, .rst_n, .sleep_req,
    .m_start, .m_frame, .m_rx_bytes, .m_busy, .m_done, .m_ack_valid, .m_ack_ok,
    .ab_scan_begin, .ab_scan_wr, .ab_scan_addr, .ab_scan_present, .ab_cur_addr,
    .ab_next_addr, .ab_next_valid, .ab_new_se,
    .burst_req, .burst_len, .burst_ready, .hdr_wr, .hdr_byte,
    .ev_scan_done, .ev_syn, .ev_collect_done, .ev_sleep, .state_o
  );

  serial_master #(.HALF(HALF)) u_master (
    .clk, .rst_n,
    .start(m_start), .frame(m_frame), .rx_bytes(m_rx_bytes),
    .busy(m_busy), .done(m_done), .ack_valid(m_ack_valid), .ack_bits, .ack_ok(m_ack_ok),
    .rx_valid, .rx_byte, .scl_oe, .sda_oe, .sda_i
  );

  addr_buffer u_abuf (
    .clk, .rst_n,
    .scan_begin(ab_scan_begin), .scan_wr(ab_scan_wr), .scan_addr(ab_scan_addr),
    .scan_present(ab_scan_present), .cur_addr(ab_cur_addr),
    .next_addr(ab_next_addr), .next_valid(ab_next_valid),
    .active, .new_se(ab_new_se), .gone_se(ab_gone_se), .n_active(ab_n_active)
  );

  package_controller #(.DEPTH(PKG_DEPTH)) u_pkg (
    .clk, .rst_n,
    .burst_req, .burst_len, .burst_ready,
    .hdr_wr, .hdr_byte, .data_valid(rx_valid), .data_byte(rx_byte),
    .mem_en(pk_en), .mem_we(pk_we), .mem_addr(pk_addr), .mem_wdata(pk_wdata),
    .tx_start, .tx_count, .tx_done, .flushing, .fill, .flush_cnt
  );

  spram #(.DEPTH(PKG_DEPTH), .WIDTH(8)) u_sram (
    .clk,
    .en   (flushing ? tx_mem_en : pk_en),
    .we   (!flushing && pk_we),
    .addr (flushing ? tx_mem_addr : pk_addr),
    .wdata(pk_wdata),
    .rdata(mem_rdata)
  );

  wireless_tx_if #(.DEPTH(PKG_DEPTH)) u_wtx (
    .clk, .rst_n,
    .start(tx_start), .count(tx_count), .busy(tx_busy), .done(tx_done),
    .mem_en(tx_mem_en), .mem_addr(tx_mem_addr), .mem_rdata,
    .tx_valid, .tx_data, .tx_ready
  );

  logic unused;
  assign unused = ^{ack_bits, ab_gone_se, ab_n_active, ev_scan_done, ev_syn,
                    ev_collect_done, ev_sleep, tx_busy, fill, flush_cnt};
endmodule
