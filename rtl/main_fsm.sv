// Main FSM controller of the Main-Electrode (ME).
//
// Runs the network. After reset it performs an SE-Chain Scan (SECS): for
// every SE address 1..14 it sends an IDLE command frame and records in the
// address buffer whether that SE acknowledged. It then broadcasts
// Syn-Sample, which starts the ADCs of all SEs together, and starts two
// timers. Every RESCAN_PERIOD clocks (5 s at 1 MHz) it repeats the scan and,
// if an SE has joined, broadcasts Syn-Sample again to resynchronise all
// SEs. Every COLLECT_PERIOD clocks (0.1 s) it collects one sample bank from
// each active SE: one COLLECT frame per SE asking for addresses
// bank*SE_BANK_DEPTH .. bank*SE_BANK_DEPTH+SE_BANK_DEPTH-1, the bank index
// alternating from one collection to the next in step with the SEs'
// ping-pong buffers. Each burst is handed to the package controller, which
// may first forward its full SRAM. While sleep_req is high the ME broadcasts
// Sleep once and waits; when it drops, the ME scans again and resynchronises.
// A timer that expires while the ME is busy is remembered and served next.
//
// The scan, Syn-Sample, periodic rescan, 0.1 s collection and sleep
// broadcast follow the document; the order of service, the bank alternation,
// the wake-up sequence and the sleep_req pin are this design's choices.
module main_fsm
  import bio_pkg::*;
#(
  parameter int unsigned SE_BANK_DEPTH  = 128,
  parameter int unsigned COLLECT_PERIOD = 100_000,
  parameter int unsigned RESCAN_PERIOD  = 5_000_000,
  parameter int unsigned PKG_DEPTH      = 1536,
  localparam int unsigned PAW           = $clog2(PKG_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sleep_req,
  // serial master
  output logic                 m_start,
  output cmd_frame_t           m_frame,
  output logic [MEMADDR_W:0]   m_rx_bytes,
  input  logic                 m_busy,
  input  logic                 m_done,
  input  logic                 m_ack_valid,
  input  logic                 m_ack_ok,
  // address buffer
  output logic                 ab_scan_begin,
  output logic                 ab_scan_wr,
  output logic [ADDR_W-1:0]    ab_scan_addr,
  output logic                 ab_scan_present,
  output logic [ADDR_W-1:0]    ab_cur_addr,
  input  logic [ADDR_W-1:0]    ab_next_addr,
  input  logic                 ab_next_valid,
  input  logic                 ab_new_se,
  // package controller
  output logic                 burst_req,
  output logic [PAW:0]         burst_len,
  input  logic                 burst_ready,
  output logic                 hdr_wr,
  output logic [7:0]           hdr_byte,
  // events, for status
  output logic                 ev_scan_done,
  output logic                 ev_syn,
  output logic                 ev_collect_done,
  output logic                 ev_sleep,
  output logic [3:0]           state_o
);

  typedef enum logic [3:0] {
    F_BOOT, F_SCAN_SEND, F_SCAN_WAIT, F_SCAN_END, F_SYN_SEND, F_SYN_WAIT,
    F_RUN, F_COL_NEXT, F_COL_REQ, F_COL_WAIT, F_SLP_SEND, F_SLP_WAIT, F_SLEEPING
  } fstate_e;

  localparam int unsigned TW = 32;

  fstate_e           state;
  logic [ADDR_W-1:0] addr;
  logic              first_scan;
  logic              bank;
  logic [TW-1:0]     col_t, scan_t;
  logic              col_due, scan_due, timers_on;

  assign state_o    = state;
  assign ab_cur_addr = addr;
  assign burst_len  = (PAW+1)'(SE_BANK_DEPTH);
  assign burst_req  = (state == F_COL_REQ);
  assign hdr_byte   = {addr, 3'b000, bank};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_t    <= '0;
      scan_t   <= '0;
      col_due  <= 1'b0;
      scan_due <= 1'b0;
    end else begin
      if (!timers_on) begin
        col_t    <= '0;
        scan_t   <= '0;
        col_due  <= 1'b0;
        scan_due <= 1'b0;
      end else begin
        if (col_t == TW'(COLLECT_PERIOD - 1)) begin
          col_t   <= '0;
          col_due <= 1'b1;
        end else col_t <= col_t + 1'b1;
        if (scan_t == TW'(RESCAN_PERIOD - 1)) begin
          scan_t   <= '0;
          scan_due <= 1'b1;
        end else scan_t <= scan_t + 1'b1;
        if (state == F_RUN && !sleep_req && scan_due) scan_due <= 1'b0;
        else if (state == F_RUN && !sleep_req && col_due) col_due <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= F_BOOT;
      addr            <= '0;
      first_scan      <= 1'b1;
      bank            <= 1'b0;
      timers_on       <= 1'b0;
      m_start         <= 1'b0;
      m_frame         <= '0;
      m_rx_bytes      <= '0;
      ab_scan_begin   <= 1'b0;
      ab_scan_wr      <= 1'b0;
      ab_scan_addr    <= '0;
      ab_scan_present <= 1'b0;
      hdr_wr          <= 1'b0;
      ev_scan_done    <= 1'b0;
      ev_syn          <= 1'b0;
      ev_collect_done <= 1'b0;
      ev_sleep        <= 1'b0;
    end else begin
      m_start         <= 1'b0;
      ab_scan_begin   <= 1'b0;
      ab_scan_wr      <= 1'b0;
      hdr_wr          <= 1'b0;
      ev_scan_done    <= 1'b0;
      ev_syn          <= 1'b0;
      ev_collect_done <= 1'b0;
      ev_sleep        <= 1'b0;
      unique case (state)
        F_BOOT: begin
          ab_scan_begin <= 1'b1;
          addr          <= ADDR_W'(1);
          state         <= F_SCAN_SEND;
        end
        F_SCAN_SEND: if (!m_busy) begin
          m_frame    <= '{addr: addr, mem_start: '0, mem_stop: '0, cmd: CMD_IDLE};
          m_rx_bytes <= '0;
          m_start    <= 1'b1;
          state      <= F_SCAN_WAIT;
        end
        F_SCAN_WAIT: begin
          if (m_ack_valid) begin
            ab_scan_wr      <= 1'b1;
            ab_scan_addr    <= addr;
            ab_scan_present <= m_ack_ok;
          end
          if (m_done) begin
            if (addr == ADDR_W'(MAX_SE)) state <= F_SCAN_END;
            else begin
              addr  <= addr + 1'b1;
              state <= F_SCAN_SEND;
            end
          end
        end
        F_SCAN_END: begin
          ev_scan_done <= 1'b1;
          timers_on    <= 1'b1;
          if (first_scan || ab_new_se) state <= F_SYN_SEND;
          else                         state <= F_RUN;
        end
        F_SYN_SEND: if (!m_busy) begin
          m_frame    <= '{addr: BCAST_ADDR, mem_start: '0, mem_stop: '0, cmd: CMD_SYN_SAMPLE};
          m_rx_bytes <= '0;
          m_start    <= 1'b1;
          state      <= F_SYN_WAIT;
        end
        F_SYN_WAIT: if (m_done) begin
          ev_syn     <= 1'b1;
          first_scan <= 1'b0;
          bank       <= 1'b0;
          timers_on  <= 1'b0;      // restart both periods from the new sync point
          state      <= F_RUN;
        end
        F_RUN: begin
          timers_on <= 1'b1;
          if (sleep_req) state <= F_SLP_SEND;
          else if (scan_due) begin
            ab_scan_begin <= 1'b1;
            addr          <= ADDR_W'(1);
            state         <= F_SCAN_SEND;
          end else if (col_due) begin
            addr  <= '0;
            state <= F_COL_NEXT;
          end
        end
        F_COL_NEXT: begin
          if (ab_next_valid) begin
            addr  <= ab_next_addr;
            state <= F_COL_REQ;
          end else begin
            bank            <= ~bank;
            ev_collect_done <= 1'b1;
            state           <= F_RUN;
          end
        end
        F_COL_REQ: if (burst_ready && !m_busy) begin
          m_frame <= '{addr: addr,
                       mem_start: MEMADDR_W'(bank) * MEMADDR_W'(SE_BANK_DEPTH),
                       mem_stop:  MEMADDR_W'(bank) * MEMADDR_W'(SE_BANK_DEPTH) + MEMADDR_W'(SE_BANK_DEPTH - 1),
                       cmd: CMD_COLLECT};
          m_rx_bytes <= (MEMADDR_W+1)'(SE_BANK_DEPTH);
          m_start    <= 1'b1;
          state      <= F_COL_WAIT;
        end
        F_COL_WAIT: begin
          if (m_ack_valid && m_ack_ok) hdr_wr <= 1'b1;
          if (m_done) state <= F_COL_NEXT;
        end
        F_SLP_SEND: if (!m_busy) begin
          m_frame    <= '{addr: BCAST_ADDR, mem_start: '0, mem_stop: '0, cmd: CMD_SLEEP};
          m_rx_bytes <= '0;
          m_start    <= 1'b1;
          state      <= F_SLP_WAIT;
        end
        F_SLP_WAIT: if (m_done) begin
          ev_sleep  <= 1'b1;
          timers_on <= 1'b0;
          state     <= F_SLEEPING;
        end
        F_SLEEPING: if (!sleep_req) begin
          first_scan    <= 1'b1;
          ab_scan_begin <= 1'b1;
          addr          <= ADDR_W'(1);
          state         <= F_SCAN_SEND;
        end
        default: state <= F_BOOT;
      endcase
    end
  end

  initial assert (2 * SE_BANK_DEPTH <= (1 << MEMADDR_W) && SE_BANK_DEPTH + 1 <= PKG_DEPTH)
    else $error("main_fsm: bank does not fit the frame address or the ME buffer");
endmodule
