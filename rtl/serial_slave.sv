// Sensing-Electrode side of the 2-wire serial interface.
//
// SCL and SDA are brought into the system clock domain with two-flop
// synchronisers. A start condition (SDA falling while SCL is high) opens a
// frame; the next 28 SCL rising edges shift in the command header. The ID
// Checker then decides: a broadcast header is handed to the sensing FSM and
// not acknowledged; a header for this SE is handed over as well and answered
// by driving ACK_PATTERN in the next three bit slots, SDA being changed after
// each SCL falling edge. For a collect command the slave then streams memory
// bytes start..stop, MSB first, fetching each byte ahead of time through the
// rd_req/rd_valid port. A stop condition (SDA rising while SCL high) ends
// the frame and releases the bus; a new start condition at any time restarts
// header reception.
//
// Interface: cmd_valid pulses once per header that is a broadcast or
// addressed to this SE, with the decoded frame and is_bcast. rd_req pulses
// with rd_addr; the memory side answers rd_valid/rd_data some clocks later
// (well within one bit time). sda_oe = 1 pulls SDA low. The frame layout
// follows the published format; the signalling details are this design's.
module serial_slave
  import bio_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ADDR_W-1:0]    my_id,
  input  logic                 scl_i,
  input  logic                 sda_i,
  output logic                 sda_oe,
  output logic                 cmd_valid,
  output cmd_frame_t           cmd_frame,
  output logic                 is_bcast,
  output logic                 rd_req,
  output logic [MEMADDR_W-1:0] rd_addr,
  input  logic                 rd_valid,
  input  logic [7:0]           rd_data
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_TX, S_WAIT} sstate_e;
  typedef enum logic [1:0] {P_ACK, P_DATA, P_END} tphase_e;

  logic [1:0] scl_sync, sda_sync;
  logic       scl_q, sda_q;
  logic       scl_s, sda_s;
  logic       scl_rise, scl_fall, start_cond, stop_cond;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
      scl_q    <= 1'b1;
      sda_q    <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[0], scl_i};
      sda_sync <= {sda_sync[0], sda_i};
      scl_q    <= scl_sync[1];
      sda_q    <= sda_sync[1];
    end
  end
  assign scl_s      = scl_sync[1];
  assign sda_s      = sda_sync[1];
  assign scl_rise   = scl_s && !scl_q;
  assign scl_fall   = !scl_s && scl_q;
  assign start_cond = scl_s && scl_q && sda_q && !sda_s;
  assign stop_cond  = scl_s && scl_q && !sda_q && sda_s;

  sstate_e              state;
  tphase_e              tphase;
  logic [HDR_W-1:0]     hdr_sh;
  logic [4:0]           hdr_cnt;
  logic [1:0]           ack_idx;
  logic [2:0]           bit_idx;
  logic [7:0]           tx_sh;
  logic [7:0]           nxt_byte;
  logic                 nxt_ok;
  logic [MEMADDR_W:0]   bytes_left;
  cmd_frame_t           hdr_frame;
  logic                 id_match, id_bcast, id_ok;

  assign hdr_frame = cmd_frame_t'({hdr_sh[HDR_W-2:0], sda_s});

  id_checker u_id (
    .frame_addr(hdr_frame.addr),
    .my_id     (my_id),
    .id_valid  (id_ok),
    .match     (id_match),
    .bcast     (id_bcast)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      tphase     <= P_ACK;
      hdr_sh     <= '0;
      hdr_cnt    <= '0;
      ack_idx    <= '0;
      bit_idx    <= '0;
      tx_sh      <= '0;
      nxt_byte   <= '0;
      nxt_ok     <= 1'b0;
      bytes_left <= '0;
      sda_oe     <= 1'b0;
      cmd_valid  <= 1'b0;
      cmd_frame  <= '0;
      is_bcast   <= 1'b0;
      rd_req     <= 1'b0;
      rd_addr    <= '0;
    end else begin
      cmd_valid <= 1'b0;
      rd_req    <= 1'b0;
      if (rd_valid) begin
        nxt_byte <= rd_data;
        nxt_ok   <= 1'b1;
      end
      if (start_cond) begin
        state   <= S_HDR;
        hdr_cnt <= '0;
        sda_oe  <= 1'b0;
      end else if (stop_cond) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: sda_oe <= 1'b0;
          S_HDR: if (scl_rise) begin
            hdr_sh <= {hdr_sh[HDR_W-2:0], sda_s};
            if (hdr_cnt == 5'(HDR_W - 1)) begin
              cmd_frame <= hdr_frame;
              is_bcast  <= id_bcast;
              cmd_valid <= id_bcast || id_match;
              if (id_match) begin
                state      <= S_TX;
                tphase     <= P_ACK;
                ack_idx    <= '0;
                bit_idx    <= '0;
                nxt_ok     <= 1'b0;
                if (hdr_frame.cmd == CMD_COLLECT && hdr_frame.mem_stop >= hdr_frame.mem_start) begin
                  bytes_left <= (MEMADDR_W+1)'(hdr_frame.mem_stop) - (MEMADDR_W+1)'(hdr_frame.mem_start) + 1'b1;
                  rd_addr    <= hdr_frame.mem_start;
                  rd_req     <= 1'b1;
                end else begin
                  bytes_left <= '0;
                end
              end else begin
                state <= S_WAIT;
              end
            end else hdr_cnt <= hdr_cnt + 1'b1;
          end
          S_TX: if (scl_fall) begin
            unique case (tphase)
              P_ACK: begin
                sda_oe  <= ~ACK_PATTERN[2'(ACK_W - 1) - ack_idx];
                ack_idx <= ack_idx + 1'b1;
                if (ack_idx == 2'(ACK_W - 1))
                  tphase <= (bytes_left != '0) ? P_DATA : P_END;
              end
              P_DATA: begin
                if (bit_idx == 3'd0) begin
                  sda_oe <= ~nxt_byte[7];
                  tx_sh  <= {nxt_byte[6:0], 1'b0};
                  nxt_ok <= 1'b0;
                  if (bytes_left > (MEMADDR_W+1)'(1)) begin
                    rd_addr <= rd_addr + 1'b1;
                    rd_req  <= 1'b1;
                  end
                end else begin
                  sda_oe <= ~tx_sh[7];
                  tx_sh  <= {tx_sh[6:0], 1'b0};
                end
                bit_idx <= bit_idx + 1'b1;
                if (bit_idx == 3'd7) begin
                  bytes_left <= bytes_left - 1'b1;
                  if (bytes_left == (MEMADDR_W+1)'(1)) tphase <= P_END;
                end
              end
              default: begin  // P_END: release the bus after the last bit
                sda_oe <= 1'b0;
                state  <= S_WAIT;
              end
            endcase
          end
          default: sda_oe <= 1'b0;  // S_WAIT: frame not for us, wait for stop/start
        endcase
      end
    end
  end

  // The byte to send must have been fetched before its first bit slot.
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_TX && tphase == P_DATA && scl_fall && bit_idx == 3'd0 && !start_cond && !stop_cond) |-> nxt_ok)
    else $error("serial_slave: memory read not ready in time");

  logic unused;
  assign unused = id_ok;

endmodule
