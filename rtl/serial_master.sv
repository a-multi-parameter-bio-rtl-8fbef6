// Main-Electrode side of the 2-wire serial interface (SCL/SDA on the Active Cable).
//
// One transaction sends a start condition, the 28 command bits of a frame
// (SE address, memory start, memory stop, broadcast command; MSB first),
// then releases SDA for the three acknowledge slots in which the addressed
// Sensing-Electrode answers. If the acknowledge matches ACK_PATTERN and
// rx_bytes is non-zero, the master keeps clocking and reads rx_bytes bytes
// (MSB first) from the SE, then ends with a stop condition. Broadcast frames
// get no acknowledge: the released bus reads 3'b111.
//
// Bus signalling is I2C-like and open-drain: scl_oe/sda_oe = 1 pulls the
// wire low, 0 releases it to the pull-up. Each bit is 2*HALF clocks: SCL low
// for HALF clocks, then high for HALF clocks. SDA changes one clock after SCL
// falls and is sampled on the last clock of the high phase. With the default
// HALF = 4 and a 1 MHz system clock the bit rate is 125 kbit/s, close to the
// 120 kbit/s the collection link runs at. The frame layout follows the
// published frame format; bit timing, start/stop signalling and the
// acknowledge pattern are this design's choices.
//
// Interface: pulse start with frame/rx_bytes while busy is low. ack_valid
// pulses after the acknowledge slots with ack_bits/ack_ok; rx_valid pulses
// with each received byte; done pulses when the stop condition has ended.
module serial_master
  import bio_pkg::*;
#(
  parameter int unsigned HALF = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  cmd_frame_t           frame,
  input  logic [MEMADDR_W:0]   rx_bytes,
  output logic                 busy,
  output logic                 done,
  output logic                 ack_valid,
  output logic [ACK_W-1:0]     ack_bits,
  output logic                 ack_ok,
  output logic                 rx_valid,
  output logic [7:0]           rx_byte,
  output logic                 scl_oe,
  output logic                 sda_oe,
  input  logic                 sda_i
);

  typedef enum logic [2:0] {M_IDLE, M_START, M_HDR, M_ACK, M_DATA, M_STOP} mstate_e;

  localparam int unsigned PH_W = $clog2(3 * HALF + 1);

  mstate_e               state;
  logic [PH_W-1:0]       ph;
  logic [HDR_W-1:0]      hdr_sh;
  logic [5:0]            bit_cnt;
  logic [MEMADDR_W:0]    bytes_left;
  logic [7:0]            rx_sh;
  logic [ACK_W-1:0]      ack_sh;
  logic                  sda_oe_next;

  logic bit_end;     // last clock of a bit cell (sample point)
  assign bit_end = (ph == PH_W'(2 * HALF - 1));

  always_comb begin
    scl_oe      = 1'b0;
    sda_oe_next = 1'b0;
    unique case (state)
      M_IDLE:  ;
      M_START: sda_oe_next = (ph >= PH_W'(HALF));
      M_HDR: begin
        scl_oe      = (ph < PH_W'(HALF));
        sda_oe_next = ~hdr_sh[HDR_W-1];
      end
      M_ACK, M_DATA: scl_oe = (ph < PH_W'(HALF));
      M_STOP: begin
        scl_oe      = (ph < PH_W'(HALF));
        sda_oe_next = (ph < PH_W'(2 * HALF));
      end
      default: ;
    endcase
  end

  assign busy = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      ph         <= '0;
      hdr_sh     <= '0;
      bit_cnt    <= '0;
      bytes_left <= '0;
      rx_sh      <= '0;
      ack_sh     <= '0;
      sda_oe     <= 1'b0;
      done       <= 1'b0;
      ack_valid  <= 1'b0;
      ack_bits   <= '0;
      ack_ok     <= 1'b0;
      rx_valid   <= 1'b0;
      rx_byte    <= '0;
    end else begin
      sda_oe    <= sda_oe_next;   // SDA lags SCL by one clock (hold time)
      done      <= 1'b0;
      ack_valid <= 1'b0;
      rx_valid  <= 1'b0;
      unique case (state)
        M_IDLE: begin
          ph <= '0;
          if (start) begin
            state      <= M_START;
            hdr_sh     <= frame;
            bytes_left <= rx_bytes;
          end
        end
        M_START: begin
          if (ph == PH_W'(2 * HALF - 1)) begin
            ph      <= '0;
            bit_cnt <= '0;
            state   <= M_HDR;
          end else ph <= ph + 1'b1;
        end
        M_HDR: begin
          if (bit_end) begin
            ph     <= '0;
            hdr_sh <= {hdr_sh[HDR_W-2:0], 1'b0};
            if (bit_cnt == 6'(HDR_W - 1)) begin
              bit_cnt <= '0;
              state   <= M_ACK;
            end else bit_cnt <= bit_cnt + 1'b1;
          end else ph <= ph + 1'b1;
        end
        M_ACK: begin
          if (bit_end) begin
            ph     <= '0;
            ack_sh <= {ack_sh[ACK_W-2:0], sda_i};
            if (bit_cnt == 6'(ACK_W - 1)) begin
              bit_cnt   <= '0;
              ack_valid <= 1'b1;
              ack_bits  <= {ack_sh[ACK_W-2:0], sda_i};
              ack_ok    <= ({ack_sh[ACK_W-2:0], sda_i} == ACK_PATTERN);
              if (({ack_sh[ACK_W-2:0], sda_i} == ACK_PATTERN) && (bytes_left != '0))
                state <= M_DATA;
              else
                state <= M_STOP;
            end else bit_cnt <= bit_cnt + 1'b1;
          end else ph <= ph + 1'b1;
        end
        M_DATA: begin
          if (bit_end) begin
            ph    <= '0;
            rx_sh <= {rx_sh[6:0], sda_i};
            if (bit_cnt == 6'd7) begin
              bit_cnt    <= '0;
              rx_valid   <= 1'b1;
              rx_byte    <= {rx_sh[6:0], sda_i};
              bytes_left <= bytes_left - 1'b1;
              if (bytes_left == (MEMADDR_W+1)'(1)) state <= M_STOP;
            end else bit_cnt <= bit_cnt + 1'b1;
          end else ph <= ph + 1'b1;
        end
        M_STOP: begin
          if (ph == PH_W'(3 * HALF - 1)) begin
            ph    <= '0;
            state <= M_IDLE;
            done  <= 1'b1;
          end else ph <= ph + 1'b1;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // A new transaction may only be requested while the bus is idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("serial_master: start while busy");

endmodule
