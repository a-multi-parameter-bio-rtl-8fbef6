// Wireless TX interface of the Main-Electrode.
//
// When start pulses, reads count bytes from the Main-Electrode SRAM, address
// 0 upwards, and offers each to the external wireless transmit module on a
// valid/ready byte stream (tx_valid/tx_data held until tx_ready). done pulses
// after the last byte has been accepted; busy is high from start to done.
// Each byte costs one SRAM read (one clock latency) plus the handshake. The
// document names this interface and says the stored data are forwarded to an
// external wireless module when the storage is full; the byte-stream
// handshake is this design's choice.
module wireless_tx_if #(
  parameter int unsigned DEPTH = 1536,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   count,
  output logic          busy,
  output logic          done,
  output logic          mem_en,
  output logic [AW-1:0] mem_addr,
  input  logic [7:0]    mem_rdata,
  output logic          tx_valid,
  output logic [7:0]    tx_data,
  input  logic          tx_ready
);
  typedef enum logic [1:0] {T_IDLE, T_READ, T_LOAD, T_SEND} tstate_e;
  tstate_e     state;
  logic [AW:0] idx, total;

  assign busy     = (state != T_IDLE);
  assign mem_en   = (state == T_READ);
  assign mem_addr = idx[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      idx      <= '0;
      total    <= '0;
      tx_valid <= 1'b0;
      tx_data  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          idx   <= '0;
          total <= count;
          if (count == '0) done <= 1'b1;
          else             state <= T_READ;
        end
        T_READ: state <= T_LOAD;
        T_LOAD: begin
          tx_data  <= mem_rdata;
          tx_valid <= 1'b1;
          state    <= T_SEND;
        end
        T_SEND: if (tx_ready) begin
          tx_valid <= 1'b0;
          idx      <= idx + 1'b1;
          if (idx + 1'b1 == total) begin
            state <= T_IDLE;
            done  <= 1'b1;
          end else begin
            state <= T_READ;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The stream must not change while it is offered and not yet taken.
  assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_data)))
    else $error("wireless_tx_if: stream changed before it was accepted");
endmodule
