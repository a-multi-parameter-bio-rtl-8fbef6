// Package controller of the Main-Electrode.
//
// Packs the data collected from the Sensing-Electrodes into the ME's SRAM
// (DEPTH bytes, 12 kbit by default). Each SE's burst is stored as one header
// byte {SE address, 3'b000, bank index} followed by the data bytes, so that
// the receiver of the forwarded stream can tell the channels apart.
//
// Before a burst the main FSM holds burst_req with the number of data bytes
// it will fetch. burst_ready answers whether header and data still fit. If
// they do not, the storage counts as full: the controller starts the Wireless
// TX interface on the fill level (tx_start/tx_count), keeps flushing high
// while the SRAM is read out, and starts again from address 0 when tx_done
// arrives. hdr_wr and data_valid each write one byte at the write pointer.
// The document says that collected data are saved in the ME's SRAM and
// forwarded to a wireless transmit module when the storage is full; the
// header byte and the handshake are this design's choices.
module package_controller #(
  parameter int unsigned DEPTH = 1536,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          burst_req,
  input  logic [AW:0]   burst_len,
  output logic          burst_ready,
  input  logic          hdr_wr,
  input  logic [7:0]    hdr_byte,
  input  logic          data_valid,
  input  logic [7:0]    data_byte,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  output logic          tx_start,
  output logic [AW:0]   tx_count,
  input  logic          tx_done,
  output logic          flushing,
  output logic [AW:0]   fill,
  output logic [15:0]   flush_cnt
);
  logic fits;
  assign fits        = ({1'b0, fill} + (AW+2)'(burst_len) + (AW+2)'(1)) <= (AW+2)'(DEPTH);
  assign burst_ready = !flushing && fits;

  assign mem_en    = !flushing && (hdr_wr || data_valid);
  assign mem_we    = mem_en;
  assign mem_addr  = fill[AW-1:0];
  assign mem_wdata = hdr_wr ? hdr_byte : data_byte;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      flushing  <= 1'b0;
      tx_start  <= 1'b0;
      tx_count  <= '0;
      flush_cnt <= '0;
    end else begin
      tx_start <= 1'b0;
      if (flushing) begin
        if (tx_done) begin
          flushing <= 1'b0;
          fill     <= '0;
        end
      end else if (mem_en) begin
        fill <= fill + 1'b1;
      end else if (burst_req && !fits && fill != '0) begin
        flushing  <= 1'b1;
        tx_start  <= 1'b1;
        tx_count  <= fill;
        flush_cnt <= flush_cnt + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(hdr_wr && data_valid))
    else $error("package_controller: header and data written together");
  assert property (@(posedge clk) disable iff (!rst_n) (hdr_wr || data_valid) |-> !flushing)
    else $error("package_controller: write while flushing");
  assert property (@(posedge clk) disable iff (!rst_n) (hdr_wr || data_valid) |-> fill < (AW+1)'(DEPTH))
    else $error("package_controller: overflow");
endmodule
