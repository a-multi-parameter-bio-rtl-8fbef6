// Single-port synchronous RAM.
//
// One access per clock: with en high, we high writes wdata to addr, we low
// reads addr and presents the word on rdata on the next clock (one clock
// read latency); rdata holds its value otherwise. The Sensing-Electrode uses
// two of these as its ping-pong sample buffers (1 kbit each, 128 x 8 by
// default) and the Main-Electrode one 12 kbit buffer (1536 x 8) for the
// collected data. The sizes follow the memory sizes printed on the die
// photograph; the 8-bit word, matching the ADC code, is this design's choice.
// The array is left uninitialised, as in a real SRAM macro.
module spram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
