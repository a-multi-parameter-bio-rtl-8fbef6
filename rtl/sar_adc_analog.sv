// Behavioural model (not synthesizable logic) of the analog half of the
// 6-input 8-bit charge-redistribution SAR ADC.
//
// Models the input multiplexer (six inputs plus the reference, 3-bit
// select), the sample-and-hold formed by the capacitor array, the binary
// weighted array as an ideal 8-bit DAC referred to the 800 mV bandgap
// reference, and the comparator. While sample is high the selected input is
// tracked and held on each clock; comp is 1 when the held voltage is at or
// above dac/256 * VREF. In sleep comp is 0. The differential array, its
// dummy twin and the charge-injection cancellation they provide are not
// modelled; the input range is taken as 0..VREF single-ended. Input 5 (index
// 4) carries the front-end output. The mux size, the 8 bits, the 256 unit
// capacitors and the 800 mV reference follow the document; select codes 6
// and 7 choosing the reference are this model's reading of the mux drawing.
module sar_adc_analog #(
  parameter real VREF = 0.8
) (
  input  logic       clk,
  input  real        vin [6],
  input  logic [2:0] sel,
  input  logic       sample,
  input  logic       sleep,
  input  logic [7:0] dac,
  output logic       comp
);
  real vmux, vhold, vdac;

  always_comb begin
    if (sel < 3'd6) vmux = vin[sel];
    else            vmux = VREF;
  end

  always_ff @(posedge clk) begin
    if (sample) vhold <= vmux;
  end

  assign vdac = VREF * real'(dac) / 256.0;
  assign comp = !sleep && (vhold >= vdac);
endmodule
