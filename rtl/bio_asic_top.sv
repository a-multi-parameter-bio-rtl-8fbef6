// Bio-electric sensor ASIC: one chip per Intelligent Electrode.
//
// The chip amplifies one bio-potential channel (the local electrode vin
// against the shared reference line vref) in a programmable analog
// front-end, digitises it with an 8-bit SAR ADC at 3.3 kS/s, and moves the
// samples over a 2-wire serial bus (SCL/SDA on the shared Active Cable). The
// same chip serves as Main-Electrode (mode = 1), which scans the bus for
// Sensing-Electrodes, synchronises their sampling, collects their data and
// forwards it to a wireless transmit module, or as Sensing-Electrode
// (mode = 0, bus address se_id = 1..14), which records and answers.
//
// Mixed-signal parts are behavioural models: afe_model (front-end) and
// sar_adc_analog (ADC mux, capacitor array, comparator, bandgap reference).
// The digital parts are synthesizable: sar_logic (the successive
// approximation register) and digital_core. Analog voltages are real-valued
// ports. The ADC's six inputs are aux_in, except input 5 (index 4), which is
// the front-end output; adc_sel picks the input to convert (4 for the
// bio-signal). gain_sel (3 bits) and bw_sel (2 bits) stand for the external
// gain and bandwidth switches.
//
// Bus: open-drain. scl_oe/sda_oe = 1 means the chip pulls the line low; the
// board wires all chips' pulls together with a pull-up (wired AND) and feeds
// the line level back on scl_i/sda_i. Timing: one clock, 1 MHz nominal.
//
// Reset: rst_n is the asynchronous active-low reset of every flip-flop. It
// is also read in clocked code that is not a flip-flop reset (the disable
// condition of the bus assertions, the front-end model's state update), so
// lint tools report it as used both asynchronously and synchronously; that
// is intended. The chip is reset with a falling edge of rst_n or by holding
// it low for at least one clock.
module bio_asic_top
  import bio_pkg::*;
#(
  parameter int unsigned HALF           = 4,
  parameter int unsigned SE_BANK_DEPTH  = 128,
  parameter int unsigned ADC_CLK_DIV    = 10,
  parameter int unsigned CONV_CYCLES    = 30,
  parameter int unsigned COLLECT_PERIOD = 100_000,
  parameter int unsigned RESCAN_PERIOD  = 5_000_000,
  parameter int unsigned PKG_DEPTH      = 1536
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode,
  input  logic [ADDR_W-1:0] se_id,
  input  logic [2:0]        gain_sel,
  input  logic [1:0]        bw_sel,
  input  logic [2:0]        adc_sel,
  input  real               vin,
  input  real               vref,
  input  real               aux_in [6],
  input  logic              sleep_req,
  input  logic              scl_i,
  input  logic              sda_i,
  output logic              scl_oe,
  output logic              sda_oe,
  output logic              tx_valid,
  output logic [7:0]        tx_data,
  input  logic              tx_ready,
  output logic [MAX_SE:1]   active_se,
  output logic [1:0]        bank_full
);
  logic       adc_ce, adc_sleep, adc_done, afe_en, comp, sample;
  logic [7:0] adc_code, dac;
  real        afe_out;
  real        adc_in [6];

  afe_model u_afe (
    .clk, .rst_n, .en(afe_en), .vin, .vref, .gain_sel, .bw_sel, .vout(afe_out)
  );

  always_comb begin
    adc_in    = aux_in;
    adc_in[4] = afe_out;
  end

  sar_adc_analog u_adc_analog (
    .clk, .vin(adc_in), .sel(adc_sel), .sample, .sleep(adc_sleep), .dac, .comp
  );

  sar_logic #(.N(8), .CONV_CYCLES(CONV_CYCLES)) u_sar (
    .clk, .rst_n, .ce(adc_ce), .sleep(adc_sleep), .comp,
    .sample, .dac, .code(adc_code), .done(adc_done)
  );

  digital_core #(
    .HALF(HALF), .SE_BANK_DEPTH(SE_BANK_DEPTH), .ADC_CLK_DIV(ADC_CLK_DIV),
    .COLLECT_PERIOD(COLLECT_PERIOD), .RESCAN_PERIOD(RESCAN_PERIOD), .PKG_DEPTH(PKG_DEPTH)
  ) u_core (
    .clk, .rst_n, .mode, .se_id, .sleep_req, .scl_i, .sda_i, .scl_oe, .sda_oe,
    .adc_ce, .adc_sleep, .adc_done, .adc_code, .afe_en,
    .tx_valid, .tx_data, .tx_ready, .active_se, .bank_full
  );
endmodule
