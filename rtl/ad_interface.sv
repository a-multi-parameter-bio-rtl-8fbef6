// A/D Interface of a Sensing-Electrode.
//
// Generates the ADC conversion clock as a clock enable (adc_ce, one pulse
// every ADC_CLK_DIV system clocks: 100 kHz from the 1 MHz system clock), keeps
// the ADC asleep while acquisition is off, and hands every finished
// conversion to the sensing FSM as a one-clock sample_valid pulse with the
// 8-bit code. A restart pulse (the Syn-Sample command) puts the converter to
// sleep for one clock and restarts the clock divider, so that every SE that
// received the same broadcast converts in step. Converted codes are counted
// in sample_cnt for status. The 100 kHz ADC clock follows the document; the
// divider, the restart scheme and the handshake are this design's choices.
module ad_interface #(
  parameter int unsigned ADC_CLK_DIV = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       acq_en,       // acquisition on
  input  logic       restart,      // pulse: resynchronise the converter
  output logic       adc_ce,       // ADC clock enable
  output logic       adc_sleep,    // ADC power-down / reset
  input  logic       adc_done,     // conversion finished (one clk pulse)
  input  logic [7:0] adc_code,
  output logic       sample_valid,
  output logic [7:0] sample,
  output logic [15:0] sample_cnt
);
  localparam int unsigned DW = (ADC_CLK_DIV > 1) ? $clog2(ADC_CLK_DIV) : 1;
  logic [DW-1:0] div;

  assign adc_sleep = !acq_en || restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div          <= '0;
      adc_ce       <= 1'b0;
      sample_valid <= 1'b0;
      sample       <= '0;
      sample_cnt   <= '0;
    end else begin
      sample_valid <= 1'b0;
      if (adc_sleep) begin
        div    <= '0;
        adc_ce <= 1'b0;
      end else begin
        adc_ce <= (div == DW'(ADC_CLK_DIV - 1));
        div    <= (div == DW'(ADC_CLK_DIV - 1)) ? '0 : div + 1'b1;
        if (adc_done) begin
          sample_valid <= 1'b1;
          sample       <= adc_code;
          sample_cnt   <= sample_cnt + 1'b1;
        end
      end
    end
  end
endmodule
