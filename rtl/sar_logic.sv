// Successive approximation register of the 8-bit SAR ADC.
//
// Runs on the ADC clock, given as the enable ce (100 kHz). A conversion takes
// CONV_CYCLES ADC clocks (30, giving the 3.3 kS/s the system samples at):
// the first CONV_CYCLES-N-1 clocks track the input (sample high, switches S1
// and S2 closed), then the array is set to mid-scale and N binary-search
// steps follow. In each step the comparator (comp = 1 when the held input is
// at or above the array voltage) keeps or clears the bit under trial and the
// next lower bit is set for trial. After the last step code is updated and
// done pulses for one system clock; the next conversion starts at once.
// sleep holds the register in reset. The conversion rate and clock follow
// the document; the split of the 30 clocks into tracking and search is this
// design's choice.
module sar_logic #(
  parameter int unsigned N           = 8,
  parameter int unsigned CONV_CYCLES = 30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         sleep,
  input  logic         comp,
  output logic         sample,     // tracking phase: input connected to the array
  output logic [N-1:0] dac,        // capacitor array switch settings
  output logic [N-1:0] code,
  output logic         done
);
  localparam int unsigned SAMP_END = CONV_CYCLES - N - 2;  // last tracking clock
  localparam int unsigned CW = $clog2(CONV_CYCLES);

  logic [CW-1:0]        cnt;
  logic [$clog2(N)-1:0] bidx;
  logic [N-1:0]         trial;

  always_comb begin
    trial = dac;
    if (!comp) trial[bidx] = 1'b0;
    if (bidx != '0) trial[bidx - 1'b1] = 1'b1;
  end

  assign sample = !sleep && (cnt <= CW'(SAMP_END));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      bidx <= '0;
      dac  <= '0;
      code <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (sleep) begin
        cnt  <= '0;
        bidx <= '0;
        dac  <= '0;
      end else if (ce) begin
        cnt <= (cnt == CW'(CONV_CYCLES - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CW'(SAMP_END)) begin
          dac  <= {1'b1, {(N-1){1'b0}}};
          bidx <= ($clog2(N))'(N - 1);
        end else if (cnt > CW'(SAMP_END) && cnt <= CW'(SAMP_END + N)) begin
          dac <= trial;
          if (bidx == '0) begin
            code <= trial;
            done <= 1'b1;
          end else begin
            bidx <= bidx - 1'b1;
          end
        end
      end
    end
  end

  initial assert (CONV_CYCLES >= N + 2) else $error("sar_logic: CONV_CYCLES too small");
endmodule
