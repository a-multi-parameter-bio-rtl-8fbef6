// Behavioural model (not synthesizable logic) of the programmable analog
// front-end: current-balanced instrumentation amplifier (Stage 1), capacitive
// gain stage (Stage 2), switched-capacitor programmable gain stage (Stage 3)
// and the unit output buffer.
//
// The differential input is vin - vref (the local electrode against the
// common REF line). Gains: Stage 1 = R2/R1 = 300k/40k = 7.5, Stage 2 =
// Cin/Cf = 12.5, Stage 3 = 1 + CT/Cf with CT set by gain_sel. The document
// gives eight Stage-3 gains from 2 to 19 V/V; this model spaces them evenly,
// 2 + gain_sel * 17/7, for an overall 45.5 dB .. 65 dB. The response is one
// high-pass pole at 0.3 Hz and one low-pass pole at 80, 260, 400 or 1500 Hz
// chosen by bw_sel = 0..3, each integrated with forward Euler steps of DT
// seconds, one per clock; reset or en low discharges them. The output sits on VCM (mid-scale of the ADC) and
// is clipped to 0..2*VCM. With en low the output rests at VCM.
module afe_model #(
  parameter real DT  = 1.0e-6,
  parameter real VCM = 0.4
) (
  input  logic       clk,
  input  logic       rst_n,       // power-on: discharges the filter states
  input  logic       en,
  input  real        vin,
  input  real        vref,
  input  logic [2:0] gain_sel,
  input  logic [1:0] bw_sel,
  output real        vout
);
  localparam real PI = 3.14159265358979;
  real g3, gain, fc, hp_in_q, hp_y, lp_y, vx;

  always_comb begin
    g3   = 2.0 + real'(gain_sel) * 17.0 / 7.0;
    gain = 7.5 * 12.5 * g3;
    unique case (bw_sel)
      2'd0:    fc = 80.0;
      2'd1:    fc = 260.0;
      2'd2:    fc = 400.0;
      default: fc = 1500.0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      hp_in_q <= 0.0;
      hp_y    <= 0.0;
      lp_y    <= 0.0;
    end else begin
      // high-pass: y' = x' - 2*pi*fl*y
      hp_in_q <= vin - vref;
      hp_y    <= hp_y + ((vin - vref) - hp_in_q) - 2.0 * PI * 0.3 * DT * hp_y;
      // low-pass: y' = 2*pi*fc*(g*x - y)
      lp_y    <= lp_y + 2.0 * PI * fc * DT * (gain * hp_y - lp_y);
    end
  end

  always_comb begin
    vx = VCM + lp_y;
    if (vx < 0.0)            vout = 0.0;
    else if (vx > 2.0 * VCM) vout = 2.0 * VCM;
    else                     vout = vx;
  end
endmodule
