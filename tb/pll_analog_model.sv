// pll_analog_model: behavioural stand-in (testbench only) for the analog part
// of the 915 MHz PLL: charge pump, programmable RC loop filter and LC VCO.
//
// Charge pump: +ICP while `up`, -ICP while `dn` (10 uA). Loop filter: R in
// series with C1, both across C2; C1 = 50..200 pF and R = 25..200 kOhm from
// 3-bit codes lf_ctrl[5:3] and lf_ctrl[2:0], C2 = C1/20 (2.5..10 pF). VCO:
//   f = F_BAND0 + vco_band * F_BAND_STEP + KVCO * (vctrl - 0.6 V)
//       + fsk_mod * fsk_idx * F_FSK_STEP
// The VCO gain, band step and FSK step are assumed values. The model advances
// in VCO half periods (forward Euler), sampling up/dn at each step, which is
// enough to close the loop in simulation.
module pll_analog_model #(
  parameter real ICP         = 10.0e-6,
  parameter real F_BAND0     = 880.0e6,
  parameter real F_BAND_STEP = 4.0e6,
  parameter real KVCO        = 100.0e6,
  parameter real F_FSK_STEP  = 50.0e3
) (
  input  logic       up,
  input  logic       dn,
  input  logic [5:0] lf_ctrl,
  input  logic [3:0] vco_band,
  input  logic       fsk_mod,
  input  logic [2:0] fsk_idx,
  output logic       vco_clk
);

  real vc1 = 0.6, vc2 = 0.6;   // voltages on C1 and C2 (vctrl = vc2)
  real f_now;                  // instantaneous VCO frequency, Hz

  initial begin
    vco_clk = 1'b0;
    forever begin
      real c1, c2, r, half, i_cp, i_r;
      c1 = 50.0e-12 + real'(lf_ctrl[5:3]) * 150.0e-12 / 7.0;
      c2 = c1 / 20.0;
      r  = 25.0e3 + real'(lf_ctrl[2:0]) * 175.0e3 / 7.0;
      f_now = F_BAND0 + real'(vco_band) * F_BAND_STEP + KVCO * (vc2 - 0.6)
            + (fsk_mod ? real'(fsk_idx) * F_FSK_STEP : 0.0);
      half = 0.5 / f_now;
      i_cp = up ? ICP : (dn ? -ICP : 0.0);
      if (up && dn) i_cp = 0.0;
      i_r  = (vc2 - vc1) / r;
      vc2 += (i_cp - i_r) * half / c2;
      vc1 += i_r * half / c1;
      if (vc2 < 0.0) vc2 = 0.0;
      if (vc2 > 1.2) vc2 = 1.2;
      #(half * 1.0e9) vco_clk = ~vco_clk;
    end
  end

endmodule
