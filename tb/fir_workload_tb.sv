// fir_workload_tb: frequency-selective filtering through the full SoC at its
// default parameters (64-channel FIR mode, 7.08 kS/s per channel).
//
// Bank 0 holds a 16-tap moving-average low-pass (all |M| = 16, all positive):
// channel 0 receives a 27.6 Hz tone plus a larger 801.6 Hz interferer, the
// situation of a slow neural rhythm under high-frequency noise. Bank 1 holds an
// antisymmetric set (taps 0..7 = +16, taps 8..15 = -16), which has an exact
// zero at DC: channel 8 receives a 497.5 Hz tone on a large DC offset.
// Bank 2 holds a band-pass for the spike band: a Hann-windowed 1 kHz cosine
// with its DC term removed, taps 3 21 12 -70 -162 -125 66 255 | mirrored.
// Channel 16 receives a small 994.9 Hz tone under a large 55.3 Hz
// interferer, the mains-pickup case; the interferer must end up at least
// 30 dB further down than the tone (45 dB by design).
// Both tones sit on exact bins of a 512-sample DFT. Over 512 output samples
// after settling the testbench
//   * checks every output sample bit-exactly against a reference built from
//     floor(x * |M| / 4096) products and the direct-form sum,
//   * measures each tone's output amplitude by correlation and compares the
//     gain with |H(f)| of the programmed coefficients (DTFT, within 15%),
//   * checks that the low-pass attenuates the interferer by more than 15 dB
//     relative to the slow tone, and that the DC offset is removed.
module fir_workload_tb;
  import soc_pkg::*;
  localparam int    NCH = 64;
  localparam real   PI = 3.14159265358979;
  localparam int    NS = 512;      // analysed samples
  localparam int    SETTLE = 20;   // samples before analysis

  logic clk = 0, rst_n = 0;
  logic [11:0] vin [NCH];
  logic cfg_shift = 0, cfg_sdi = 0, cfg_sdo, tx_en = 0, fsk_mod, pa_on;
  logic [3:0] pa_pwr, vco_band;
  logic [2:0] fsk_idx;
  logic [5:0] lf_ctrl;
  logic ook_mode, vco_clk = 0, div_out, pfd_up, pfd_dn;

  neural_soc dut (.*);

  int checks = 0, failures = 0;
  soc_cfg_t cfgv;
  int n = 0;                  // input sample index of channels 0 and 8
  int x0 [$], x8 [$], x16 [$];   // applied samples
  real y0 [$], y8 [$], y16 [$];  // outputs (analysed window)
  int nout0 = 0, nout8 = 0, nout16 = 0;
  localparam int BP [8] = '{3, 21, 12, -70, -162, -125, 66, 255};

  always #35 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int in0(int k);
    return 2048 + int'($floor(600.0 * $sin(2.0 * PI * 2.0 * k / NS) + 1200.0 * $sin(2.0 * PI * 58.0 * k / NS)));
  endfunction
  function automatic int in8(int k);
    return 2400 + int'($floor(1500.0 * $sin(2.0 * PI * 36.0 * k / NS)));
  endfunction

  function automatic int in16(int k);
    return 2048 + int'($floor(1400.0 * $sin(2.0 * PI * 4.0 * k / NS) + 300.0 * $sin(2.0 * PI * 72.0 * k / NS)));
  endfunction

  function automatic int coef_of(int b, int i);   // signed coefficient of tap i in bank b
    int k = (i < 8) ? i : 15 - i;
    bit s = (i < 8) ? cfgv.coef[b*8 + k].sign_lo : cfgv.coef[b*8 + k].sign_hi;
    return s ? -int'(cfgv.coef[b*8 + k].mag) : int'(cfgv.coef[b*8 + k].mag);
  endfunction

  function automatic int ref_y(int b, ref int xs [$]);
    int y = 0, last = xs.size() - 1;
    for (int i = 0; i < 16; i++) if (last - i >= 0) begin
      int c = coef_of(b, i);
      int p = xs[last - i] * (c < 0 ? -c : c) / 4096;
      y += (c < 0) ? -p : p;
    end
    return int'($signed(12'(y)));
  endfunction

  function automatic real gain(int b, real bin);   // |H| of the programmed taps / 4096
    real re = 0, im = 0;
    for (int i = 0; i < 16; i++) begin
      re += coef_of(b, i) * $cos(2.0 * PI * bin * i / NS);
      im -= coef_of(b, i) * $sin(2.0 * PI * bin * i / NS);
    end
    return $sqrt(re * re + im * im) / 4096.0;
  endfunction

  function automatic real amp(ref real ys [$], input real bin);
    real re = 0, im = 0;
    for (int i = 0; i < NS; i++) begin
      re += ys[i] * $cos(2.0 * PI * bin * i / NS);
      im += ys[i] * $sin(2.0 * PI * bin * i / NS);
    end
    return 2.0 * $sqrt(re * re + im * im) / NS;
  endfunction

  // apply a new sample to channels 0 and 8 just before SELECT returns to 0
  always @(negedge clk) if (rst_n && dut.u_timing.sar_tick && dut.u_timing.phase == 10 && dut.u_timing.sel == 3'd7 && cfgv.mode.fir_en) begin
    vin[0] = 12'(in0(n));
    vin[8] = 12'(in8(n));
    vin[16] = 12'(in16(n));
    x0.push_back(in0(n));
    x8.push_back(in8(n));
    x16.push_back(in16(n));
    n++;
  end

  // check outputs the clock after their delay line moves
  bit p0 = 0, p8 = 0, p16 = 0;
  always @(negedge clk) if (rst_n) begin
    if (p0) begin
      checks++;
      if (dut.y[0] !== 12'(ref_y(0, x0))) begin failures++; $display("ch0 sample %0d: %0d expected %0d", x0.size(), dut.y[0], ref_y(0, x0)); end
      nout0++;
      if (nout0 > SETTLE && y0.size() < NS) y0.push_back(real'(dut.y[0]));
    end
    if (p8) begin
      checks++;
      if (dut.y[8] !== 12'(ref_y(1, x8))) begin failures++; $display("ch8 sample %0d: %0d expected %0d", x8.size(), dut.y[8], ref_y(1, x8)); end
      nout8++;
      if (nout8 > SETTLE && y8.size() < NS) y8.push_back(real'(dut.y[8]));
    end
    if (p16) begin
      checks++;
      if (dut.y[16] !== 12'(ref_y(2, x16))) begin failures++; $display("ch16 sample %0d: %0d expected %0d", x16.size(), dut.y[16], ref_y(2, x16)); end
      nout16++;
      if (nout16 > SETTLE && y16.size() < NS) y16.push_back(real'(dut.y[16]));
    end
    p0 = dut.g_bank[0].by_valid[0];
    p8 = dut.g_bank[1].by_valid[0];
    p16 = dut.g_bank[2].by_valid[0];
  end

  initial begin
    real a_lo, a_hi, g_lo, g_hi, a_hp, g_hp, mean8, x_lo, x_hi, a_sp, a_mains, g_sp;
    for (int c = 0; c < NCH; c++) vin[c] = 12'd2048;
    cfgv = '0;
    cfgv.mode.fir_en = 1;
    for (int k = 0; k < 8; k++) begin
      cfgv.coef[k].mag = 8'd16;                                   // bank 0: low-pass
      cfgv.coef[8 + k].mag = 8'd16; cfgv.coef[8 + k].sign_hi = 1; // bank 1: zero at DC
      cfgv.coef[16 + k].mag = 8'(BP[k] < 0 ? -BP[k] : BP[k]);     // bank 2: spike band
      cfgv.coef[16 + k].sign_lo = BP[k] < 0;
      cfgv.coef[16 + k].sign_hi = BP[k] < 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      @(negedge clk); cfg_shift = 1; cfg_sdi = cfgv[i];
    end
    @(negedge clk); cfg_shift = 0;
    wait (y0.size() == NS && y8.size() == NS && y16.size() == NS);

    // analysed window starts at output SETTLE+1, i.e. input index SETTLE of x
    a_lo = amp(y0, 2.0);  a_hi = amp(y0, 58.0);  a_hp = amp(y8, 36.0);
    x_lo = 600.0 / 4096.0; x_hi = 1200.0 / 4096.0;
    g_lo = gain(0, 2.0);  g_hi = gain(0, 58.0);  g_hp = gain(1, 36.0);
    mean8 = 0; foreach (y8[i]) mean8 += y8[i]; mean8 /= NS;
    $display("low-pass: 27.6 Hz out %0.2f (ideal %0.2f), 801.6 Hz out %0.2f (ideal %0.2f)", a_lo, 600.0 * g_lo, a_hi, 1200.0 * g_hi);
    $display("antisymmetric: 497.5 Hz out %0.2f (ideal %0.2f), mean %0.3f", a_hp, 1500.0 * g_hp, mean8);
    checks++; if (a_lo < 0.85 * 600.0 * g_lo || a_lo > 1.15 * 600.0 * g_lo) begin failures++; $display("slow tone gain off"); end
    checks++; if (a_hi < 0.85 * 1200.0 * g_hi - 1.0 || a_hi > 1.15 * 1200.0 * g_hi + 1.0) begin failures++; $display("interferer gain off"); end
    checks++; if (20.0 * $log10((a_hi / x_hi) / (a_lo / x_lo)) > -15.0) begin failures++; $display("interferer not suppressed"); end
    checks++; if (a_hp < 0.85 * 1500.0 * g_hp || a_hp > 1.15 * 1500.0 * g_hp) begin failures++; $display("high-pass tone gain off"); end
    checks++; if (mean8 > 1.0 || mean8 < -1.0) begin failures++; $display("DC offset not removed"); end
    a_sp = amp(y16, 72.0); a_mains = amp(y16, 4.0); g_sp = gain(2, 72.0);
    $display("spike band: 994.9 Hz out %0.2f (ideal %0.2f), 55.3 Hz out %0.2f (ideal %0.2f), relative %0.1f dB",
             a_sp, 300.0 * g_sp, a_mains, 1400.0 * gain(2, 4.0), 20.0 * $log10((a_mains / 1400.0) / (a_sp / 300.0)));
    checks++; if (a_sp < 0.85 * 300.0 * g_sp || a_sp > 1.15 * 300.0 * g_sp) begin failures++; $display("spike-band gain off"); end
    checks++; if (20.0 * $log10((a_mains / 1400.0) / (a_sp / 300.0)) > -30.0) begin failures++; $display("mains interferer not suppressed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
