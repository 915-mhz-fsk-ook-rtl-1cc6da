// fir_slow_tb: band-pass filtering of slow rhythms through the full SoC at its
// default parameters, with the sample rate lowered at run time to
// 14.32 MHz / (325 * 11 * 8) = 500 S/s per channel (rate.sar_div = 325).
//
// Banks 0 and 1 hold the same symmetric 16-tap band-pass centred near 30 Hz:
// a Hann-windowed cosine at 31.25 Hz with its DC term removed, scaled to a
// largest |M| of 255. Its taps are
//   -8 -60 -126 -150 -98 23 163 255 | mirrored
// Channel 0 receives a 31.25 Hz tone plus an equal 125 Hz tone (near a zero
// of the response); channel 8 receives a 31.25 Hz tone plus a larger 7.8 Hz
// tone (about 21 dB down). All tones sit on exact bins of a 64-sample DFT.
// Over 64 output samples after settling the testbench
//   * checks every output sample bit-exactly against a reference built from
//     floor(x * |M| / 4096) products and the direct-form sum,
//   * compares the 31.25 Hz gain with |H(f)| of the taps (within 15%),
//   * requires the 125 Hz tone to come out below 3 LSB of amplitude and the
//     7.8 Hz tone to be at least 15 dB further down than the 31.25 Hz one,
//   * checks the FIR clock period of channel 0 (28,600 crystal clocks).
module fir_slow_tb;
  import soc_pkg::*;
  localparam int    NCH = 64;
  localparam real   PI = 3.14159265358979;
  localparam int    NS = 64;       // analysed samples
  localparam int    SETTLE = 18;   // samples before analysis
  localparam int    SAR_DIV_SLOW = 325;
  localparam int    TAP [16] = '{-8, -60, -126, -150, -98, 23, 163, 255,
                                 255, 163, 23, -98, -150, -126, -60, -8};

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
  int x0 [$], x8 [$];         // applied samples
  real y0 [$], y8 [$];        // outputs (analysed window)
  int nout0 = 0, nout8 = 0;

  always #35 clk = ~clk;

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int in0(int k);
    return 2048 + int'($floor(600.0 * $sin(2.0 * PI * 4.0 * k / NS) + 600.0 * $sin(2.0 * PI * 16.0 * k / NS)));
  endfunction
  function automatic int in8(int k);
    return 2048 + int'($floor(500.0 * $sin(2.0 * PI * 4.0 * k / NS) + 1200.0 * $sin(2.0 * PI * 1.0 * k / NS)));
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
  always @(negedge clk) if (rst_n && dut.u_timing.sar_tick && dut.u_timing.phase == 10 && dut.u_timing.sel == 3'd7 &&
                            cfgv.mode.fir_en && !cfg_shift) begin
    vin[0] = 12'(in0(n));
    vin[8] = 12'(in8(n));
    x0.push_back(in0(n));
    x8.push_back(in8(n));
    n++;
  end

  // check outputs the clock after their delay line moves
  bit p0 = 0, p8 = 0;
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
    p0 = dut.g_bank[0].by_valid[0];
    p8 = dut.g_bank[1].by_valid[0];
  end

  // FIR clock period of channel 0
  int last_v = -1, cyc = 0, n_rate = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.g_bank[0].by_valid[0]) begin
      if (last_v >= 0) begin
        checks++;
        if (cyc - last_v != SAR_DIV_SLOW * 11 * 8) begin failures++; $display("FIR clock period %0d", cyc - last_v); end
        else n_rate++;
      end
      last_v = cyc;
    end
  end

  initial begin
    real a_pass0, a_stop0, a_pass8, a_low8, g_pass;
    for (int c = 0; c < NCH; c++) vin[c] = 12'd2048;
    cfgv = '0;
    cfgv.mode.fir_en = 1;
    cfgv.rate.sar_div = 10'(SAR_DIV_SLOW);
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 8; k++) begin
        cfgv.coef[b*8 + k].mag     = 8'(TAP[k] < 0 ? -TAP[k] : TAP[k]);
        cfgv.coef[b*8 + k].sign_lo = TAP[k] < 0;
        cfgv.coef[b*8 + k].sign_hi = TAP[15 - k] < 0;
      end
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      @(negedge clk); cfg_shift = 1; cfg_sdi = cfgv[i];
    end
    @(negedge clk); cfg_shift = 0;
    wait (y0.size() == NS && y8.size() == NS);
    a_pass0 = amp(y0, 4.0);  a_stop0 = amp(y0, 16.0);
    a_pass8 = amp(y8, 4.0);  a_low8  = amp(y8, 1.0);
    g_pass = gain(0, 4.0);
    $display("band-pass: 31.25 Hz out %0.2f / %0.2f (ideal %0.2f / %0.2f), 125 Hz out %0.2f, 7.8 Hz out %0.2f (ideal %0.2f)",
             a_pass0, a_pass8, 600.0 * g_pass, 500.0 * g_pass, a_stop0, a_low8, 1200.0 * gain(1, 1.0));
    checks++; if (a_pass0 < 0.85 * 600.0 * g_pass || a_pass0 > 1.15 * 600.0 * g_pass) begin failures++; $display("ch0 pass-band gain off"); end
    checks++; if (a_pass8 < 0.85 * 500.0 * g_pass || a_pass8 > 1.15 * 500.0 * g_pass) begin failures++; $display("ch8 pass-band gain off"); end
    checks++; if (a_stop0 > 3.0) begin failures++; $display("125 Hz not removed"); end
    checks++; if (20.0 * $log10((a_low8 / 1200.0) / (a_pass8 / 500.0)) > -15.0) begin failures++; $display("7.8 Hz not attenuated"); end
    checks++; if (n_rate < NS) begin failures++; $display("FIR clock period seen %0d times", n_rate); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
