// pll_lock_tb: closes the PLL around the digital divide-by-64 and PFD with the
// behavioural charge pump / loop filter / VCO model. From a VCO that starts
// several MHz off, the loop must settle so that the VCO runs at exactly 64
// times the reference (VCO edges counted over 500 reference periods, within 0.05%), first with
// the carrier unmodulated (OOK setting) and then with Manchester-coded FSK data
// applied to the varactors, which the loop must not track out: the mean
// frequency stays locked while the frequency under fsk_mod = 1 sits above the
// frequency under fsk_mod = 0.
module pll_lock_tb;
  localparam realtime TREF = 70.0;      // ns, 14.29 MHz reference
  logic ref_clk = 0, rst_n = 0, div_out, up, dn, vco_clk;
  logic fsk_mod = 0;
  logic [2:0] fsk_idx = 3'd4;
  int checks = 0, failures = 0;
  int nvco = 0, nref = 0;
  real f_hi_sum = 0, f_lo_sum = 0;
  int  n_hi = 0, n_lo = 0;
  bit  fsk_on = 0;

  freq_divider #(.STAGES(6)) u_div (.fin(vco_clk), .rst_n, .fout(div_out));
  pfd u_pfd (.ref_clk, .div_clk(div_out), .rst_n, .up, .dn);
  pll_analog_model u_ana (.up, .dn, .lf_ctrl(6'b111_000), .vco_band(4'd8), .fsk_mod, .fsk_idx, .vco_clk);

  always #(TREF / 2.0) ref_clk = ~ref_clk;
  always @(posedge vco_clk) nvco++;
  always @(posedge ref_clk) nref++;

  // Manchester-coded pseudo-random data, 5 reference clocks per half bit
  int hc = 0; logic dbit = 0; logic [15:0] lfsr = 16'hace1;
  always @(posedge ref_clk) if (fsk_on) begin
    hc = (hc + 1) % 10;
    if (hc == 0) begin lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]}; dbit = lfsr[0]; end
    fsk_mod = dbit ^ (hc >= 5);
  end
  always @(posedge vco_clk) if (fsk_on) begin
    if (fsk_mod) begin f_hi_sum += u_ana.f_now; n_hi++; end
    else         begin f_lo_sum += u_ana.f_now; n_lo++; end
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input string what);
    int v0, r0;
    real ratio;
    @(posedge ref_clk);
    v0 = nvco; r0 = nref;
    repeat (500) @(posedge ref_clk);
    ratio = real'(nvco - v0) / real'(nref - r0);
    $display("%s: VCO/ref = %0.4f, VCO %0.2f MHz", what, ratio, u_ana.f_now / 1.0e6);
    checks++;
    if (ratio < 64.0 * 0.9995 || ratio > 64.0 * 1.0005) begin failures++; $display("%s: not locked", what); end
  endtask

  initial begin
    real f_start;
    #100 rst_n = 1;
    #1;
    f_start = u_ana.f_now;
    checks++;
    if (f_start > 64.0e3 / TREF * 0.995 && f_start < 64.0e3 / TREF * 1.005) begin failures++; $display("VCO starts locked"); end
    #200us;
    measure("carrier");
    measure("carrier");
    fsk_on = 1;
    #50us;
    f_hi_sum = 0; f_lo_sum = 0; n_hi = 0; n_lo = 0;
    measure("FSK");
    checks++;
    if (f_hi_sum / n_hi - f_lo_sum / n_lo < 100.0e3) begin
      failures++; $display("FSK deviation %0.1f kHz", (f_hi_sum / n_hi - f_lo_sum / n_lo) / 1.0e3);
    end else $display("FSK deviation %0.1f kHz", (f_hi_sum / n_hi - f_lo_sum / n_lo) / 1.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
