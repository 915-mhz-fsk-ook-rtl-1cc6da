// neural_soc_tb: end-to-end test of the full 64-channel SoC at its default
// parameters (14.32 MHz crystal modelled by a 70 ns clock).
//
// Every amplifier output is held at its own constant level, so after settling
// every channel has one known value. The testbench loads the configuration
// chain, lets the design run, and decodes the transmitted packets from the
// modulator outputs alone (Manchester from fsk_mod in FSK mode, pa_on in OOK
// mode), then compares address and data with values computed here:
//   raw   : {2'b00, floor(v * 255 / 4096)}
//   FIR   : y = sum_k (s_k + s_15-k) * floor(v * |M_k| / 4096), sent as y[11:2]
// Sequence: raw/FSK, FIR/FSK over all 64 channels (banks with positive,
// negative and mixed signs), FIR with SELECT held (only channel 5 of each bank
// is filtered and sent; the other delay lines must not move, their value is
// not predicted because loading the chain passes through intermediate
// coefficient words), FIR/OOK, then the PLL divider and PFD with a slow and a
// fast VCO. It also checks the FIR clock
// period of a channel (8 conversions of 11 SAR clocks of 23 crystal clocks,
// or 1 conversion when held), the latency from sampling to a new output, and
// counts each mechanism, failing any that
// never happened.
module neural_soc_tb;
  import soc_pkg::*;
  localparam int NCH = 64;

  logic clk = 0, rst_n = 0;
  logic [11:0] vin [NCH];
  logic cfg_shift = 0, cfg_sdi = 0, cfg_sdo, tx_en = 0, fsk_mod, pa_on;
  logic [3:0] pa_pwr, vco_band;
  logic [2:0] fsk_idx;
  logic [5:0] lf_ctrl;
  logic ook_mode, vco_clk, div_out, pfd_up, pfd_dn;

  neural_soc dut (.*);

  int checks = 0, failures = 0;
  soc_cfg_t cfgv;
  int exp_data [NCH];
  int frozen_val [NCH];
  bit check_on = 0;
  int k = -1;          // clocks since the current packet stream started
  logic [15:0] sh;
  int nb = 0;

  // mechanism counters
  int n_cfg = 0, n_raw = 0, n_fir = 0, n_neg = 0, n_hold = 0, n_frozen = 0,
      n_fsk = 0, n_ook = 0, n_wrap = 0, n_rate = 0, n_hrate = 0, n_up = 0, n_dn = 0, n_div = 0;

  always #35 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- config
  // The chain has no shadow register, so the rate dividers pass through
  // intermediate values while it shifts: the transmitter is paused around the
  // load (the packet in flight completes first) and the receiver restarts.
  task automatic load_cfg();
    bit tx_was = tx_en;
    if (tx_was) begin
      tx_en = 0;
      repeat (200) @(negedge clk);
    end
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      @(negedge clk); cfg_shift = 1; cfg_sdi = cfgv[i];
    end
    @(negedge clk); cfg_shift = 0;
    if (tx_was) begin
      k = -1; nb = 0;
      tx_en = 1;
    end
    n_cfg++;
    checks++;
    if (pa_pwr != cfgv.rf.pa_pwr || vco_band != cfgv.rf.vco_band || fsk_idx != cfgv.rf.fsk_idx ||
        lf_ctrl != cfgv.rf.lf || ook_mode != cfgv.rf.ook) begin
      failures++; $display("RF program bits wrong");
    end
  endtask

  function automatic int fir_steady(int c, int v);
    int b = c / 8, y = 0;
    for (int k = 0; k < 8; k++) begin
      int p = v * int'(cfgv.coef[b*8 + k].mag) / 4096;
      y += (cfgv.coef[b*8 + k].sign_lo ? -p : p) + (cfgv.coef[b*8 + k].sign_hi ? -p : p);
    end
    return y;
  endfunction

  function automatic int to_data(int y);
    logic [11:0] w = 12'(y);
    return int'(w[11:2]);
  endfunction

  // ---------------------------------------------------------------- receiver
  bit pkt_valid = 1;
  logic first;
  always @(posedge clk) if (k >= 0) k++; else if (tx_en && rst_n) k = 0;

  always @(negedge clk) if (k >= 3) begin
    int j;
    logic second;
    j = (k - 3) % 10;
    if (!check_on) pkt_valid = 0;
    if (j == 0) begin
      if (nb == 0) pkt_valid = check_on;
      first = ook_mode ? pa_on : fsk_mod;
      if (!pkt_valid) ;
      else if (!ook_mode) begin
        checks++;
        if (!pa_on) begin failures++; $display("PA off in FSK mode"); end
      end else begin
        checks++;
        if (fsk_mod) begin failures++; $display("FSK line active in OOK mode"); end
      end
    end else if (j == 5) begin
      second = ook_mode ? pa_on : fsk_mod;
      if (pkt_valid) begin
        checks++;
        if (ook_mode ? (second != first) : (second == first)) begin
          failures++; $display("bad %s bit at clock %0d", ook_mode ? "OOK" : "Manchester", k);
        end
      end
      sh = {sh[14:0], first};
      nb++;
      if (nb == 16) begin
        nb = 0;
        if (pkt_valid && check_on) begin
          automatic int a = int'(sh[15:10]);
          checks++;
          if (exp_data[a] < 0) begin
            failures++; $display("ch %0d is not filtered in this mode but was sent", a);
          end else if (int'(sh[9:0]) != exp_data[a]) begin
            failures++; $display("ch %0d data %0d expected %0d", a, sh[9:0], exp_data[a]);
          end
          if (ook_mode) n_ook++; else n_fsk++;
          if (a == 63) n_wrap++;
          if (!cfgv.mode.fir_en) n_raw++;
          else begin
            n_fir++;
            if (sh[9]) n_neg++;
            if (cfgv.mode.sel_hold) begin
              if (a % 8 == int'(cfgv.mode.sel_ch)) n_hold++;
            end
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- FIR rate
  // latency: first clock of the sample phase to the first clock y holds the
  // new output (23 * 10 + 1 = 231 crystal clocks)
  int last_v = -1, cyc = 0, t_samp = -1, n_lat = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_timing.sel == 3'd5 && dut.u_timing.phase == 4'd0 && dut.u_timing.divcnt == '0) t_samp = cyc;
    if (dut.g_bank[2].u_bank.y_valid[5] && t_samp >= 0) begin
      checks++;
      if (cyc + 1 - t_samp != 231) begin failures++; $display("FIR latency %0d clocks", cyc + 1 - t_samp); end
      else n_lat++;
    end
    if (dut.g_bank[2].u_bank.y_valid[5]) begin
      if (last_v >= 0) begin
        automatic int d = cyc - last_v;
        checks++;
        if (cfgv.mode.sel_hold ? (d != 23 * 11) : (d != 23 * 11 * 8)) begin
          failures++; $display("FIR clock period %0d", d);
        end
        else if (cfgv.mode.sel_hold) n_hrate++; else n_rate++;
      end
      last_v = cyc;
    end
    if (cfg_shift) last_v = -1;
  end

  // ---------------------------------------------------------------- PLL
  realtime t_up;
  always @(posedge pfd_up) t_up = $realtime;
  always @(negedge pfd_up) if ($realtime - t_up > 0.05) n_up++;
  realtime t_dn;
  always @(posedge pfd_dn) t_dn = $realtime;
  always @(negedge pfd_dn) if ($realtime - t_dn > 0.05) n_dn++;

  // two free-running VCO models, 2% slow and 2% fast, gated onto vco_clk
  localparam realtime SLOW_HALF = 35.0 / 64.0 * 1.02;
  localparam realtime FAST_HALF = 35.0 / 64.0 * 0.98;
  logic osc_slow = 0, osc_fast = 0;
  bit vco_run = 0, vco_fast = 0;
  always #(SLOW_HALF) osc_slow = ~osc_slow;
  always #(FAST_HALF) osc_fast = ~osc_fast;
  assign vco_clk = vco_run && (vco_fast ? osc_fast : osc_slow);

  task automatic run_vco(input bit fast, input int ncyc, output int ups, output int dns);
    int u0 = n_up, d0 = n_dn;
    realtime t0 = -1.0, tr;
    realtime half_period = fast ? FAST_HALF : SLOW_HALF;
    vco_fast = fast;
    vco_run = 1;
    @(posedge div_out);
    repeat (ncyc) begin
      @(posedge div_out);
      tr = $realtime;
      if (t0 >= 0) begin
        checks++;
        if (tr - t0 < 128.0 * half_period - 0.2 || tr - t0 > 128.0 * half_period + 0.2) begin
          failures++; $display("divider period %f", tr - t0);
        end else n_div++;
      end
      t0 = tr;
    end
    vco_run = 0;
    ups = n_up - u0; dns = n_dn - d0;
  endtask

  // ---------------------------------------------------------------- sequence
  // Channels with exp_data < 0 are not sent; their filter outputs must not move.
  task automatic settle_and_check(input int clocks, input int rounds = 1);
    check_on = 0;
    repeat (clocks) @(negedge clk);
    foreach (frozen_val[c]) frozen_val[c] = int'(dut.y[c]);
    check_on = 1;
    repeat (rounds * 64 * 160 + 400) @(negedge clk);
    check_on = 0;
    foreach (exp_data[c]) if (exp_data[c] < 0) begin
      checks++;
      if (int'(dut.y[c]) != frozen_val[c]) begin
        failures++; $display("frozen ch %0d moved %0d -> %0d", c, frozen_val[c], dut.y[c]);
      end else n_frozen++;
    end
  endtask

  initial begin
    int ups, dns;
    for (int c = 0; c < NCH; c++) vin[c] = 12'(300 + 57 * c);
    cfgv = '0;
    cfgv.rf.pa_pwr = 4'hf; cfgv.rf.vco_band = 4'h8; cfgv.rf.fsk_idx = 3'd3; cfgv.rf.lf = 6'b100_010;
    for (int c = 0; c < NCH; c++) begin
      automatic int b = c / 8;
      automatic logic [2:0] kk = 3'(c % 8);
      cfgv.coef[c].mag = 8'(2 + 4 * int'(kk));
      case (b % 4)
        0: begin cfgv.coef[c].sign_lo = 0; cfgv.coef[c].sign_hi = 0; end           // low-pass
        1: begin cfgv.coef[c].sign_lo = 1; cfgv.coef[c].sign_hi = 1; end           // inverted
        2: begin cfgv.coef[c].sign_lo = kk[0]; cfgv.coef[c].sign_hi = ~kk[0]; end  // mixed
        default: begin cfgv.coef[c].sign_lo = (kk > 5); cfgv.coef[c].sign_hi = 0; end
      endcase
    end
    repeat (4) @(negedge clk);
    rst_n = 1;

    // 1. raw conversion, FSK
    load_cfg();
    for (int c = 0; c < NCH; c++) exp_data[c] = int'(vin[c]) * 255 / 4096;
    tx_en = 1;
    settle_and_check(600);

    // 2. FIR on all 64 channels, FSK
    cfgv.mode.fir_en = 1;
    load_cfg();
    for (int c = 0; c < NCH; c++) exp_data[c] = to_data(fir_steady(c, int'(vin[c])));
    settle_and_check(18 * 2024);

    // 3. FIR with SELECT held at channel 5 of every bank; new input on those
    cfgv.mode.sel_hold = 1; cfgv.mode.sel_ch = 3'd5;
    load_cfg();
    for (int c = 5; c < NCH; c += 8) vin[c] = vin[c] + 12'd150;
    for (int c = 0; c < NCH; c++) exp_data[c] = (c % 8 == 5) ? to_data(fir_steady(c, int'(vin[c]))) : -1;
    settle_and_check(18 * 253 + 600, 2);

    // 4. FIR over all channels again, OOK
    cfgv.mode.sel_hold = 0; cfgv.rf.ook = 1;
    load_cfg();
    for (int c = 0; c < NCH; c++) exp_data[c] = to_data(fir_steady(c, int'(vin[c])));
    settle_and_check(18 * 2024);
    tx_en = 0;

    // 5. PLL divider and PFD: VCO slightly slow, then slightly fast
    run_vco(1'b0, 100, ups, dns);
    checks++;
    if (ups < 20 || ups <= dns) begin failures++; $display("slow VCO: up %0d dn %0d", ups, dns); end
    run_vco(1'b1, 100, ups, dns);
    checks++;
    if (dns < 20 || dns <= ups) begin failures++; $display("fast VCO: up %0d dn %0d", ups, dns); end

    $display("mechanisms: cfg %0d raw %0d fir %0d negative %0d held %0d frozen %0d fsk %0d ook %0d wrap %0d rate %0d heldrate %0d up %0d dn %0d div %0d latency %0d",
             n_cfg, n_raw, n_fir, n_neg, n_hold, n_frozen, n_fsk, n_ook, n_wrap, n_rate, n_hrate, n_up, n_dn, n_div, n_lat);
    if (n_cfg == 0)    begin failures++; $display("never: configuration load"); end
    if (n_raw == 0)    begin failures++; $display("never: raw conversion packet"); end
    if (n_fir == 0)    begin failures++; $display("never: FIR packet"); end
    if (n_neg == 0)    begin failures++; $display("never: negative FIR output"); end
    if (n_hold == 0)   begin failures++; $display("never: held-SELECT channel"); end
    if (n_frozen == 0) begin failures++; $display("never: frozen channel in held mode"); end
    if (n_fsk == 0)    begin failures++; $display("never: FSK packet"); end
    if (n_ook == 0)    begin failures++; $display("never: OOK packet"); end
    if (n_wrap == 0)   begin failures++; $display("never: address wrap"); end
    if (n_rate == 0)   begin failures++; $display("never: FIR clock period"); end
    if (n_hrate == 0)  begin failures++; $display("never: held FIR clock period"); end
    if (n_up == 0)     begin failures++; $display("never: PFD up"); end
    if (n_dn == 0)     begin failures++; $display("never: PFD down"); end
    if (n_div == 0)    begin failures++; $display("never: divider period"); end
    if (n_lat == 0)    begin failures++; $display("never: FIR latency"); end
    checks += 15;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
