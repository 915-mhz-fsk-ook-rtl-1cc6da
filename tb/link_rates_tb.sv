// link_rates_tb: the full SoC at its default parameters, run at the other
// rates through the runtime dividers of the configuration chain.
//   A. raw conversion, FSK at half_div = 6: 14.32 MHz / 12 = 1.19 Mb/s
//   B. raw conversion, OOK at half_div = 716: 14.32 MHz / 1432 = 10.0 kb/s
//   C. 64-channel FIR at sar_div = 325: 14.32 MHz / (325 * 11 * 8) = 500 S/s
//      per channel, with the link back at its default rate (half_div = 0)
// Packets are decoded from fsk_mod / pa_on with the bit length the testbench
// expects, so a wrong bit rate shows up as wrong packets. Every decoded packet
// must carry the next address (after the first) and that channel's expected
// value. In C the FIR clock period of channel 0 is also measured.
module link_rates_tb;
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

  assign vco_clk = 1'b0;

  int checks = 0, failures = 0;
  soc_cfg_t cfgv;
  int exp_data [NCH];
  int hlen = 5;          // half-bit length the receiver assumes
  int k = -1;            // clocks since the current packet stream started
  int nb = 0, npkt = 0, exp_addr = 0;
  logic [15:0] sh;
  logic first;

  always #35 clk = ~clk;

  initial begin
    #300ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_cfg();
    tx_en = 0;
    repeat (40 * hlen) @(negedge clk);   // the packet in flight completes
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      @(negedge clk); cfg_shift = 1; cfg_sdi = cfgv[i];
    end
    @(negedge clk); cfg_shift = 0;
    hlen = (cfgv.rate.half_div == '0) ? 5 : int'(cfgv.rate.half_div);
  endtask

  task automatic start_tx();
    k = -1; nb = 0; npkt = 0; exp_addr = -1;   // the address carries on
    tx_en = 1;
  endtask

  function automatic int fir_steady(int c, int v);
    int b = c / 8, y = 0;
    for (int kk = 0; kk < 8; kk++) begin
      int p = v * int'(cfgv.coef[b*8 + kk].mag) / 4096;
      y += (cfgv.coef[b*8 + kk].sign_lo ? -p : p) + (cfgv.coef[b*8 + kk].sign_hi ? -p : p);
    end
    return y;
  endfunction

  function automatic int to_data(int y);
    logic [11:0] w = 12'(y);
    return int'(w[11:2]);
  endfunction

  // receiver: first half of each bit sampled 3 clocks in, second half H later
  always @(posedge clk) if (k >= 0) k++; else if (tx_en && rst_n) k = 0;

  always @(negedge clk) if (k >= 3 && tx_en) begin
    int j;
    logic second;
    j = (k - 3) % (2 * hlen);
    if (j == 0) begin
      first = ook_mode ? pa_on : fsk_mod;
    end else if (j == hlen) begin
      second = ook_mode ? pa_on : fsk_mod;
      checks++;
      if (ook_mode ? (second != first) : (second == first)) begin
        failures++; $display("bad %s bit at clock %0d", ook_mode ? "OOK" : "Manchester", k);
      end
      sh = {sh[14:0], first};
      nb++;
      if (nb == 16) begin
        nb = 0;
        if (exp_addr < 0) exp_addr = int'(sh[15:10]);
        checks++;
        if (int'(sh[15:10]) != exp_addr || int'(sh[9:0]) != exp_data[exp_addr]) begin
          failures++;
          $display("packet addr %0d data %0d, expected addr %0d data %0d", sh[15:10], sh[9:0], exp_addr, exp_data[exp_addr]);
        end
        exp_addr = (exp_addr + 1) % 64;
        npkt++;
      end
    end
  end

  // FIR clock period of channel 0
  int last_v = -1, cyc = 0, n_rate = 0, want_period = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.g_bank[0].u_bank.y_valid[0]) begin
      if (last_v >= 0 && want_period > 0) begin
        checks++;
        if (cyc - last_v != want_period) begin failures++; $display("FIR clock period %0d", cyc - last_v); end
        else n_rate++;
      end
      last_v = cyc;
    end
    if (cfg_shift) last_v = -1;
  end

  initial begin
    int t0;
    for (int c = 0; c < NCH; c++) vin[c] = 12'(250 + 61 * c);
    cfgv = '0;
    for (int c = 0; c < NCH; c++) cfgv.coef[c].mag = 8'd16;   // 16-tap moving average
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCH; c++) exp_data[c] = int'(vin[c]) * 255 / 4096;

    // A. 1.19 Mb/s FSK
    cfgv.rate.half_div = 10'd6;
    load_cfg();
    repeat (600) @(negedge clk);
    start_tx();
    wait (npkt == 70);
    $display("A: %0d packets at %0d clocks per bit", npkt, 2 * hlen);

    // B. 10 kb/s OOK
    cfgv.rate.half_div = 10'd716; cfgv.rf.ook = 1;
    load_cfg();
    start_tx();
    t0 = cyc;
    wait (npkt == 3);
    checks++;
    if (cyc - t0 < 3 * 16 * 1432 - 1432 || cyc - t0 > 3 * 16 * 1432) begin
      failures++; $display("3 OOK packets took %0d clocks", cyc - t0);
    end
    $display("B: %0d packets in %0d clocks", npkt, cyc - t0);

    // C. 500 S/s per channel FIR, default link rate
    cfgv.rate.half_div = '0; cfgv.rate.sar_div = 10'd325; cfgv.rf.ook = 0; cfgv.mode.fir_en = 1;
    want_period = 325 * 11 * 8;
    load_cfg();
    for (int c = 0; c < NCH; c++) exp_data[c] = to_data(fir_steady(c, int'(vin[c])));
    repeat (18 * want_period) @(negedge clk);
    start_tx();
    wait (npkt == 130);
    checks++;
    if (n_rate < 15) begin failures++; $display("FIR clock period seen %0d times", n_rate); end
    $display("C: %0d packets, FIR clock every %0d clocks (%0d periods checked)", npkt, want_period, n_rate);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
