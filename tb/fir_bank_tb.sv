// fir_bank_tb: one 8-channel bank with its controller (SAR divider 2).
// Raw mode: every ADC must return floor(vin * 255 / 4096) of its own channel.
// FIR mode (SELECT cycling): each channel's line must produce
// y[n] = sum_i s_i * floor(x[n-i] * |M_(min(i,15-i))| / 4096) (12-bit wrap),
// with x[n] the value its amplifier held during its n-th conversion, and be
// clocked exactly once per 8 conversions. Held mode: only the held channel is
// clocked, once per conversion. Inputs change only between conversions.
module fir_bank_tb;
  import soc_pkg::*;
  localparam int SAR_DIV = 2;
  logic clk = 0, rst_n = 0, fir_en = 0, sel_hold = 0;
  logic [2:0] hold_ch = 3'd6, sel;
  logic sar_tick, conv_done;
  logic [3:0] phase;
  logic [11:0] vin [8];
  madc_coef_t [7:0] coef;
  adc_code_t raw [8];
  logic signed [11:0] y [8];
  logic [7:0] y_valid;
  int checks = 0, failures = 0;
  int xs [8][$];          // input history per channel
  int ups [8];
  int convs = 0;
  int rawchk = 0, firchk = 0, holdchk = 0;

  fir_timing #(.SAR_DIV(SAR_DIV)) u_t (.clk, .rst_n, .sar_div(10'd0), .sel_hold, .hold_ch, .sar_tick, .phase, .sel, .conv_done);
  fir_bank #(.N(8)) dut (.clk, .rst_n, .fir_en, .sar_tick, .phase, .sel, .vin, .coef, .raw, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tapval(int ch, int i);
    int k = (i < 8) ? i : 15 - i;
    int c, n;
    n = xs[ch].size() - 1 - i;
    if (n < 0) return 0;
    c = (xs[ch][n] * int'(coef[k].mag)) / 4096;
    if ((i < 8) ? coef[k].sign_lo : coef[k].sign_hi) c = -c;
    return c;
  endfunction

  // record the sampled input of the channel being converted
  always @(posedge clk) if (rst_n && sar_tick && phase == 0 && fir_en) xs[sel].push_back(int'(vin[sel]));

  always @(posedge clk) if (rst_n) begin
    if (conv_done) convs++;
    for (int c = 0; c < 8; c++) if (y_valid[c]) begin
      ups[c]++;
      checks++;
      if (c != sel) begin failures++; $display("channel %0d clocked while sel=%0d", c, sel); end
    end
  end

  // new random inputs at each conversion end
  always @(negedge clk) if (rst_n && sar_tick && phase == 10)
    for (int c = 0; c < 8; c++) vin[c] <= 12'($urandom);

  // check each FIR output right after its update
  logic [7:0] pending = '0;
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < 8; c++) if (pending[c]) begin
      automatic int e = 0;
      for (int i = 0; i < 16; i++) e += tapval(c, i);
      checks++;
      if (y[c] !== 12'(e)) begin failures++; $display("ch %0d n %0d got %0d exp %0d", c, xs[c].size(), y[c], 12'(e)); end
      if (sel_hold) holdchk++; else firchk++;
    end
    pending = y_valid;
  end

  initial begin
    for (int c = 0; c < 8; c++) vin[c] = 12'($urandom);
    for (int k = 0; k < 8; k++) begin
      coef[k].mag = 8'($urandom_range(1, 60));
      coef[k].sign_lo = 1'($urandom);
      coef[k].sign_hi = 1'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // raw mode
    repeat (6) begin
      logic [11:0] held [8];
      wait (phase == 0); held = vin;
      @(posedge clk iff (dut.dout_valid[0]));
      @(negedge clk);
      for (int c = 0; c < 8; c++) begin
        checks++; rawchk++;
        if (int'(raw[c]) != int'(held[c]) * 255 / 4096) begin failures++; $display("raw ch %0d got %0d vin %0d", c, raw[c], held[c]); end
      end
      wait (phase != 0);
    end
    // FIR mode, SELECT cycling
    wait (sar_tick && phase == 10); @(negedge clk);
    fir_en = 1; foreach (ups[c]) ups[c] = 0; convs = 0;
    wait (convs == 8 * 24);
    @(negedge clk);
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (ups[c] < 23 || ups[c] > 24) begin failures++; $display("ch %0d clocked %0d times in 24 frames", c, ups[c]); end
    end
    // held (8-channel) mode
    sel_hold = 1; foreach (ups[c]) ups[c] = 0; convs = 0;
    wait (convs == 40);
    @(negedge clk);
    checks++;
    if (ups[6] < 38) begin failures++; $display("held channel clocked %0d times", ups[6]); end
    for (int c = 0; c < 8; c++) if (c != 6) begin
      checks++;
      if (ups[c] > 1) begin failures++; $display("ch %0d clocked in held mode", c); end
    end
    checks++;
    if (rawchk == 0 || firchk < 100 || holdchk < 30) begin failures++; $display("modes not exercised %0d %0d %0d", rawchk, firchk, holdchk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
