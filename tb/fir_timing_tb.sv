// fir_timing_tb: checks the controller's rates and sequence at the default
// divider: sar_tick every SAR_DIV clocks, one conversion every 11 SAR clocks
// (conv_done in phase 9), SELECT stepping 0..7 once per conversion so each
// channel's FIR clock comes every 8 conversions (2024 crystal clocks, 7.08 kS/s
// at 14.32 MHz), and SELECT held at hold_ch when sel_hold is set. Then the
// runtime divider input is set to 7 and the same periods are checked again.
module fir_timing_tb;
  localparam int SAR_DIV = 23;
  int div_now = SAR_DIV;
  logic [9:0] sar_div = '0;
  logic clk = 0, rst_n = 0, sel_hold = 0;
  logic [2:0] hold_ch = 3'd5, sel;
  logic sar_tick, conv_done;
  logic [3:0] phase;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, last_conv = -1, last_ch[8];
  int ticks = 0, convs = 0, nsel_seen = 0;
  logic [2:0] prev_sel;
  bit prev_valid = 0;

  fir_timing #(.SAR_DIV(SAR_DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sar_tick) begin
      if (last_tick >= 0) begin
        checks++;
        if (cyc - last_tick != div_now) begin failures++; $display("tick period %0d", cyc - last_tick); end
      end
      last_tick = cyc;
    end
    if (conv_done) begin
      checks++;
      if (phase != 4'd9) begin failures++; $display("conv_done in phase %0d", phase); end
      if (last_conv >= 0) begin
        checks++;
        if (cyc - last_conv != 11 * div_now) begin failures++; $display("conv period %0d", cyc - last_conv); end
      end
      last_conv = cyc;
      if (!sel_hold) begin
        if (prev_valid) begin
          checks++;
          if (sel != prev_sel + 3'd1) begin failures++; $display("sel %0d after %0d", sel, prev_sel); end
        end
        if (last_ch[sel] >= 0) begin
          checks++;
          if (cyc - last_ch[sel] != 8 * 11 * div_now) begin failures++; $display("channel period %0d", cyc - last_ch[sel]); end
        end
        last_ch[sel] = cyc;
      end else if (convs > 0) begin
        checks++;
        if (sel != hold_ch) begin failures++; $display("held sel %0d", sel); end
        nsel_seen++;
      end
      prev_sel = sel; prev_valid = 1;
      convs++;
    end
  end

  initial begin
    foreach (last_ch[i]) last_ch[i] = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (convs == 40);
    @(negedge clk);
    sel_hold = 1; convs = 0;
    wait (convs == 12);
    checks++;
    if (nsel_seen < 10) begin failures++; $display("hold mode not exercised"); end
    @(negedge clk);
    sel_hold = 0; sar_div = 10'd7; div_now = 7; convs = 0; prev_valid = 0;
    last_tick = -1; last_conv = -1;
    foreach (last_ch[i]) last_ch[i] = -1;
    wait (convs == 40);
    checks++;
    if (last_tick < 0 || last_ch[0] < 0) begin failures++; $display("runtime divider not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
