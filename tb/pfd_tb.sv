// pfd_tb: two 70 ns clocks with a chosen skew. When the reference leads by d,
// `up` must be high for d each cycle and `dn` only a zero-width glitch; when
// the divided clock leads, the roles swap; with both aligned neither pulses.
// A frequency error (divided clock slower) must give up pulses that grow.
module pfd_tb;
  logic ref_clk = 0, div_clk = 0, rst_n = 0, up, dn;
  int checks = 0, failures = 0;
  realtime t_up, t_dn, w_up, w_dn;
  int n_up = 0, n_dn = 0;

  pfd dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge up) t_up = $realtime;
  always @(negedge up) begin w_up = $realtime - t_up; if (w_up > 0.01) n_up++; end
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) begin w_dn = $realtime - t_dn; if (w_dn > 0.01) n_dn++; end

  task automatic run(input real skew, input int cycles, input real exp_up, input real exp_dn);
    // skew > 0: reference leads
    n_up = 0; n_dn = 0;
    for (int i = 0; i < cycles; i++) begin
      if (skew >= 0) begin
        ref_clk = 1; #(skew); div_clk = 1; #(35.0 - skew); ref_clk = 0; div_clk = 0; #35;
      end else begin
        div_clk = 1; #(-skew); ref_clk = 1; #(35.0 + skew); ref_clk = 0; div_clk = 0; #35;
      end
      checks++;
      if (up !== 1'b0 || dn !== 1'b0) begin failures++; $display("stuck high"); end
      if (i > 0) begin
        checks++;
        if (exp_up > 0 && (w_up < exp_up - 0.01 || w_up > exp_up + 0.01)) begin failures++; $display("up width %f", w_up); end
        if (exp_dn > 0 && (w_dn < exp_dn - 0.01 || w_dn > exp_dn + 0.01)) begin failures++; $display("dn width %f", w_dn); end
      end
    end
    checks++;
    if ((exp_up > 0) != (n_up >= cycles - 1) || (exp_dn > 0) != (n_dn >= cycles - 1) ||
        (exp_up == 0 && n_up != 0) || (exp_dn == 0 && n_dn != 0)) begin
      failures++; $display("pulse counts up %0d dn %0d", n_up, n_dn);
    end
  endtask

  initial begin
    #10 rst_n = 1; #10;
    run(3.0, 10, 3.0, 0.0);
    run(-5.0, 10, 0.0, 5.0);
    run(0.0, 10, 0.0, 0.0);
    // frequency error: divided clock 1 ns later every cycle
    n_up = 0;
    for (int i = 1; i <= 8; i++) begin
      ref_clk = 1; #(i); div_clk = 1; #(30 - i); ref_clk = 0; div_clk = 0; #40;
      checks++;
      if (w_up < i - 0.01 || w_up > i + 0.01) begin failures++; $display("growing up width %f at %0d", w_up, i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
