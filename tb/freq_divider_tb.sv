// freq_divider_tb: clocks the divider with a 1.09 ns (916 MHz) input and
// checks that each output period spans exactly 64 input edges with a 50%
// duty cycle (32 input periods high).
module freq_divider_tb;
  logic fin = 0, rst_n = 0, fout;
  int checks = 0, failures = 0, nin = 0, last_rise = -1, last_fall = -1;

  freq_divider #(.STAGES(6)) dut (.*);

  always #0.546 fin = ~fin;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge fin) if (rst_n) nin++;

  always @(posedge fout) begin
    if (last_rise >= 0) begin
      checks++;
      if (nin - last_rise != 64) begin failures++; $display("period %0d input cycles", nin - last_rise); end
    end
    last_rise = nin;
  end
  always @(negedge fout) if (rst_n) begin
    if (last_rise >= 0) begin
      checks++;
      if (nin - last_rise != 32) begin failures++; $display("high for %0d input cycles", nin - last_rise); end
    end
  end

  initial begin
    #10 rst_n = 1;
    wait (checks >= 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
