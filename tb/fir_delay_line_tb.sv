// fir_delay_line_tb: feeds random ADC products and tap signs into one
// add-and-delay line and compares its output with a direct-form reference
// kept here: y[n] = sum_i s_i * c_(min(i,15-i))[n-i], wrapped to 12 bits.
// Each input sample is followed by idle clocks in which the line must hold.
module fir_delay_line_tb;
  localparam int TAPS = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0][7:0] code;
  logic [15:0] sign;
  logic signed [11:0] y;
  int checks = 0, failures = 0;
  int hist [$];   // history of products per tap: hist[n*16 + i]

  fir_delay_line #(.TAPS(16), .ACC_BITS(12), .BITS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int prod(int c, bit s);
    return s ? -c : c;
  endfunction

  initial begin
    int n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 4; blk++) begin
      // new signs per block; block 0 all positive, block 1 all negative
      sign = (blk == 0) ? 16'h0000 : (blk == 1) ? 16'hffff : 16'($urandom);
      for (int s = 0; s < 40; s++) begin
        automatic int expect_y = 0;
        for (int k = 0; k < 8; k++) code[k] = (blk < 2 && s % 7 == 0) ? 8'hff : 8'($urandom);
        for (int i = 0; i < TAPS; i++)
          hist.push_back(prod(int'(code[(i < 8) ? i : 15 - i]), sign[i]));
        @(negedge clk); en = 1;
        @(negedge clk); en = 0;
        for (int i = 0; i < TAPS; i++)
          if (n - i >= 0) expect_y += hist[(n - i) * TAPS + i];
        checks++;
        if (y !== 12'(expect_y)) begin failures++; $display("n %0d got %0d expected %0d", n, y, 12'(expect_y)); end
        code = '1;                         // must be ignored while en is low
        repeat (3) @(negedge clk);
        checks++;
        if (y !== 12'(expect_y)) begin failures++; $display("n %0d output moved without en", n); end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
