// cfg_shift_reg_tb: loads two random words into the full-length configuration
// chain. Checks that the parallel word equals the shifted-in word after WIDTH
// shifts, that the bits leaving on sdo during the second load are the first
// word MSB first, and that the chain holds while shift is low.
module cfg_shift_reg_tb;
  localparam int unsigned W = soc_pkg::CFG_BITS;
  logic clk = 0, rst_n = 0, shift = 0, sdi = 0, sdo;
  logic [W-1:0] cfg, w1, w2, got;
  int checks = 0, failures = 0;

  cfg_shift_reg #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [W-1:0] w, output logic [W-1:0] out);
    for (int i = W - 1; i >= 0; i--) begin
      @(negedge clk);
      shift = 1; sdi = w[i];
      out[i] = sdo;   // bit about to leave
    end
    @(negedge clk);
    shift = 0;
  endtask

  initial begin
    for (int i = 0; i < W; i += 32) begin
      w1[i +: 32] = $urandom;
      w2[i +: 32] = $urandom;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++; if (cfg != '0) begin failures++; $display("reset value wrong"); end
    load(w1, got);
    checks++; if (cfg != w1) begin failures++; $display("first load wrong"); end
    repeat (20) @(negedge clk);
    checks++; if (cfg != w1) begin failures++; $display("chain moved without shift"); end
    load(w2, got);
    checks++; if (cfg != w2) begin failures++; $display("second load wrong"); end
    checks++; if (got != w1) begin failures++; $display("sdo stream wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
