// cdac_comparator_tb: samples random input codes with random capacitor enables
// M and then applies trial words T. The comparator must answer
// vin/4096 * M/256 >= T/256 (held input on the enabled share of the array
// against the DAC level), computed here in real arithmetic, and must keep
// the held charge while the input changes after sampling.
module cdac_comparator_tb;
  logic clk = 0, sample = 0, comp;
  logic [11:0] vin;
  logic [7:0] sw;
  int checks = 0, failures = 0;

  cdac_comparator #(.VIN_BITS(12), .BITS(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic logic [11:0] v = 12'($urandom);
      automatic logic [7:0]  mm = 8'($urandom);
      automatic real held = real'(v) / 4096.0 * real'(mm) / 256.0;
      @(negedge clk); vin = v; sw = mm; sample = 1;
      @(negedge clk); sample = 0; vin = 12'($urandom);   // input moves, charge must not
      for (int t = 0; t < 8; t++) begin
        automatic logic [7:0] tr = (t == 0) ? 8'(int'($floor(held * 256.0))) :
                                   (t == 1) ? 8'(int'($floor(held * 256.0)) + 1) : 8'($urandom);
        sw = tr;
        #1;
        checks++;
        if (comp !== (held >= real'(tr) / 256.0)) begin
          failures++; $display("v %0d M %0d T %0d comp %0d", v, mm, tr, comp);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
