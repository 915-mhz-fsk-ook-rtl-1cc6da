// manchester_mod_tb: random bit, half-bit phase, modulation type and enable.
// One clock later fsk_mod must be bit XOR half in FSK mode with the PA on,
// and in OOK mode pa_on must follow the bit with fsk_mod low; both outputs are
// low while the transmitter is disabled.
module manchester_mod_tb;
  logic clk = 0, rst_n = 0, tx_en, tx_bit, half, ook, fsk_mod, pa_on;
  logic e_fsk, e_pa;
  int checks = 0, failures = 0, nfsk = 0, nook = 0;

  manchester_mod dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_en = 0; tx_bit = 0; half = 0; ook = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      tx_en = ($urandom_range(0, 9) != 0); tx_bit = 1'($urandom); half = 1'($urandom); ook = 1'($urandom);
      e_fsk = tx_en && !ook && (tx_bit ^ half);
      e_pa  = tx_en && (ook ? tx_bit : 1'b1);
      if (tx_en && ook) nook++;
      if (tx_en && !ook) nfsk++;
      @(negedge clk);
      checks++;
      if (fsk_mod !== e_fsk || pa_on !== e_pa) begin
        failures++; $display("en %0d bit %0d half %0d ook %0d -> fsk %0d pa %0d", tx_en, tx_bit, half, ook, fsk_mod, pa_on);
      end
    end
    checks++;
    if (nook == 0 || nfsk == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
