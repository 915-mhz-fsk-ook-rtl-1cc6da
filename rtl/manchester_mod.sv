// manchester_mod: data modulator in front of the 915 MHz transmitter.
//
// FSK (ook = 0): the serial bit is Manchester-coded with the half-bit clock,
// fsk_mod = tx_bit XOR half, so every bit has a transition in its middle and the
// data carry no low-frequency content that the PLL would track and remove; the
// PA stays on. OOK (ook = 1): the PLL sits on the carrier and the bit switches
// the PA cascodes, pa_on = tx_bit, while fsk_mod is held low. The Manchester
// polarity (1 = high then low), sending OOK bits uncoded and registering both
// outputs (one clock of latency) are this design's choices.
module manchester_mod (
  input  logic clk,
  input  logic rst_n,
  input  logic tx_en,
  input  logic tx_bit,
  input  logic half,
  input  logic ook,
  output logic fsk_mod,
  output logic pa_on
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsk_mod <= 1'b0;
      pa_on   <= 1'b0;
    end else if (!tx_en) begin
      fsk_mod <= 1'b0;
      pa_on   <= 1'b0;
    end else if (ook) begin
      fsk_mod <= 1'b0;
      pa_on   <= tx_bit;
    end else begin
      fsk_mod <= tx_bit ^ half;
      pa_on   <= 1'b1;
    end
  end

endmodule
