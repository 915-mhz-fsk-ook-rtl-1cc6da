// msar_logic: SAR logic of the in-channel multiplying ADC.
//
// A conventional 8-bit successive-approximation controller with the few extra
// gates that turn the ADC into an analog-digital multiplier. During the sample
// phase (phase 0, sample = 1) the capacitor switches follow the coefficient
// bits m7..m0: a capacitor that is switched off takes no charge, which is a
// multiplication of the input by 0 or 1 per binary weight, so the held charge
// is vin * M / 256. After sampling the switches carry the SAR trial word and
// the converter works as usual: in phase p (1..8) bit 8-p is tried and kept if
// `comp` is high at the end of the phase. In phase 9 the result is loaded into
// the output register (dout_valid pulses for one clock). With mult_en low
// (raw conversion) all multiplication bits are forced high, as in the document.
// Timing (sar_tick, phase) comes from fir_timing and is shared by all ADCs.
module msar_logic #(
  parameter int unsigned BITS = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sar_tick,
  input  logic [3:0]      phase,
  input  logic [BITS-1:0] m,
  input  logic            mult_en,
  input  logic            comp,
  output logic            sample,
  output logic [BITS-1:0] sw,
  output logic [BITS-1:0] dout,
  output logic            dout_valid
);

  logic [BITS-1:0] bits_q;   // decided bits
  logic [BITS-1:0] trial;    // bits_q with the bit under test set
  logic            deciding;
  logic [$clog2(BITS)-1:0] bit_idx;

  assign sample   = (phase == 4'd0);
  assign deciding = (phase >= 4'd1) && (phase <= 4'(BITS));
  assign bit_idx  = $bits(bit_idx)'(4'(BITS) - phase);

  always_comb begin
    trial = bits_q;
    if (deciding) trial[bit_idx] = 1'b1;
  end

  // multiplication logic: S ? m : bit
  assign sw = sample ? (mult_en ? m : '1) : trial;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q     <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (sar_tick) begin
        if (sample)
          bits_q <= '0;
        else if (deciding)
          bits_q[bit_idx] <= comp;
        else if (phase == 4'(BITS + 1)) begin
          dout       <= bits_q;
          dout_valid <= 1'b1;
        end
      end
    end
  end

endmodule
