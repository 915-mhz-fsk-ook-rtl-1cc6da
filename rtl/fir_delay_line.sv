// fir_delay_line: one channel's 16-tap symmetric transposed add-and-delay line.
//
// The multiplications are done in the ADCs: code[k] = floor(x * |M_k| / 256)
// for the 8 multiplying ADCs of the bank. Each code feeds two sign multipliers,
// for tap k and for the mirrored tap 15-k, because the coefficients are
// symmetric in magnitude (|M_k| = |M_15-k|) while their signs are programmed
// separately (sign[i] = 1 makes tap i negative). The delay line is the
// transposed form: with products p_i,
//     y   = z_1 + p_0,   z_i <= z_(i+1) + p_i (i = 1..14),   z_15 <= p_15,
// so y[n] = sum_i p_i[n-i]. All adders and registers are ACC_BITS wide and
// wrap in two's complement (overflow handling is this design's choice).
// The line, and the output register y, move only on `en`, which is this
// channel's FIR clock (one pulse per input sample). `y` holds the output for
// the sample that came with the last `en`.
module fir_delay_line #(
  parameter int unsigned TAPS     = 16,
  parameter int unsigned ACC_BITS = 12,
  parameter int unsigned BITS     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [TAPS/2-1:0][BITS-1:0] code,
  input  logic [TAPS-1:0]            sign,
  output logic signed [ACC_BITS-1:0] y
);

  logic signed [ACC_BITS-1:0] p [TAPS];
  logic signed [ACC_BITS-1:0] z [1:TAPS-1];

  // sign multipliers
  always_comb begin
    for (int i = 0; i < TAPS; i++) begin
      automatic logic [BITS-1:0] c = (i < TAPS/2) ? code[i] : code[TAPS-1-i];
      p[i] = sign[i] ? -$signed(ACC_BITS'(c)) : $signed(ACC_BITS'(c));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < TAPS; i++) z[i] <= '0;
      y <= '0;
    end else if (en) begin
      for (int i = 1; i < TAPS - 1; i++) z[i] <= z[i+1] + p[i];
      z[TAPS-1] <= p[TAPS-1];
      y <= z[1] + p[0];
    end
  end

endmodule
