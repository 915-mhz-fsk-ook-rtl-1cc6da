// fir_bank: eight recording channels sharing eight multiplying ADCs to form
// eight 16-tap mixed-signal FIR filters.
//
// Raw mode (fir_en = 0): ADC k converts its own channel k with every
// multiplication bit high; raw[k] is its output register, refreshed once per
// conversion. FIR mode (fir_en = 1): the amplifier output of channel `sel` is
// multiplexed onto all eight ADCs, which sample it with coefficient magnitudes
// |M_0|..|M_7| and so deliver the eight products of that input sample in one
// conversion. At the end of the conversion the add-and-delay line of channel
// `sel` is clocked (y_valid[sel] pulses) and takes the products with the two
// signs of each ADC. The controller steps `sel` through the 8 channels, so each
// line is clocked once every 8 conversions; y[c] is held in between.
// The coefficients are stored per ADC, so the 8 channels of one bank share one
// filter response. Timing inputs come from fir_timing.
module fir_bank #(
  parameter int unsigned N        = 8,
  parameter int unsigned VIN_BITS = 12,
  parameter int unsigned TAPS     = 16,
  parameter int unsigned ACC_BITS = 12
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              fir_en,
  input  logic                              sar_tick,
  input  logic [3:0]                        phase,
  input  logic [$clog2(N)-1:0]              sel,
  input  logic [VIN_BITS-1:0]               vin [N],
  input  soc_pkg::madc_coef_t [N-1:0]       coef,
  output soc_pkg::adc_code_t                raw [N],
  output logic signed [ACC_BITS-1:0]        y [N],
  output logic [N-1:0]                      y_valid
);
  import soc_pkg::*;

  localparam int unsigned BITS = ADC_BITS;

  logic [N-1:0]                   dout_valid;   // identical pulses; ADC 0's is used
  logic                           unused_valid;
  logic [TAPS/2-1:0][BITS-1:0]    codes;
  logic [TAPS-1:0]                signs;

  for (genvar k = 0; k < N; k++) begin : g_adc
    logic [VIN_BITS-1:0] adc_in;
    logic                sample, comp;
    logic [BITS-1:0]     sw;

    assign adc_in = fir_en ? vin[sel] : vin[k];

    msar_logic #(.BITS(BITS)) u_sar (
      .clk, .rst_n, .sar_tick, .phase,
      .m(coef[k].mag), .mult_en(fir_en), .comp,
      .sample, .sw, .dout(raw[k]), .dout_valid(dout_valid[k])
    );

    cdac_comparator #(.VIN_BITS(VIN_BITS), .BITS(BITS)) u_cdac (
      .clk, .vin(adc_in), .sample, .sw, .comp
    );
  end

  // products of the current sample and tap signs (tap k and tap 15-k per ADC)
  always_comb begin
    for (int k = 0; k < TAPS/2; k++) begin
      codes[k]          = raw[k];
      signs[k]          = coef[k].sign_lo;
      signs[TAPS-1-k]   = coef[k].sign_hi;
    end
  end

  assign unused_valid = ^dout_valid[N-1:1];

  for (genvar c = 0; c < N; c++) begin : g_line
    assign y_valid[c] = fir_en && dout_valid[0] && (sel == c);

    fir_delay_line #(.TAPS(TAPS), .ACC_BITS(ACC_BITS), .BITS(BITS)) u_line (
      .clk, .rst_n, .en(y_valid[c]), .code(codes), .sign(signs), .y(y[c])
    );
  end

endmodule
