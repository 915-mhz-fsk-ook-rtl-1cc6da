// cdac_comparator: behavioural model of the split-capacitor charge-redistribution
// array and comparator of the multiplying SAR ADC (analog, not synthesizable
// as such; this file stands in for it in simulation).
//
// The input voltage is given as a VIN_BITS code where 2**VIN_BITS is the 0.6 V
// full scale. While `sample` is high the array samples the input onto the
// capacitors whose switch is on, so the stored charge is q = vin * sum(sw_i*2^i)
// in units of one unit capacitor times one input LSB; it is held from the last
// clock with `sample` high. In the hold phase the switches carry the SAR trial
// word T and the comparator output is high when the held charge is at least the
// charge the DAC places on the full 256-unit array: q >= T * 2**VIN_BITS.
// The search therefore converges to floor(vin * M / 2**VIN_BITS) for a
// coefficient M sampled in. The array is ideal: the 70 fF split capacitor,
// mismatch, kT/C noise and comparator offset are not modelled.
module cdac_comparator #(
  parameter int unsigned VIN_BITS = 12,
  parameter int unsigned BITS     = 8
) (
  input  logic                clk,
  input  logic [VIN_BITS-1:0] vin,
  input  logic                sample,
  input  logic [BITS-1:0]     sw,
  output logic                comp
);

  logic [VIN_BITS+BITS-1:0] q;   // held charge

  always_ff @(posedge clk) begin
    if (sample) q <= (VIN_BITS+BITS)'(vin) * (VIN_BITS+BITS)'(sw);
  end

  assign comp = (q >= ((VIN_BITS+BITS)'(sw) << VIN_BITS));

endmodule
