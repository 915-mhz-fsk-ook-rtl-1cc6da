// cfg_shift_reg: serial configuration chain of the SoC.
//
// The FIR coefficients, the operating mode and the RF transmitter program bits
// are all loaded from outside through one shift register, as the document
// describes. While `shift` is high the chain moves one place per clock towards
// the MSB: cfg <= {cfg[WIDTH-2:0], sdi}, and sdo is the bit leaving at the MSB,
// so a word is loaded MSB first and WIDTH shifts place it completely.
// The parallel outputs are taken straight from the chain (no shadow copy);
// the shift protocol and the reset value (all zero: raw-conversion mode,
// zero coefficients) are this design's choices.
module cfg_shift_reg #(
  parameter int unsigned WIDTH = soc_pkg::CFG_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             sdi,
  output logic             sdo,
  output logic [WIDTH-1:0] cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cfg <= '0;
    else if (shift) cfg <= {cfg[WIDTH-2:0], sdi};
  end

  assign sdo = cfg[WIDTH-1];

endmodule
