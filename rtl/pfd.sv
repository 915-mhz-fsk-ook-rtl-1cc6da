// pfd: conventional three-state phase-frequency detector of the PLL.
//
// A rising edge of the reference sets `up`, a rising edge of the divided VCO
// clock sets `dn`; as soon as both are set, their AND clears both. So `up` is
// high from a reference edge until the next divider edge when the reference
// leads (VCO too slow), `dn` likewise when the divider leads, and only a
// reset-length glitch appears when the loop is locked. In this description the
// clearing pulse has zero width; in silicon the reset path delay sets the
// minimum pulse that avoids the dead zone. rst_n forces both low.
// Synthesis reports a logic loop through the asynchronous clear (up & dn
// clears the flops that drive it); that feedback is the three-state PFD
// itself and is intended.
module pfd (
  input  logic ref_clk,
  input  logic div_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);

  logic clr;
  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge div_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end

endmodule
