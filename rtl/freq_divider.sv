// freq_divider: divide-by-64 in the PLL feedback path.
//
// Six cascaded stages, each dividing by 2, bring the 916 MHz VCO output down to
// the 14.32 MHz reference for the phase-frequency detector. As in the document
// the stages ripple: each is clocked by the output of the one before it, which
// keeps the fast clock on a single flip-flop. The silicon stages are
// divide-by-2/3 cells with their ratio fixed at 2; the unused divide-by-3 path
// is not built here. Output: fout, a 50% duty clock at fin / 2**STAGES.
module freq_divider #(
  parameter int unsigned STAGES = 6
) (
  input  logic fin,
  input  logic rst_n,
  output logic fout
);

  logic [STAGES:0] c;
  assign c[0] = fin;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    div2_stage u_stage (.fi(c[i]), .rst_n, .fo(c[i+1]));
  end

  assign fout = c[STAGES];

endmodule
