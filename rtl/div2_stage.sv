// div2_stage: one stage of the PLL divider, a toggle flip-flop that halves its
// input clock (a divide-by-2/3 cell used at ratio 2). fo toggles on every
// rising edge of fi; rst_n clears it asynchronously.
module div2_stage (
  input  logic fi,
  input  logic rst_n,
  output logic fo
);

  always_ff @(posedge fi or negedge rst_n) begin
    if (!rst_n) fo <= 1'b0;
    else        fo <= ~fo;
  end

endmodule
