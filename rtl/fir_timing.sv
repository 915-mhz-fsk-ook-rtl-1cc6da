// fir_timing: clock and SELECT controller of the mixed-signal FIR filters.
//
// Everything runs on the crystal clock with enables. A divider makes the SAR
// clock (sar_tick, one cycle wide). Its ratio is the runtime input sar_div, or
// the parameter SAR_DIV while sar_div is 0 (so 14.32 MHz / 325 gives the
// 500 S/s per channel used for slow signals); 11 SAR clocks make one conversion
// (56.6 kS/s at the defaults) and the 3-bit SELECT counter advances once per
// conversion, so each of the 8 channels of a bank is filtered at 1/8 of the
// ADC rate (7.08 kS/s). Phases of a conversion: 0 = sample (S = 1),
// 1..8 = decide bits 7..0, 9 = load the ADC output register (conv_done, which
// is also the FIR clock of channel `sel`), 10 = idle. `sel` is stable through a
// conversion and changes after phase 10. With sel_hold set, SELECT stays at
// hold_ch, giving FIR filtering of one channel per bank at the full ADC rate.
// The 11-clock conversion and the divide-by-8 are the document's; the phase
// allocation and the divider value 23 (14.32 MHz / 23 = 623 kHz) are this
// design's choices.
module fir_timing #(
  parameter int unsigned SAR_DIV     = 23,
  parameter int unsigned CONV_CYCLES = 11,
  parameter int unsigned N_SEL       = 8,
  parameter int unsigned DIV_BITS    = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [DIV_BITS-1:0]      sar_div,
  input  logic                     sel_hold,
  input  logic [$clog2(N_SEL)-1:0] hold_ch,
  output logic                     sar_tick,
  output logic [3:0]               phase,
  output logic [$clog2(N_SEL)-1:0] sel,
  output logic                     conv_done
);

  logic [DIV_BITS-1:0] divcnt, div_n;

  assign div_n     = (sar_div == '0) ? DIV_BITS'(SAR_DIV) : sar_div;
  // >= so that a ratio lowered in the middle of a count takes effect at once
  assign sar_tick  = (divcnt >= div_n - 1'b1);
  assign conv_done = sar_tick && (phase == 4'd9);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      divcnt <= '0;
      phase  <= '0;
      sel    <= '0;
    end else begin
      divcnt <= sar_tick ? '0 : divcnt + 1'b1;
      if (sar_tick) begin
        if (phase == 4'(CONV_CYCLES - 1)) begin
          phase <= '0;
          sel   <= sel_hold ? hold_ch : sel + 1'b1;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
