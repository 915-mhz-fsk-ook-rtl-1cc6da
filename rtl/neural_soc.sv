// neural_soc: digital core of a 64-channel wireless neural recording SoC with
// 64 mixed-signal 16-tap FIR filters and a 915 MHz FSK/OOK transmitter.
//
// Structure (follows the document):
//   * cfg_shift_reg  - one serial chain holding the FIR coefficients, the mode
//                      and the RF program bits (layout: soc_pkg::soc_cfg_t).
//   * fir_timing     - SAR clock, 11-phase conversion sequence and the 3-bit
//                      SELECT counter shared by all banks.
//   * fir_bank x8    - 8 channels each: 8 multiplying SAR ADCs and 8 transposed
//                      add-and-delay lines (channel c = 8*bank + k).
//   * packet_serializer + manchester_mod - 16-bit packets {address, data} sent
//                      Manchester-coded for FSK or keyed for OOK.
//   * freq_divider + pfd - the digital parts of the PLL loop.
// The amplifiers, charge pump, loop filter, VCO and PA are analog and stay
// outside: amplifier outputs arrive on vin as 12-bit codes of the 0.6 V ADC
// range, the VCO output arrives on vco_clk, and the PFD pulses and all RF
// program bits leave as ports. Everything except the divider runs on the
// 14.32 MHz crystal clock `clk`, which also serves as the PLL reference.
// Packet data: FIR mode sends y[11:2] of the addressed channel, raw mode sends
// {2'b00, ADC code}; both choices are this design's. In held-SELECT mode only
// the 8 filtered channels are sent.
module neural_soc #(
  parameter int unsigned N_BANKS  = 8,
  parameter int unsigned SAR_DIV  = 23,  // SAR clock ratio while cfg.rate.sar_div = 0
  parameter int unsigned HALF_DIV = 5    // half-bit length while cfg.rate.half_div = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // amplifier outputs
  input  logic [11:0] vin [N_BANKS*8],
  // configuration chain
  input  logic        cfg_shift,
  input  logic        cfg_sdi,
  output logic        cfg_sdo,
  // transmitter data path
  input  logic        tx_en,
  output logic        fsk_mod,
  output logic        pa_on,
  // RF program bits
  output logic [3:0]  pa_pwr,
  output logic [3:0]  vco_band,
  output logic [2:0]  fsk_idx,
  output logic [5:0]  lf_ctrl,
  output logic        ook_mode,
  // PLL digital parts
  input  logic        vco_clk,
  output logic        div_out,
  output logic        pfd_up,
  output logic        pfd_dn
);
  import soc_pkg::*;

  localparam int unsigned NCH = N_BANKS * BANK;

  soc_cfg_t cfg;

  cfg_shift_reg #(.WIDTH(CFG_BITS)) u_cfg (
    .clk, .rst_n, .shift(cfg_shift), .sdi(cfg_sdi), .sdo(cfg_sdo), .cfg(cfg)
  );

  assign pa_pwr   = cfg.rf.pa_pwr;
  assign vco_band = cfg.rf.vco_band;
  assign fsk_idx  = cfg.rf.fsk_idx;
  assign lf_ctrl  = cfg.rf.lf;
  assign ook_mode = cfg.rf.ook;

  // ---------------------------------------------------------------- FIR
  logic       sar_tick, conv_done;
  logic [3:0] phase;
  logic [2:0] sel;

  fir_timing #(.SAR_DIV(SAR_DIV), .CONV_CYCLES(CONV_CYC), .N_SEL(BANK), .DIV_BITS(DIV_BITS)) u_timing (
    .clk, .rst_n, .sar_div(cfg.rate.sar_div), .sel_hold(cfg.mode.sel_hold), .hold_ch(cfg.mode.sel_ch),
    .sar_tick, .phase, .sel, .conv_done
  );

  adc_code_t raw [NCH];
  acc_t      y   [NCH];

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic [11:0]                 bvin [BANK];
    adc_code_t                   braw [BANK];
    acc_t                        by   [BANK];
    logic [BANK-1:0]             by_valid;   // FIR clocks (observed in simulation)
    madc_coef_t [BANK-1:0]       bcoef;

    for (genvar k = 0; k < BANK; k++) begin : g_ch
      assign bvin[k]          = vin[b*BANK + k];
      assign bcoef[k]         = cfg.coef[b*BANK + k];
      assign raw[b*BANK + k]  = braw[k];
      assign y[b*BANK + k]    = by[k];
    end

    fir_bank #(.N(BANK), .VIN_BITS(12), .TAPS(TAPS), .ACC_BITS(ACC_BITS)) u_bank (
      .clk, .rst_n, .fir_en(cfg.mode.fir_en), .sar_tick, .phase, .sel,
      .vin(bvin), .coef(bcoef), .raw(braw), .y(by), .y_valid(by_valid)
    );
  end

  // ---------------------------------------------------------------- TX
  logic [ADDR_BITS-1:0] addr;
  logic [DATA_BITS-1:0] data;
  logic                 tx_bit, half, bit_start, pkt_start;
  logic [$clog2(NCH)-1:0] ch;

  assign ch   = $bits(ch)'(addr);
  assign data = cfg.mode.fir_en ? DATA_BITS'(y[ch] >>> (ACC_BITS - DATA_BITS))
                                : DATA_BITS'(raw[ch]);

  packet_serializer #(.HALF_DIV(HALF_DIV), .DATA_BITS(DATA_BITS), .ADDR_BITS(ADDR_BITS),
                    .DIV_BITS(DIV_BITS)) u_ser (
    .clk, .rst_n, .en(tx_en), .half_div(cfg.rate.half_div),
    .sub_en(cfg.mode.fir_en && cfg.mode.sel_hold), .sub_lo(cfg.mode.sel_ch), .data, .addr, .tx_bit, .half, .bit_start, .pkt_start
  );

  manchester_mod u_mod (
    .clk, .rst_n, .tx_en, .tx_bit, .half, .ook(cfg.rf.ook), .fsk_mod, .pa_on
  );

  // ---------------------------------------------------------------- PLL
  freq_divider #(.STAGES(6)) u_div (.fin(vco_clk), .rst_n, .fout(div_out));

  pfd u_pfd (.ref_clk(clk), .div_clk(div_out), .rst_n, .up(pfd_up), .dn(pfd_dn));

endmodule
