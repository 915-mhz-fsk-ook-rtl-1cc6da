// soc_pkg: types and constants shared by the 64-channel neural recording SoC.
//
// The configuration that is loaded through the serial shift register is laid
// out as one packed struct, soc_cfg_t. Each multiplying ADC owns an 8-bit
// coefficient magnitude and two signs: one for tap k and one for the mirrored
// tap 15-k of the symmetric 16-tap filter (|M_k| = |M_15-k|). The RF program
// bits (PA power 4, VCO band 4, FSK index 3, loop filter 6, modulation type 1)
// follow the document; the mode bits, the rate dividers and the field order
// are this design's.
package soc_pkg;

  localparam int unsigned N_CH      = 64;   // recording channels
  localparam int unsigned BANK      = 8;    // channels (and MADCs) per FIR bank
  localparam int unsigned ADC_BITS  = 8;    // SAR ADC resolution
  localparam int unsigned VIN_BITS  = 12;   // resolution of the analog input code
  localparam int unsigned TAPS      = 16;   // FIR taps per channel
  localparam int unsigned ACC_BITS  = 12;   // adder / register width
  localparam int unsigned CONV_CYC  = 11;   // SAR clocks per conversion
  localparam int unsigned DATA_BITS = 10;   // neural data bits per packet
  localparam int unsigned ADDR_BITS = 6;    // channel address bits per packet
  localparam int unsigned DIV_BITS  = 10;   // width of the runtime rate dividers

  typedef logic [ADC_BITS-1:0]        adc_code_t;
  typedef logic signed [ACC_BITS-1:0] acc_t;
  typedef logic [VIN_BITS-1:0]        vin_t;

  // Coefficient of one multiplying ADC.
  typedef struct packed {
    logic [ADC_BITS-1:0] mag;     // |M_k| = |M_15-k|, bits m7..m0
    logic                sign_lo; // sign of tap k      (1 = negative)
    logic                sign_hi; // sign of tap 15-k   (1 = negative)
  } madc_coef_t;

  typedef struct packed {
    logic       ook;      // modulation type: 1 = OOK, 0 = FSK
    logic [5:0] lf;       // loop filter: {C code[2:0], R code[2:0]}
    logic [2:0] fsk_idx;  // FSK modulation index
    logic [3:0] vco_band; // VCO centre frequency
    logic [3:0] pa_pwr;   // PA output power (16 levels)
  } rf_cfg_t;

  // Runtime rate dividers; 0 selects the top module's parameter default.
  typedef struct packed {
    logic [DIV_BITS-1:0] sar_div;  // crystal clocks per SAR clock
    logic [DIV_BITS-1:0] half_div; // crystal clocks per half transmit bit
  } rate_cfg_t;

  typedef struct packed {
    logic       fir_en;   // 1 = FIR filtering, 0 = raw conversion
    logic       sel_hold; // 1 = SELECT held at sel_ch (8-channel FIR mode)
    logic [2:0] sel_ch;
  } mode_cfg_t;

  typedef struct packed {
    rf_cfg_t                rf;
    rate_cfg_t              rate;
    mode_cfg_t              mode;
    madc_coef_t [N_CH-1:0]  coef;  // coef[8*b + k] = MADC k of bank b
  } soc_cfg_t;

  localparam int unsigned CFG_BITS = $bits(soc_cfg_t);

endpackage
