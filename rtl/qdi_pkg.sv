// qdi_pkg: types and constants shared by the quadrature demodulation interface.
//
// The ADC delivers 12-bit two's complement samples. The filter works on 16-bit
// data words and 16-bit Q1.15 coefficients, with a 40-bit accumulator, which
// is the word layout of the 16-bit fixed-point signal processor the interface
// was built around. Control unit A is programmed through a byte stream whose
// frames address the registers listed in ctrl_reg_e.
package qdi_pkg;

  localparam int unsigned ADC_W   = 12;   // A/D converter resolution
  localparam int unsigned DATA_W  = 16;   // filter data word
  localparam int unsigned COEF_W  = 16;   // filter coefficient, Q1.15
  localparam int unsigned ACC_W   = 40;   // multiply-accumulate register
  localparam int unsigned FRAC_W  = 15;   // fraction bits of a coefficient
  localparam int unsigned CNT_W   = 16;   // scan timing counters

  typedef logic signed [ADC_W-1:0]  adc_t;
  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic        [CNT_W-1:0]  cnt_t;

  // Registers of control unit A. A frame on link A is three bytes:
  // register number, low byte, high byte.
  typedef enum logic [7:0] {
    REG_NUM_SAMPLES = 8'h00,  // samples taken per scan
    REG_START_DELAY = 8'h01,  // sample clock pulses skipped after REV_START
    REG_CONTROL     = 8'h02   // bit 0: acquisition enabled
  } ctrl_reg_e;

endpackage
