// Shared widths and constants of the first-order statistics accelerator.
//
// Widths that the design takes from its source description: 16-bit signed
// input samples, a 32-bit sum accumulator, a 48:32-bit divider, 16x16 and
// 32x32-bit Booth multipliers, a 48-bit square root, and the output scale
// factors of kurtosis (65535) and skewness (256). The remaining widths (the
// squared-sum accumulator, the higher-moment accumulators and the kurtosis /
// skewness dividers) are this design's own choice, sized for 12-bit samples
// and up to 2^16 samples since the last clear.
package stat_pkg;
  localparam int DATA_W  = 16;   // input sample, signed
  localparam int SUM_W   = 32;   // running sum of samples
  localparam int SQ_W    = 48;   // running sum of squared samples
  localparam int CNT_W   = 32;   // sample counter (divisor of the 48:32 divider)
  localparam int MEAN_W  = 32;   // mean as fed to the 32x32 multiplier
  localparam int MEAN_FRAC = 16; // fraction bits the mean keeps internally
  localparam int VAR_W   = 48;   // variance (radicand of the 48-bit square root)
  localparam int STD_W   = VAR_W / 2;
  localparam int MOM_W   = 64;   // sums of cubed / fourth-power deviations
  localparam int DEN_W   = 64;   // N*sigma^4 and (N-1)*sigma^3
  localparam int KNUM_W  = 80;   // kurtosis dividend (sum4 * KURT_SCALE)
  localparam int SNUM_W  = 72;   // skewness dividend (sum3 * SKEW_SCALE)
  localparam int RES_W   = 64;   // kurtosis / skewness result as published

  localparam int unsigned KURT_SCALE = 65535;
  localparam int unsigned SKEW_SCALE = 256;

  // Results of the mean / variance / standard deviation stage for one sample,
  // handed to the kurtosis / skewness stage.
  typedef struct packed {
    logic signed [DATA_W-1:0] x;
    logic        [CNT_W-1:0]  count;
    logic signed [MEAN_W-1:0] mean;
    logic        [VAR_W-1:0]  variance;
    logic        [STD_W-1:0]  std_dev;
  } mvs_result_t;

  // Everything the host can read back through the register interface.
  typedef struct packed {
    logic                     busy;
    logic        [CNT_W-1:0]  count;
    logic signed [MEAN_W-1:0] mean;
    logic        [VAR_W-1:0]  variance;
    logic        [STD_W-1:0]  std_dev;
    logic signed [RES_W-1:0]  kurtosis;
    logic signed [RES_W-1:0]  skewness;
    logic        [31:0]       dropped;
  } stat_status_t;

  // Register map of the AXI4-Lite slave (byte addresses).
  localparam logic [5:0] REG_CTRL     = 6'h00;  // [0] enable, [1] clear (write 1)
  localparam logic [5:0] REG_STATUS   = 6'h04;  // [0] busy, [1] enable
  localparam logic [5:0] REG_COUNT    = 6'h08;
  localparam logic [5:0] REG_MEAN     = 6'h0C;
  localparam logic [5:0] REG_VAR_LO   = 6'h10;
  localparam logic [5:0] REG_VAR_HI   = 6'h14;
  localparam logic [5:0] REG_STD      = 6'h18;
  localparam logic [5:0] REG_KURT_LO  = 6'h1C;
  localparam logic [5:0] REG_KURT_HI  = 6'h20;
  localparam logic [5:0] REG_SKEW_LO  = 6'h24;
  localparam logic [5:0] REG_SKEW_HI  = 6'h28;
  localparam logic [5:0] REG_DROPPED  = 6'h2C;
endpackage
