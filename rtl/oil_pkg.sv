// Shared widths, types and constants of the engine-oil degradation monitor.
//
// The monitor samples the optical transmittance (%T) of the oil once per hour
// as a 9-bit code, keeps the last 10 samples with their hour stamps, fits a
// least-squares line to them and grades the oil as normal, warning or critical.
// The 9-bit sample and hour widths and the 10-sample window follow the source
// description; the fixed-point formats below are this design's own choice.
package oil_pkg;

  // 9-bit %T code and 9-bit running hour (0..511).
  localparam int unsigned DATA_W = 9;
  localparam int unsigned HOUR_W = 9;

  // Number of samples in the regression window.
  localparam int unsigned WIN_N = 10;

  // Slope: signed, SLOPE_FRAC fraction bits, in %T codes per hour.
  localparam int unsigned SLOPE_W    = 16;
  localparam int unsigned SLOPE_FRAC = 8;

  // Remaining-life estimate in hours.
  localparam int unsigned PRED_W = 16;

  // Fuzzy degree: 0 .. MU_ONE (MU_ONE stands for full membership).
  localparam int unsigned MU_W   = 8;
  localparam int unsigned MU_ONE = 255;

  // Sum widths of the regression.
  // They hold up to 16 samples, so N may be raised to 16 without overflow.
  localparam int unsigned SUM1_W = 13;  // sum of 16 x 9-bit values  <= 8176
  localparam int unsigned SUM2_W = 22;  // sum of 16 x 18-bit products <= 4 177 936

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [HOUR_W-1:0] hour_t;
  typedef logic signed [SLOPE_W-1:0] slope_t;
  typedef logic [MU_W-1:0] mu_t;

  // Least-squares sums over the window.
  typedef struct packed {
    logic [SUM1_W-1:0] sx;   // sum x
    logic [SUM2_W-1:0] sxx;  // sum x^2
    logic [SUM1_W-1:0] sy;   // sum y
    logic [SUM2_W-1:0] sxy;  // sum x*y
  } lsm_sums_t;

  // Oil condition; the encoding orders the levels by severity.
  typedef enum logic [1:0] {
    COND_NORMAL   = 2'd0,
    COND_WARNING  = 2'd1,
    COND_CRITICAL = 2'd2
  } cond_e;

  // Degrees of the three fuzzy sets.
  typedef struct packed {
    mu_t normal;
    mu_t warning;
    mu_t critical;
  } fuzzy_mu_t;

endpackage
