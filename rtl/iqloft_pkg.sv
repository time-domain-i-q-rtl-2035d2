// iqloft_pkg: number formats and shared types of the I/Q-LOFT calibrator.
//
// All values are two's-complement fixed point.  The formats below are the
// ones the whole design agrees on:
//   baseband I/Q samples      DW  bits, DF  fractional (Q1.11, full scale +-1)
//   envelope-detector sample  EW  bits unsigned, EF fractional (Q4.12)
//   chi coefficients          CW  bits, CF  fractional (Q2.13, 15-bit as in
//                             the measured design)
//   estimator internal/values XW  bits, XF  fractional (angles in radians)
//   compensator coefficients  KW  bits, KF  fractional (Q2.15)
// Only the 15-bit chi width comes from the published design; the other
// widths are choices of this implementation.
package iqloft_pkg;

  localparam int DW = 12;
  localparam int DF = 11;
  localparam int EW = 16;
  localparam int EF = 12;
  localparam int CW = 15;
  localparam int CF = 13;
  localparam int NCHI = 5;
  localparam int XW = 26;
  localparam int XF = 20;
  localparam int KW = 17;
  localparam int KF = 15;

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [CW-1:0] chi_t;
  typedef logic signed [XW-1:0] xval_t;
  typedef logic signed [KW-1:0] coef_t;

  // One complex baseband sample.
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // chi vector, element 0 is chi_1 of the LMS model:
  //   chi = [alpha^2, sigma*cos(phi), alpha*sin(theta), sigma^2, sigma*sin(phi-theta)]
  typedef chi_t [NCHI-1:0] chi_vec_t;

  // Impairment parameters produced by the estimator (XF fractional bits).
  typedef struct packed {
    xval_t alpha;   // Q-branch gain
    xval_t theta;   // Q-branch phase error, radians
    xval_t sigma;   // LO feedthrough magnitude
    xval_t phi;     // LO feedthrough angle, radians
  } impair_t;

  // Coefficients used by the per-sample compensator (KF fractional bits).
  typedef struct packed {
    coef_t lo_i;    // sigma*cos(phi): LOFT in-phase part to subtract
    coef_t lo_q;    // sigma*sin(phi): LOFT quadrature part to subtract
    coef_t g;       // 1/(alpha*cos(theta)): Q-branch gain correction
    coef_t t;       // tan(theta): Q-to-I cross term
  } comp_coef_t;

  // Operations of the shared CORDIC operator.
  typedef enum logic [1:0] {
    CORDIC_SQRT = 2'd0,   // hyperbolic vectoring: res = sqrt(a)
    CORDIC_DIV  = 2'd1,   // linear vectoring:     res = a / b
    CORDIC_ASIN = 2'd2    // double-rotation:      res = asin(a), aux = cos(res)
  } cordic_op_e;

  // Calibration sequence states.
  typedef enum logic [2:0] {
    CAL_IDLE  = 3'd0,
    CAL_CLEAR = 3'd1,
    CAL_TRAIN = 3'd2,
    CAL_EST   = 3'd3,
    CAL_COMP  = 3'd4
  } cal_state_e;

endpackage
