// iqloft_top: digital I/Q-imbalance and LO-feedthrough calibrator for a
// direct-conversion transmitter whose only analog sense path is an envelope
// detector.
//
// Baseband samples `bb` pass through the compensator to the transmitter DACs
// (`tx`).  During calibration the compensator is bypassed; the detector's
// digitised envelope `det` and the baseband delayed by `delay_sel`+1 cycles
// feed the LMS updating block, one training step per 8 cycles, for 12000
// steps.  The parameter estimator (two CORDIC operators and two dividers)
// then converts chi into alpha, theta, sigma, phi and the compensator
// coefficients, and the compensator is switched on.  The structure (ED +
// delayed baseband -> LMS -> CORDIC estimator -> compensator) follows the
// published design; widths, the delay line and the sequencing details are
// this implementation's own (see the blocks' headers).
//
// Interface: one baseband sample per clock (80 MHz in the published design).
// `cal_start` starts a calibration; `cal_busy` is high while it runs and
// `cal_done` high while the compensator is active.  `det` is the envelope
// sample, unsigned with EF fractional bits, aligned to the clock.  `chi`,
// `imp`, `coef` and `lms_err` (the last training error, 2*DF fractional bits)
// are brought out for observation.
// A calibration takes 12000*8 + 89 + 4 = 96093 cycles from the cycle of
// `cal_start` to `cal_done` (about 1.2 ms at 80 MHz).
module iqloft_top
  import iqloft_pkg::*;
#(
  parameter int N_TRAIN   = 12000,
  parameter int DLY_DEPTH = 16,
  parameter int MU_SHIFT  = 7
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cal_start,
  input  logic [$clog2(DLY_DEPTH)-1:0] delay_sel,
  input  iq_t                          bb,
  input  logic [EW-1:0]                det,
  output iq_t                          tx,
  output logic                         cal_busy,
  output logic                         cal_done,
  output cal_state_e                   cal_state,
  output logic [$clog2(N_TRAIN+1)-1:0] train_steps,
  output chi_vec_t                     chi,
  output impair_t                      imp,
  output comp_coef_t                   coef,
  output logic signed [31:0]           lms_err
);

  iq_t  bb_d;
  logic lms_clear, lms_step, lms_ready, lms_done;
  logic est_start, est_busy, est_done, comp_en;

  bb_delay #(.DEPTH(DLY_DEPTH)) u_delay (
    .clk, .rst_n, .sel(delay_sel), .din(bb), .dout(bb_d));

  lms_update #(.MU_SHIFT(MU_SHIFT)) u_lms (
    .clk, .rst_n, .clear(lms_clear), .step_valid(lms_step), .s(det), .bb(bb_d),
    .ready(lms_ready), .step_done(lms_done), .chi, .err(lms_err));

  param_estimator u_est (
    .clk, .rst_n, .start(est_start), .chi, .busy(est_busy), .done(est_done),
    .imp, .coef);

  cal_controller #(.N_TRAIN(N_TRAIN)) u_ctrl (
    .clk, .rst_n, .cal_start, .lms_ready, .lms_done, .est_done,
    .state(cal_state), .lms_clear, .lms_step, .est_start, .comp_en,
    .cal_busy, .cal_done, .steps(train_steps));

  iq_compensator u_comp (
    .clk, .rst_n, .en(comp_en), .coef, .din(bb), .dout(tx));

  // the estimator is only started when idle
  a_est_idle: assert property (@(posedge clk) disable iff (!rst_n) est_start |-> !est_busy);

endmodule
