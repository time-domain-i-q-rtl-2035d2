// tb_cal_controller: self-checking test of the calibration sequencer.
// The LMS block and the estimator are replaced by small models in the
// testbench (an 8-cycle step engine and a fixed-latency estimator).  Checks:
// one clear cycle, exactly N_TRAIN steps requested and completed, one
// estimator start, compensator bypassed until the estimate is in, the total
// cycle count, and that a second calibration can be started from COMP.
module tb_cal_controller;
  import iqloft_pkg::*;
  localparam int N = 40;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic lms_ready, lms_done = 1'b0, est_done = 1'b0;
  cal_state_e state;
  logic lms_clear, lms_step, est_start, comp_en, cal_busy, cal_done;
  logic [$clog2(N+1)-1:0] steps;
  int checks = 0, failures = 0;

  cal_controller #(.N_TRAIN(N)) dut (.*);

  always #5 clk = ~clk;

  // 8-cycle LMS step model
  int lms_ph = 0;
  assign lms_ready = (lms_ph == 0);
  always_ff @(posedge clk) begin
    lms_done <= 1'b0;
    if (lms_clear) lms_ph <= 0;
    else if (lms_ph == 0 && lms_step) lms_ph <= 1;
    else if (lms_ph == 7) begin lms_ph <= 0; lms_done <= 1'b1; end
    else if (lms_ph != 0) lms_ph <= lms_ph + 1;
  end
  // estimator model, 89 cycles
  int est_cnt = -1;
  always_ff @(posedge clk) begin
    est_done <= 1'b0;
    if (est_start) est_cnt <= 89;
    else if (est_cnt == 1) begin est_done <= 1'b1; est_cnt <= -1; end
    else if (est_cnt > 0) est_cnt <= est_cnt - 1;
  end

  int n_clear, n_step, n_est, n_comp_early, cyc;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic calibrate();
    n_clear = 0; n_step = 0; n_est = 0; n_comp_early = 0;
    @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    cyc = 0;
    while (!cal_done) begin
      if (lms_clear) n_clear++;
      if (lms_step) n_step++;
      if (est_start) n_est++;
      if (comp_en) n_comp_early++;
      @(negedge clk);
      cyc++;
    end
    checks += 6;
    if (n_clear != 1) begin failures++; $display("clear cycles %0d", n_clear); end
    if (n_step != N) begin failures++; $display("steps requested %0d", n_step); end
    if (int'(steps) != N) begin failures++; $display("steps counted %0d", steps); end
    if (n_est != 1) begin failures++; $display("estimator starts %0d", n_est); end
    if (n_comp_early != 0) begin failures++; $display("compensator on during training"); end
    // N*8 training + 89 estimation + 4 cycles of state hand-over
    if (cyc != N * 8 + 89 + 4) begin failures++; $display("calibration took %0d cycles", cyc); end
    repeat (20) @(negedge clk);
    checks += 2;
    if (!comp_en || cal_busy) begin failures++; $display("not in COMP after calibration"); end
    if (n_step != N) begin failures++; $display("extra steps"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (state != CAL_IDLE || comp_en || cal_busy) begin failures++; $display("bad reset state"); end
    calibrate();
    calibrate();   // recalibration from COMP
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
