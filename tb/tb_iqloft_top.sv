// tb_iqloft_top: end-to-end test of the calibrator at its default size
// (12000 training steps of 8 cycles each).
//
// A single baseband tone drives the design; its output goes through the
// transmitter/envelope-detector model and the detector samples come back.
// Two calibrations are run back to back with different impairments (the
// second restarts from the compensating state and has a negative LOFT
// angle).  For each the test checks the estimated alpha, theta, sigma, phi,
// the step count and the calibration time, and measures, by correlating the
// modelled transmitter output over whole tone periods, the image-rejection
// ratio (IRR) and LO-leakage rejection ratio (LRR) before and after
// calibration.  It counts how often each mechanism occurred: compensator
// bypass, training steps, estimations, active compensation, recalibration
// and the negative-phi sign decision.
module tb_iqloft_top;
  import iqloft_pkg::*;

  localparam int ED_LAT = 5;
  localparam int NWIN   = 4096;     // correlation window, whole tone periods
  localparam int KTONE  = 37;       // tone periods per window
  localparam real AMP   = 0.9;
  localparam real PI    = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic [3:0] delay_sel = 4'(ED_LAT);
  iq_t bb = '0, tx;
  logic [EW-1:0] det;
  logic cal_busy, cal_done;
  cal_state_e cal_state;
  logic [13:0] train_steps;
  chi_vec_t chi;
  impair_t imp;
  comp_coef_t coef;
  logic signed [31:0] lms_err;

  real m_alpha = 1.0, m_theta = 0.0, m_sigma = 0.0, m_phi = 0.0, m_hd3 = 0.0;
  int  m_noise = 1;

  iqloft_top dut (.*);

  tx_ed_model #(.ED_LAT(ED_LAT)) u_model (
    .clk, .tx, .alpha(m_alpha), .theta(m_theta), .sigma(m_sigma), .phi(m_phi),
    .hd3(m_hd3), .noise_lsb(m_noise), .det);

  int checks = 0, failures = 0;
  int n_bypass = 0, n_steps = 0, n_est = 0, n_comp = 0, n_recal = 0, n_negphi = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tone generator: one sample per clock
  int ph = 0;
  always @(negedge clk) begin
    real w;
    w = 2.0 * PI * $itor(KTONE) * $itor(ph) / $itor(NWIN);
    bb.i <= sample_t'($rtoi(AMP * $cos(w) * (2.0 ** DF)));
    bb.q <= sample_t'($rtoi(AMP * $sin(w) * (2.0 ** DF)));
    ph <= (ph + 1) % NWIN;
  end

  // event counters
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_lms.step_done) n_steps++;
      if (dut.u_est.done) n_est++;
      if (dut.u_comp.en) n_comp++;
      if (!dut.u_comp.en) n_bypass++;
    end
  end

  task automatic chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("%s = %f expected %f", what, got, exp);
    end else $display("%s = %f (model %f)", what, got, exp);
  endtask

  // Correlate the modelled transmitter output with the wanted tone, its image
  // and dc over one window; returns IRR and LRR in dB.
  task automatic measure(output real irr, output real lrr);
    real si, sq, ii, iqm, di, dq, w, ti, tq, vi, vq, s_mag, i_mag, d_mag;
    si = 0; sq = 0; ii = 0; iqm = 0; di = 0; dq = 0;
    @(negedge clk);
    while (ph != 0) @(negedge clk);
    repeat (2) @(negedge clk);   // tx lags bb by one cycle
    for (int n = 0; n < NWIN; n++) begin
      w  = 2.0 * PI * $itor(KTONE) * $itor(n) / $itor(NWIN);
      ti = $itor(tx.i) / (2.0 ** DF);
      tq = $itor(tx.q) / (2.0 ** DF);
      vi = ti - m_alpha * $sin(m_theta) * tq + m_sigma * $cos(m_phi);
      vq = m_alpha * $cos(m_theta) * tq + m_sigma * $sin(m_phi);
      // v * e^(-jw): wanted tone;  v * e^(+jw): image
      si  += vi * $cos(w) + vq * $sin(w);
      sq  += vq * $cos(w) - vi * $sin(w);
      ii  += vi * $cos(w) - vq * $sin(w);
      iqm += vq * $cos(w) + vi * $sin(w);
      di  += vi;
      dq  += vq;
      @(negedge clk);
    end
    s_mag = $sqrt(si * si + sq * sq);
    i_mag = $sqrt(ii * ii + iqm * iqm) + 1e-9;
    d_mag = $sqrt(di * di + dq * dq) + 1e-9;
    irr = 20.0 * $log10(s_mag / i_mag);
    lrr = 20.0 * $log10(s_mag / d_mag);
  endtask

  task automatic calibrate(input real al, input real th, input real sg, input real ph_lo);
    int cyc;
    real irr0, lrr0, irr1, lrr1;
    m_alpha = al; m_theta = th; m_sigma = sg; m_phi = ph_lo;
    measure(irr0, lrr0);
    @(negedge clk);
    if (cal_done) n_recal++;
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    cyc = 0;
    while (!cal_done) begin @(negedge clk); cyc++; end
    checks++;
    if (int'(train_steps) != 12000) begin failures++; $display("train steps %0d", train_steps); end
    checks++;
    if (cyc != 96093) begin failures++; $display("calibration %0d cycles", cyc); end
    $display("calibration took %0d cycles (%f ms at 80 MHz)", cyc, $itor(cyc) / 80.0e3);
    chk("alpha", $itor(imp.alpha) / (2.0 ** XF), al, 0.01);
    chk("theta", $itor(imp.theta) / (2.0 ** XF), th, 0.01);
    chk("sigma", $itor(imp.sigma) / (2.0 ** XF), sg, 0.01);
    chk("phi",   $itor(imp.phi)   / (2.0 ** XF), ph_lo, 0.15);
    if (imp.phi < 0) n_negphi++;
    measure(irr1, lrr1);
    $display("IRR %5.1f dB -> %5.1f dB, LRR %5.1f dB -> %5.1f dB", irr0, irr1, lrr0, lrr1);
    checks += 2;
    if (irr1 < 38.0) begin failures++; $display("IRR after calibration too low"); end
    if (lrr1 < 33.0) begin failures++; $display("LRR after calibration too low"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    // before any calibration the compensator is transparent
    for (int n = 0; n < 16; n++) begin
      iq_t prev;
      @(posedge clk);
      prev = bb;            // the sample the design takes at this edge
      @(negedge clk);
      checks++;
      if (tx != prev) begin failures++; $display("bypass: tx differs from bb"); end
    end
    calibrate(1.08, 0.07, 0.05, 0.8);
    calibrate(0.93, -0.10, 0.08, -1.9);
    $display("events: bypass=%0d steps=%0d estimations=%0d compensating=%0d recalibrations=%0d negative_phi=%0d",
             n_bypass, n_steps, n_est, n_comp, n_recal, n_negphi);
    checks += 6;
    if (n_bypass == 0) begin failures++; $display("bypass never happened"); end
    if (n_steps != 24000) begin failures++; $display("training steps %0d", n_steps); end
    if (n_est != 2) begin failures++; $display("estimations %0d", n_est); end
    if (n_comp == 0) begin failures++; $display("compensation never active"); end
    if (n_recal == 0) begin failures++; $display("recalibration never happened"); end
    if (n_negphi == 0) begin failures++; $display("negative phi never decided"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
