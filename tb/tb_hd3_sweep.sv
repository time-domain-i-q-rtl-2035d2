// tb_hd3_sweep: calibration accuracy against envelope-detector distortion.
//
// Runs full-size calibrations (12000 training steps) of one impaired
// transmitter while the detector model adds a third-order term
// hd3*|v|^6 of increasing size, and measures the image-rejection ratio (IRR)
// and LO-leakage rejection ratio (LRR) after each calibration.  The square
// law of the LMS model cannot represent the distortion; its constant part
// mostly ends up in the sigma^2 (LOFT) term, so the LOFT estimate degrades
// while the I/Q-imbalance estimate does not.  Checks: every calibration
// completes, IRR stays above 38 dB throughout, the LRR of the undistorted
// case is above 33 dB and the LRR with the largest HD3 is lower than with
// none.
module tb_hd3_sweep;
  import iqloft_pkg::*;

  localparam int ED_LAT = 5;
  localparam int NWIN   = 4096;
  localparam int KTONE  = 37;
  localparam real AMP   = 0.9;
  localparam real PI    = 3.14159265358979;
  localparam int NH     = 4;

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

  real m_alpha = 1.06, m_theta = -0.06, m_sigma = 0.06, m_phi = 1.2, m_hd3 = 0.0;
  int  m_noise = 1;

  iqloft_top dut (.*);

  tx_ed_model #(.ED_LAT(ED_LAT)) u_model (
    .clk, .tx, .alpha(m_alpha), .theta(m_theta), .sigma(m_sigma), .phi(m_phi),
    .hd3(m_hd3), .noise_lsb(m_noise), .det);

  int checks = 0, failures = 0;
  real hd3_set [NH] = '{0.0, 0.003, 0.01, 0.03};
  real irr_at [NH], lrr_at [NH];

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ph = 0;
  always @(negedge clk) begin
    real w;
    w = 2.0 * PI * $itor(KTONE) * $itor(ph) / $itor(NWIN);
    bb.i <= sample_t'($rtoi(AMP * $cos(w) * (2.0 ** DF)));
    bb.q <= sample_t'($rtoi(AMP * $sin(w) * (2.0 ** DF)));
    ph <= (ph + 1) % NWIN;
  end

  // IRR and LRR of the modelled transmitter output over one window
  task automatic measure(output real irr, output real lrr);
    real si, sq, ii, iqm, di, dq, w, ti, tq, vi, vq;
    si = 0; sq = 0; ii = 0; iqm = 0; di = 0; dq = 0;
    @(negedge clk);
    while (ph != 0) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int n = 0; n < NWIN; n++) begin
      w  = 2.0 * PI * $itor(KTONE) * $itor(n) / $itor(NWIN);
      ti = $itor(tx.i) / (2.0 ** DF);
      tq = $itor(tx.q) / (2.0 ** DF);
      vi = ti - m_alpha * $sin(m_theta) * tq + m_sigma * $cos(m_phi);
      vq = m_alpha * $cos(m_theta) * tq + m_sigma * $sin(m_phi);
      si  += vi * $cos(w) + vq * $sin(w);
      sq  += vq * $cos(w) - vi * $sin(w);
      ii  += vi * $cos(w) - vq * $sin(w);
      iqm += vq * $cos(w) + vi * $sin(w);
      di  += vi;
      dq  += vq;
      @(negedge clk);
    end
    irr = 20.0 * $log10($sqrt(si * si + sq * sq) / ($sqrt(ii * ii + iqm * iqm) + 1e-9));
    lrr = 20.0 * $log10($sqrt(si * si + sq * sq) / ($sqrt(di * di + dq * dq) + 1e-9));
  endtask

  initial begin
    real irr0, lrr0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    measure(irr0, lrr0);
    $display("uncalibrated: IRR %5.1f dB, LRR %5.1f dB", irr0, lrr0);
    for (int h = 0; h < NH; h++) begin
      m_hd3 = hd3_set[h];
      @(negedge clk);
      cal_start = 1'b1;
      @(negedge clk);
      cal_start = 1'b0;
      while (!cal_done) @(negedge clk);
      measure(irr_at[h], lrr_at[h]);
      $display("hd3 %5.3f: sigma %f (model %f)  IRR %5.1f dB  LRR %5.1f dB", m_hd3,
               $itor(imp.sigma) / (2.0 ** XF), m_sigma, irr_at[h], lrr_at[h]);
      checks++;
      if (irr_at[h] < 38.0) begin failures++; $display("IRR degraded by HD3"); end
    end
    checks += 2;
    if (lrr_at[0] < 33.0) begin failures++; $display("LRR without HD3 too low"); end
    if (!(lrr_at[NH-1] < lrr_at[0])) begin failures++; $display("HD3 did not affect the LRR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
