// tb_chip_population: one-shot calibration of a population of transmitters.
//
// Draws eight random transmitters (Q-branch gain within +-15 %, phase error
// within +-0.15 rad, LO leak 0.02 to 0.10 of full scale at any angle), runs a
// full-size calibration (12000 training steps) on each, and measures the
// image-rejection ratio (IRR) and LO-leakage rejection ratio (LRR) of the
// modelled transmitter output before and after.  Each calibrated transmitter
// must reach 38 dB IRR and 33 dB LRR.
module tb_chip_population;
  import iqloft_pkg::*;

  localparam int ED_LAT = 5;
  localparam int NWIN   = 4096;
  localparam int KTONE  = 37;
  localparam real AMP   = 0.9;
  localparam real PI    = 3.14159265358979;
  localparam int NCHIP  = 8;

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
  real worst_irr = 1000.0, worst_lrr = 1000.0;

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
    real irr0, lrr0, irr1, lrr1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCHIP; c++) begin
      // a random transmitter: gain +-15 %, phase +-0.15 rad, LO leak 0.02..0.10
      m_alpha = 0.85 + $itor($urandom_range(0, 300)) / 1000.0;
      m_theta = ($itor($urandom_range(0, 300)) - 150.0) / 1000.0;
      m_sigma = 0.02 + $itor($urandom_range(0, 80)) / 1000.0;
      m_phi   = ($itor($urandom_range(0, 6200)) - 3100.0) / 1000.0;
      measure(irr0, lrr0);
      @(negedge clk);
      cal_start = 1'b1;
      @(negedge clk);
      cal_start = 1'b0;
      while (!cal_done) @(negedge clk);
      measure(irr1, lrr1);
      $display("chip %0d: alpha %5.3f theta %6.3f sigma %5.3f phi %6.3f  IRR %5.1f -> %5.1f dB  LRR %5.1f -> %5.1f dB",
               c, m_alpha, m_theta, m_sigma, m_phi, irr0, irr1, lrr0, lrr1);
      if (irr1 < worst_irr) worst_irr = irr1;
      if (lrr1 < worst_lrr) worst_lrr = lrr1;
      checks += 2;
      if (irr1 < 38.0) begin failures++; $display("IRR after calibration too low"); end
      if (lrr1 < 33.0) begin failures++; $display("LRR after calibration too low"); end
    end
    $display("worst calibrated IRR %5.1f dB, LRR %5.1f dB", worst_irr, worst_lrr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
