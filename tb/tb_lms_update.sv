// tb_lms_update: self-checking test of the LMS updating block.
// A known chi vector (an impaired transmitter) defines the envelope
// s = I^2 + chi.eta, computed here in real arithmetic and quantised like the
// detector samples.  Random baseband samples drive 12000 training steps, one
// every 8 cycles; the test checks the 8-cycle step timing, that the first
// step moves chi by mu*e*eta as computed here, and that chi converges to the
// true vector.
module tb_lms_update;
  import iqloft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, step_valid = 1'b0;
  logic [EW-1:0] s = '0;
  iq_t bb = '0;
  logic ready, step_done;
  chi_vec_t chi;
  logic signed [31:0] err;
  int checks = 0, failures = 0;

  lms_update dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real chi_true [NCHI];
  real alpha = 1.12, theta = 0.09, sigma = 0.06, phi = 2.1;

  function automatic real chi_r(input int k);
    return $itor($signed(chi[k])) / (2.0 ** CF);
  endfunction

  // drive one step and return the number of cycles until step_done
  task automatic step(input real iv, input real qv, output int cyc);
    real sv;
    int si, qi;
    si = $rtoi(iv * (2.0 ** DF));
    qi = $rtoi(qv * (2.0 ** DF));
    iv = $itor(si) / (2.0 ** DF);
    qv = $itor(qi) / (2.0 ** DF);
    sv = iv * iv + chi_true[0] * qv * qv + chi_true[1] * 2.0 * iv
       - chi_true[2] * 2.0 * iv * qv + chi_true[3] + chi_true[4] * 2.0 * qv;
    @(negedge clk);
    while (!ready) @(negedge clk);
    bb.i = DW'(si); bb.q = DW'(qi);
    s = EW'($rtoi(sv * (2.0 ** EF) + 0.5));
    step_valid = 1'b1;
    @(negedge clk);
    step_valid = 1'b0;
    cyc = 1;
    while (!step_done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    real e0, d;
    chi_true[0] = alpha * alpha;
    chi_true[1] = sigma * $cos(phi);
    chi_true[2] = alpha * $sin(theta);
    chi_true[3] = sigma * sigma;
    chi_true[4] = sigma * $sin(phi - theta);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    // initial state: chi = [1,0,0,0,0]
    checks++;
    if (chi[0] != chi_t'(1 << CF) || chi[1] != 0 || chi[2] != 0 || chi[3] != 0 || chi[4] != 0) begin
      failures++;
      $display("chi not cleared");
    end
    // first step with I = 0.5, Q = 0.25: e = s - I^2 - Q^2, chi4 += e/128
    step(0.5, 0.25, cyc);
    e0 = chi_true[0] * 0.0625 + chi_true[1] * 1.0 - chi_true[2] * 0.25
       + chi_true[3] + chi_true[4] * 0.5 - 0.0625;
    checks++;
    if (cyc != 8) begin failures++; $display("step took %0d cycles", cyc); end
    checks++;
    d = $itor(err) / (2.0 ** (2 * DF)) - e0;
    if (d > 1e-3 || d < -1e-3) begin
      failures++; $display("first error %f expected %f", $itor(err) / (2.0 ** (2 * DF)), e0);
    end
    checks++;
    d = chi_r(1) - e0 * 2.0 * 0.5 / 128.0;
    if (d > 3.0 / (2.0 ** CF) || d < -3.0 / (2.0 ** CF)) begin
      failures++; $display("first chi2 %f expected %f", chi_r(1), e0 / 128.0);
    end
    // back-to-back steps: step_done every 8 cycles when driven continuously
    for (int n = 1; n < 12000; n++) begin
      real iv, qv;
      iv = ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0) * 0.95;
      qv = ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0) * 0.95;
      step(iv, qv, cyc);
      if (n < 20) begin
        checks++;
        if (cyc != 8) begin failures++; $display("step %0d took %0d cycles", n, cyc); end
      end
    end
    for (int k = 0; k < NCHI; k++) begin
      checks++;
      d = chi_r(k) - chi_true[k];
      if (d > 0.004 || d < -0.004) begin
        failures++;
        $display("chi%0d = %f expected %f", k + 1, chi_r(k), chi_true[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
