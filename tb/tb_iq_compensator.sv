// tb_iq_compensator: self-checking test of the per-sample compensator.
// For random coefficients and samples, the expected output is worked out in
// real arithmetic from Qc = g*(Q - lo_q), Ic = I - lo_i + t*(Q - lo_q) and
// compared within one LSB (truncation); saturation at full scale, the bypass
// mode and the one-cycle latency are checked too.  A last check feeds the
// compensated sample through the transmitter model and expects the wanted
// sample back.
module tb_iq_compensator;
  import iqloft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  comp_coef_t coef = '0;
  iq_t din = '0, dout;
  int checks = 0, failures = 0;
  int n_sat = 0;

  iq_compensator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sr(input sample_t v);
    return $itor(v) / (2.0 ** DF);
  endfunction
  function automatic real clip(input real v);
    real mx;
    mx = ($itor((1 << (DW - 1)) - 1)) / (2.0 ** DF);
    if (v > mx) return mx;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  task automatic chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("%s = %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    real lo_i, lo_q, g, t, iv, qv, ei, eq, al, th, vi, vq;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // bypass: output equals input one cycle later
    for (int n = 0; n < 20; n++) begin
      din.i = sample_t'($urandom); din.q = sample_t'($urandom);
      @(negedge clk);
      checks++;
      if (dout != din) begin failures++; $display("bypass mismatch"); end
    end
    en = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      lo_i = ($itor($urandom_range(0, 4000)) - 2000.0) / 20000.0;
      lo_q = ($itor($urandom_range(0, 4000)) - 2000.0) / 20000.0;
      g    = 0.8 + $itor($urandom_range(0, 4000)) / 10000.0;
      t    = ($itor($urandom_range(0, 4000)) - 2000.0) / 10000.0;
      coef.lo_i = coef_t'($rtoi(lo_i * (2.0 ** KF)));
      coef.lo_q = coef_t'($rtoi(lo_q * (2.0 ** KF)));
      coef.g    = coef_t'($rtoi(g * (2.0 ** KF)));
      coef.t    = coef_t'($rtoi(t * (2.0 ** KF)));
      lo_i = $itor(coef.lo_i) / (2.0 ** KF);
      lo_q = $itor(coef.lo_q) / (2.0 ** KF);
      g    = $itor(coef.g) / (2.0 ** KF);
      t    = $itor(coef.t) / (2.0 ** KF);
      din.i = sample_t'($urandom); din.q = sample_t'($urandom);
      iv = sr(din.i); qv = sr(din.q);
      eq = g * (qv - lo_q);
      ei = iv - lo_i + t * (qv - lo_q);
      if (eq != clip(eq) || ei != clip(ei)) n_sat++;
      @(negedge clk);
      chk("Ic", sr(dout.i), clip(ei), 2.0 / (2.0 ** DF));
      chk("Qc", sr(dout.q), clip(eq), 2.0 / (2.0 ** DF));
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    // closed loop through the transmitter model v = I + j*al*e^(j*th)*Q + lo
    al = 1.1; th = 0.08;
    coef.lo_i = coef_t'($rtoi(0.03 * (2.0 ** KF)));
    coef.lo_q = coef_t'($rtoi(-0.02 * (2.0 ** KF)));
    coef.g    = coef_t'($rtoi(1.0 / (al * $cos(th)) * (2.0 ** KF)));
    coef.t    = coef_t'($rtoi($tan(th) * (2.0 ** KF)));
    for (int n = 0; n < 50; n++) begin
      iv = ($itor($urandom_range(0, 1000)) - 500.0) / 1000.0;
      qv = ($itor($urandom_range(0, 1000)) - 500.0) / 1000.0;
      din.i = sample_t'($rtoi(iv * (2.0 ** DF)));
      din.q = sample_t'($rtoi(qv * (2.0 ** DF)));
      iv = sr(din.i); qv = sr(din.q);
      @(negedge clk);
      vi = sr(dout.i) - al * $sin(th) * sr(dout.q) + 0.03;
      vq = al * $cos(th) * sr(dout.q) - 0.02;
      chk("loop I", vi, iv, 4.0 / (2.0 ** DF));
      chk("loop Q", vq, qv, 4.0 / (2.0 ** DF));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
