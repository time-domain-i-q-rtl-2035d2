// tb_param_estimator: self-checking test of the parameter estimator.
// For a set of transmitter impairments (gain alpha, phase theta, LOFT
// magnitude sigma and angle phi, both signs of phi) the chi vector is formed
// in real arithmetic and quantised to 15 bits; the estimator's alpha, theta,
// sigma, phi and compensator coefficients are compared with the values
// computed here, and the 89-cycle estimation time is checked.
module tb_param_estimator;
  import iqloft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  chi_vec_t chi = '0;
  logic busy, done;
  impair_t imp;
  comp_coef_t coef;
  int checks = 0, failures = 0;

  param_estimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("%s = %f expected %f", what, got, exp);
    end
  endtask

  function automatic real xr(input xval_t v);
    return $itor(v) / (2.0 ** XF);
  endfunction
  function automatic real kr(input coef_t v);
    return $itor(v) / (2.0 ** KF);
  endfunction

  task automatic run(input real al, input real th, input real sg, input real ph);
    real c [NCHI];
    int cyc;
    c[0] = al * al;
    c[1] = sg * $cos(ph);
    c[2] = al * $sin(th);
    c[3] = sg * sg;
    c[4] = sg * $sin(ph - th);
    @(negedge clk);
    for (int k = 0; k < NCHI; k++) chi[k] = chi_t'($rtoi(c[k] * (2.0 ** CF)));
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 89) begin failures++; $display("estimation took %0d cycles", cyc); end
    // 15-bit chi limits the accuracy; tolerances follow from 2^-13 steps
    cmp("alpha", xr(imp.alpha), al, 0.002);
    cmp("theta", xr(imp.theta), th, 0.003);
    cmp("sigma", xr(imp.sigma), sg, 0.003);
    cmp("phi",   xr(imp.phi),   ph, 0.08);
    cmp("lo_i",  kr(coef.lo_i), sg * $cos(ph), 0.001);
    cmp("lo_q",  kr(coef.lo_q), sg * $sin(ph), 0.0015);
    cmp("g",     kr(coef.g),    1.0 / (al * $cos(th)), 0.003);
    cmp("t",     kr(coef.t),    $tan(th), 0.003);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1.12, 0.09, 0.06, 2.1);
    run(0.90, -0.12, 0.10, -0.7);
    run(1.00, 0.00, 0.05, -2.5);
    run(1.05, 0.05, 0.08, 0.4);
    // phi between 0 and theta: chi5 alone has the wrong sign for phi
    run(1.00, 0.10, 0.08, 0.05);
    run(1.00, -0.10, 0.08, -0.05);
    // LO leak almost on the I axis: arccos argument close to +-1
    run(0.95, 0.03, 0.06, 3.12);
    for (int n = 0; n < 20; n++) begin
      real al, th, sg, ph;
      al = 0.85 + $itor($urandom_range(0, 300)) / 1000.0;
      th = ($itor($urandom_range(0, 300)) - 150.0) / 1000.0;
      sg = 0.04 + $itor($urandom_range(0, 100)) / 1000.0;
      ph = ($itor($urandom_range(0, 5000)) - 2500.0) / 1000.0;
      run(al, th, sg, ph);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
