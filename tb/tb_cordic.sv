// tb_cordic: self-checking test of the CORDIC operator.
// Runs square roots (including small operands that need normalisation),
// divisions and arcsines, compares with real-valued references computed in
// the testbench, and checks the 25-cycle operation latency.
module tb_cordic;
  import iqloft_pkg::*;

  localparam int W = XW, FR = XF, ITER = 23;
  localparam real SCALE = 2.0 ** FR;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cordic_op_e op = CORDIC_SQRT;
  logic signed [W-1:0] a = '0, b = '0, res, aux;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic #(.W(W), .FR(FR), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input cordic_op_e o, input real av, input real bv,
                     input real exp_res, input real exp_aux, input real tol);
    int cyc;
    real r, x;
    @(negedge clk);
    op = o; a = W'($rtoi(av * SCALE)); b = W'($rtoi(bv * SCALE)); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    r = $itor(res) / SCALE;
    x = $itor(aux) / SCALE;
    checks++;
    if (cyc != ITER + 2) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, ITER + 2);
    end
    checks++;
    if ((r - exp_res > tol) || (exp_res - r > tol)) begin
      failures++;
      $display("op %s a=%f b=%f: res %f expected %f", o.name(), av, bv, r, exp_res);
    end
    if (o == CORDIC_ASIN) begin
      checks++;
      if ((x - exp_aux > tol) || (exp_aux - x > tol)) begin
        failures++;
        $display("asin(%f): cos %f expected %f", av, x, exp_aux);
      end
    end
  endtask

  initial begin
    real v, w;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // fixed cases
    run(CORDIC_SQRT, 1.0,    0.0, 1.0,   0.0, 1e-4);
    run(CORDIC_SQRT, 0.0025, 0.0, 0.05,  0.0, 1e-4);
    run(CORDIC_SQRT, 1.44,   0.0, 1.2,   0.0, 1e-4);
    run(CORDIC_SQRT, 0.0,    0.0, 0.0,   0.0, 1e-4);
    run(CORDIC_SQRT, 7.5,    0.0, $sqrt(7.5), 0.0, 1e-4);
    run(CORDIC_DIV,  0.3,    1.2, 0.25,  0.0, 1e-4);
    run(CORDIC_DIV, -0.05,   0.05, -1.0, 0.0, 1e-4);
    run(CORDIC_ASIN, 0.5,    0.0, $asin(0.5), $cos($asin(0.5)), 2e-4);
    run(CORDIC_ASIN, -0.1,   0.0, $asin(-0.1), $cos($asin(-0.1)), 2e-4);
    // near |a| = 1 the angle is ill-conditioned; the cosine stays accurate
    run(CORDIC_ASIN, 0.998,   0.0, $asin(0.998),   $cos($asin(0.998)),   3e-3);
    run(CORDIC_ASIN, -0.9995, 0.0, $asin(-0.9995), $cos($asin(-0.9995)), 3e-3);
    run(CORDIC_ASIN, 0.99995, 0.0, $asin(0.99995), $cos($asin(0.99995)), 3e-3);
    // random cases
    for (int n = 0; n < 60; n++) begin
      v = $itor($urandom_range(1, 200000)) / 100000.0;     // (0, 2]
      run(CORDIC_SQRT, v, 0.0, $sqrt(v), 0.0, 2e-4);
      w = 0.5 + $itor($urandom_range(0, 100000)) / 100000.0;
      v = (($itor($urandom_range(0, 200000)) / 100000.0) - 1.0) * w * 1.5;
      run(CORDIC_DIV, v, w, v / w, 0.0, 2e-4);
      v = ($itor($urandom_range(0, 190000)) / 100000.0) - 0.95;
      run(CORDIC_ASIN, v, 0.0, $asin(v), $cos($asin(v)), 5e-4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
