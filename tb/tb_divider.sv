// tb_divider: self-checking test of the radix-4 fractional divider.
// Random signed numerators and positive denominators with |quotient| < 2;
// the expected quotient is the truncated integer quotient worked out in the
// testbench.  Also checks the 9-cycle latency.
module tb_divider;
  localparam int NW = 26, QF = 15;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [NW-1:0] num = '0, den = '0;
  logic busy, done;
  logic signed [QF+1:0] q;
  int checks = 0, failures = 0;

  divider #(.NW(NW), .QF(QF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint n, input longint d);
    int cyc;
    longint mag, expq;
    @(negedge clk);
    num = NW'(n); den = NW'(d); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    mag  = ((n < 0 ? -n : n) <<< QF) / d;
    expq = (n < 0) ? -mag : mag;
    checks += 2;
    if (cyc != 9) begin
      failures++;
      $display("latency %0d, expected 9", cyc);
    end
    if (longint'(q) != expq) begin
      failures++;
      $display("%0d / %0d: q=%0d expected %0d", n, d, q, expq);
    end
  endtask

  initial begin
    longint d, n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1 <<< 20, 1 <<< 20);          // 1.0
    run(-(1 <<< 19), 1 <<< 20);       // -0.5
    run(3, 1 <<< 20);                 // tiny
    run(0, 12345);
    for (int k = 0; k < 300; k++) begin
      d = longint'($urandom_range(1000, 1 << 22));
      n = longint'($urandom_range(0, 32'(2 * d - 1)));
      if ($urandom_range(0, 1) == 1) n = -n;
      run(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
