// tb_bb_delay: self-checking test of the baseband delay line.
// Streams random samples and, for every tap setting, checks that the output
// equals the input from sel+1 cycles earlier (kept in a history array here).
module tb_bb_delay;
  import iqloft_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(DEPTH)-1:0] sel = '0;
  iq_t din = '0, dout;
  iq_t hist [$];
  int checks = 0, failures = 0;

  bb_delay #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < DEPTH; s++) begin
      sel = s[$clog2(DEPTH)-1:0];
      for (int n = 0; n < 60; n++) begin
        din.i = sample_t'($urandom); din.q = sample_t'($urandom);
        hist.push_front(din);
        @(negedge clk);
        if (hist.size() > DEPTH + 1) void'(hist.pop_back());
        if (n > DEPTH) begin
          checks++;
          if (dout != hist[s]) begin
            failures++;
            $display("sel %0d: output %h expected %h", s, dout, hist[s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
