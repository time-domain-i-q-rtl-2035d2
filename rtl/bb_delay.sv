// bb_delay: programmable delay line for the baseband samples.
//
// The LMS update compares each envelope sample with the baseband sample that
// produced it, so the baseband stream is delayed by the latency of the
// transmitter, envelope detector and its ADC ("the delayed BB signal" of the
// published design).  The delay is not given there; here it is a run-time
// setting of 1..DEPTH clock cycles: a DEPTH-stage shift register of complex
// samples, tapped at stage `sel` (delay = sel + 1 cycles).
//
// Interface: one sample per clock; `dout` is `din` from sel+1 cycles earlier.
module bb_delay
  import iqloft_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] sel,
  input  iq_t                      din,
  output iq_t                      dout
);

  iq_t line [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) line[k] <= '0;
    end else begin
      line[0] <= din;
      for (int k = 1; k < DEPTH; k++) line[k] <= line[k-1];
    end
  end

  assign dout = line[sel];

endmodule
