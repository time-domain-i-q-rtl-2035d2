// tx_ed_model: behavioural model (not synthesizable) of the analog side:
// the impaired direct-conversion transmitter and the envelope detector with
// its ADC.  The transmitter output at baseband is
//   v = I + j*alpha*e^(j*theta)*Q + sigma*e^(j*phi)
// and the detector returns |v|^2 (ideal square-law, unit gain), quantised to
// EW bits unsigned with EF fractional bits, plus an optional third-order
// term hd3*|v|^6 and up to +-noise_lsb LSB of uniform noise, after ED_LAT
// clock cycles of latency.  The impairment values are real inputs so that a
// testbench can change them between calibrations.
module tx_ed_model
  import iqloft_pkg::*;
#(
  parameter int ED_LAT = 5
) (
  input  logic          clk,
  input  iq_t           tx,
  input  real           alpha,
  input  real           theta,
  input  real           sigma,
  input  real           phi,
  input  real           hd3,
  input  int            noise_lsb,
  output logic [EW-1:0] det
);

  logic [EW-1:0] pipe [ED_LAT];

  function automatic real env(input iq_t x);
    real i, q, vi, vq, p;
    i  = $itor(x.i) / (2.0 ** DF);
    q  = $itor(x.q) / (2.0 ** DF);
    vi = i - alpha * $sin(theta) * q + sigma * $cos(phi);
    vq = alpha * $cos(theta) * q + sigma * $sin(phi);
    p  = vi * vi + vq * vq;
    return p + hd3 * p * p * p;
  endfunction

  initial for (int k = 0; k < ED_LAT; k++) pipe[k] = '0;

  always @(posedge clk) begin
    real p;
    int  code;
    p = env(tx) * (2.0 ** EF);
    code = $rtoi(p + 0.5);
    if (noise_lsb > 0) code = code + $urandom_range(0, 2 * noise_lsb) - noise_lsb;
    if (code < 0) code = 0;
    if (code > (1 << EW) - 1) code = (1 << EW) - 1;
    pipe[0] <= EW'(code);
    for (int k = 1; k < ED_LAT; k++) pipe[k] <= pipe[k-1];
  end

  assign det = pipe[ED_LAT-1];

endmodule
