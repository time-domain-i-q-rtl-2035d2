// iq_compensator: per-sample I/Q-imbalance and LO-feedthrough pre-distortion.
//
// The transmitter is modelled as  v = I + j*alpha*e^(j*theta)*Q + sigma*e^(j*phi)
// (Q branch with gain alpha and phase error theta, plus an LO leak).  To make
// v equal the wanted I + jQ the compensator sends
//   d  = Q - lo_q                     lo_q = sigma*sin(phi)
//   Qc = g * d                        g    = 1/(alpha*cos(theta))
//   Ic = I - lo_i + t * d             lo_i = sigma*cos(phi), t = tan(theta)
// i.e. two multiplies and three adds per sample.  The published design names
// only the operators of its compensator (multipliers and adders, one cycle);
// this inverse of the transmitter model is this implementation's derivation.
// Results are truncated to DF fractional bits and saturated to DW bits.
//
// Interface: one sample per clock, registered output (latency 1 cycle).  With
// `en` low the input is passed through unchanged (same latency); the
// calibrator holds `en` low while training so the detector sees the raw
// transmitter.
module iq_compensator
  import iqloft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  comp_coef_t coef,
  input  iq_t        din,
  output iq_t        dout
);

  localparam int SH = KF - DF;
  localparam int PW = DW + KW + 4;
  localparam logic signed [PW-1:0] SMAX = PW'((1 <<< (DW - 1)) - 1);
  localparam logic signed [PW-1:0] SMIN = -PW'(1 <<< (DW - 1));

  function automatic sample_t sat(input logic signed [PW-1:0] v);
    if (v > SMAX)      return sample_t'(SMAX);
    else if (v < SMIN) return sample_t'(SMIN);
    else               return sample_t'(v);
  endfunction

  logic signed [PW-1:0] d, qc, ic;
  always_comb begin
    d  = (PW'(din.q) <<< SH) - PW'(coef.lo_q);
    qc = (PW'(coef.g) * d) >>> KF;
    ic = (PW'(din.i) <<< SH) - PW'(coef.lo_i) + ((PW'(coef.t) * d) >>> KF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
    end else if (en) begin
      dout.i <= sat(ic >>> SH);
      dout.q <= sat(qc >>> SH);
    end else begin
      dout <= din;
    end
  end

endmodule
