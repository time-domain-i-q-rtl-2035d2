// param_estimator: turns the trained chi vector into impairment parameters
// and compensator coefficients.
//
// Following the published design, two CORDIC operators run side by side and
// are reused three times:
//   round 1  A: alpha = sqrt(chi1)           B: sigma = sqrt(chi4)
//   round 2  A: sin(theta) = chi3 / alpha    B: cos(phi) = chi2 / sigma
//   round 3  A: theta = asin(sin(theta))     B: phi = acos(cos(phi))
//                                               = pi/2 - asin(cos(phi))
// (25 cycles per operation, 6 operations).  The arcsine of sin(theta) also
// gives cos(theta).  The rest is this implementation's own:
//   - the fifth chi element gives  sigma*sin(phi)*cos(theta) = chi5 +
//     chi2*sin(theta)  =: u.  As cos(theta) > 0, sign(phi) = sign(u), which
//     the arccosine cannot give;
//   - one multiply cycle forms alpha*cos(theta), u and u*alpha and starts two
//     9-cycle dividers for g = 1/(alpha*cos(theta)) and
//     t = sin(theta)/cos(theta) = tan(theta);
//   - the LOFT coefficients are lo_i = chi2 = sigma*cos(phi) and
//     lo_q = u*alpha*g = sigma*sin(phi).  lo_q is taken from u rather than
//     from sigma*sin(acos(chi2/sigma)) because the latter is ill-conditioned
//     when phi is near 0 or pi (a 2^-13 step of chi2 then moves sin(phi) by
//     several percent); phi itself is still reported from the arccosine,
//     and the cosine output of the second arcsine (|sin(phi)|) is unused;
//   - the quotients fed to the arcsine are clamped to +-(1 - 2^-16) so that
//     rounding, or a near-zero sigma (no LOFT), cannot push them past 1.
//
// Interface: `start` (while `busy` is low) samples `chi`; `done` pulses 89
// cycles later (three CORDIC rounds of 25 cycles plus one hand-over cycle
// each, the multiply cycle, the 9-cycle division and one output cycle), when
// `imp` and `coef` take their new values, which they hold until the next
// completed estimation.
module param_estimator
  import iqloft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  chi_vec_t   chi,
  output logic       busy,
  output logic       done,
  output impair_t    imp,
  output comp_coef_t coef
);

  localparam int W = XW;
  localparam logic signed [W-1:0] HALF_PI = W'(64'd1647099 <<< (XF - 20));
  localparam logic signed [W-1:0] CLAMP   = W'((64'd1 <<< XF) - (64'd1 <<< (XF - 16)));

  typedef enum logic [2:0] {E_IDLE, E_SQRT, E_DIV, E_ASIN, E_MUL, E_QUOT} est_state_e;
  est_state_e state;

  // chi elements at XF fractional bits
  xval_t c1, c2, c3, c4, c5;
  chi_vec_t chi_q;
  always_comb begin
    c1 = W'($signed(chi_q[0])) <<< (XF - CF);
    c2 = W'($signed(chi_q[1])) <<< (XF - CF);
    c3 = W'($signed(chi_q[2])) <<< (XF - CF);
    c4 = W'($signed(chi_q[3])) <<< (XF - CF);
    c5 = W'($signed(chi_q[4])) <<< (XF - CF);
  end

  // CORDIC operators
  logic       ca_start, cb_start, ca_busy, cb_busy, ca_done, cb_done;
  cordic_op_e c_op;
  xval_t      ca_a, ca_b, cb_a, cb_b, ca_res, ca_aux, cb_res, cb_aux;

  cordic u_cordic_a (.clk, .rst_n, .start(ca_start), .op(c_op), .a(ca_a), .b(ca_b),
                     .busy(ca_busy), .done(ca_done), .res(ca_res), .aux(ca_aux));
  cordic u_cordic_b (.clk, .rst_n, .start(cb_start), .op(c_op), .a(cb_a), .b(cb_b),
                     .busy(cb_busy), .done(cb_done), .res(cb_res), .aux(cb_aux));

  // dividers
  logic da_start, da_busy, da_done, db_busy, db_done;
  logic signed [KF+1:0] da_q, db_q;
  xval_t da_num, da_den, db_num, db_den;

  divider #(.NW(W), .QF(KF)) u_div_g (.clk, .rst_n, .start(da_start), .num(da_num),
                                      .den(da_den), .busy(da_busy), .done(da_done), .q(da_q));
  divider #(.NW(W), .QF(KF)) u_div_t (.clk, .rst_n, .start(da_start), .num(db_num),
                                      .den(db_den), .busy(db_busy), .done(db_done), .q(db_q));

  // intermediate results
  xval_t alpha, sigma, sin_t, theta, cos_t, phi_m;
  xval_t lo_q_a;   // (chi5 + chi2*sin(theta)) * alpha
  logic  phi_neg;

  function automatic xval_t clampv(input xval_t v);
    if (v > CLAMP)       return CLAMP;
    else if (v < -CLAMP) return -CLAMP;
    else                 return v;
  endfunction

  function automatic xval_t fmul(input xval_t a, input xval_t b);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    return W'(p >>> XF);
  endfunction

  function automatic coef_t to_coef(input xval_t v);
    return KW'(v >>> (XF - KF));
  endfunction

  // operation requests for the CORDIC pair, per state
  always_comb begin
    ca_start = 1'b0; cb_start = 1'b0; c_op = CORDIC_SQRT;
    ca_a = c1; ca_b = '0; cb_a = c4; cb_b = '0;
    da_start = 1'b0;
    da_num = (W)'(64'd1 <<< XF); da_den = fmul(alpha, cos_t);
    db_num = sin_t;              db_den = cos_t;
    unique case (state)
      E_IDLE: begin
        c_op = CORDIC_SQRT;
        ca_a = W'($signed(chi[0])) <<< (XF - CF);
        cb_a = W'($signed(chi[3])) <<< (XF - CF);
        ca_start = start;
        cb_start = start;
      end
      E_SQRT: begin
        c_op = CORDIC_DIV;
        ca_a = c3; ca_b = ca_res;
        cb_a = c2; cb_b = cb_res;
        ca_start = ca_done;
        cb_start = ca_done;
      end
      E_DIV: begin
        c_op = CORDIC_ASIN;
        ca_a = clampv(ca_res);
        cb_a = clampv(cb_res);
        ca_start = ca_done;
        cb_start = ca_done;
      end
      E_MUL: da_start = 1'b1;
      default: ;
    endcase
  end

  assign busy = (state != E_IDLE);

  // The paired operators are started together and have fixed latencies, so
  // they must finish together and never be started while busy.
  a_cordic_pair: assert property (@(posedge clk) disable iff (!rst_n) ca_done == cb_done);
  a_div_pair:    assert property (@(posedge clk) disable iff (!rst_n) da_done == db_done);
  a_cordic_free: assert property (@(posedge clk) disable iff (!rst_n)
                                  ca_start |-> !ca_busy && !cb_busy);
  a_div_free:    assert property (@(posedge clk) disable iff (!rst_n)
                                  da_start |-> !da_busy && !db_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      chi_q <= '0;
      alpha <= '0; sigma <= '0; sin_t <= '0;
      theta <= '0; cos_t <= '0; phi_m <= '0;
      lo_q_a <= '0; phi_neg <= 1'b0;
      imp  <= '0;
      coef <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          chi_q <= chi;
          state <= E_SQRT;
        end
        E_SQRT: if (ca_done) begin
          alpha <= ca_res;
          sigma <= cb_res;
          state <= E_DIV;
        end
        E_DIV: if (ca_done) begin
          sin_t <= clampv(ca_res);
          state <= E_ASIN;
        end
        E_ASIN: if (ca_done) begin
          theta  <= ca_res;
          cos_t  <= ca_aux;
          phi_m  <= HALF_PI - cb_res;
          state  <= E_MUL;
        end
        E_MUL: begin
          lo_q_a  <= fmul(c5 + fmul(c2, sin_t), alpha);
          phi_neg <= (c5 + fmul(c2, sin_t)) < 0;
          state   <= E_QUOT;
        end
        default: if (da_done) begin  // E_QUOT
          imp.alpha <= alpha;
          imp.theta <= theta;
          imp.sigma <= sigma;
          imp.phi   <= phi_neg ? -phi_m : phi_m;
          coef.lo_i <= to_coef(c2);
          coef.lo_q <= to_coef(W'(((2*W)'(lo_q_a) * (2*W)'(da_q)) >>> KF));
          coef.g    <= da_q;
          coef.t    <= db_q;
          done      <= 1'b1;
          state     <= E_IDLE;
        end
      endcase
    end
  end

endmodule
