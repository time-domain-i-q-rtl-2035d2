// lms_update: the LMS "updating block" of the I/Q-LOFT calibrator.
//
// The envelope detector output is modelled as
//   s(n) = I^2 + chi . eta,   eta = [Q^2, 2I, -2IQ, 1, 2Q]
//   chi  = [alpha^2, sigma*cos(phi), alpha*sin(theta), sigma^2, sigma*sin(phi-theta)]
// and each training step forms the error e = s - I^2 - chi.eta and moves
// chi <- chi + mu*e*eta with mu = 2^-MU_SHIFT (1/128).  All quantities are
// real, so e* = e.  The model, the step size, the 15-bit chi and the 8 clock
// cycles per step follow the published design.  Two shared multipliers
// evaluate the 11 products of one step over phases 1..6; phase 7 is idle:
//   ph1 I*I, Q*Q        ph2 I*Q, chi1*Q^2     ph3 chi2*I, chi3*IQ
//   ph4 chi5*Q  (e ready) ph5 e*Q^2, e*I     ph6 e*IQ, e*Q (chi updated)
// Own choices: the chi accumulators carry GUARD extra fractional bits below
// the 15 published bits (without them mu*e*eta rounds to zero long before
// the small LOFT terms settle) and saturate; `clear` loads chi = [1,0,0,0,0]
// (an ideal transmitter).
//
// Interface: a step is started by `step_valid` while `ready` is high; the
// sample pair (s, bb) is taken in that cycle.  `ready` is low for the 7
// following cycles, so one step takes exactly 8 cycles and a new one can start
// every 8 cycles.  `step_done` pulses in the last cycle of the step, when `chi`
// (the top CW bits of each accumulator) and `err` are updated.
module lms_update
  import iqloft_pkg::*;
#(
  parameter int MU_SHIFT = 7,
  parameter int GUARD    = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                step_valid,
  input  logic [EW-1:0]       s,
  input  iq_t                 bb,
  output logic                ready,
  output logic                step_done,
  output chi_vec_t            chi,
  output logic signed [31:0]  err
);

  localparam int AF  = 2 * DF;            // fraction of products and of e
  localparam int EB  = 32;                // width of e
  localparam int AW  = CW + GUARD;        // chi accumulator width
  localparam int CAF = CF + GUARD;        // chi accumulator fraction
  localparam int PW  = 64;

  typedef logic signed [AW-1:0] acc_t;
  localparam logic signed [PW-1:0] ACC_MAX = (PW'(1) <<< (AW - 1)) - 1;

  acc_t                 acc [NCHI];
  logic [2:0]           ph;
  logic                 run;
  logic [EW-1:0]        s_q;
  logic signed [DW-1:0] i_q, q_q;
  logic signed [2*DW-1:0] q2, iq;
  logic signed [EB-1:0] e;

  // the two shared multipliers
  logic signed [PW-1:0] ma, mb, mc, md, p1, p2;
  assign p1 = ma * mb;
  assign p2 = mc * md;

  function automatic logic signed [PW-1:0] cx(input int k);
    return PW'($signed(chi[k]));
  endfunction

  always_comb begin
    ma = '0; mb = '0; mc = '0; md = '0;
    unique case (ph)
      3'd1: begin ma = PW'(i_q); mb = PW'(i_q); mc = PW'(q_q); md = PW'(q_q); end
      3'd2: begin ma = PW'(i_q); mb = PW'(q_q); mc = cx(0);    md = PW'(q2);  end
      3'd3: begin ma = cx(1);    mb = PW'(i_q); mc = cx(2);    md = PW'(iq);  end
      3'd4: begin ma = cx(4);    mb = PW'(q_q); end
      3'd5: begin ma = PW'(e);   mb = PW'(q2);  mc = PW'(e);   md = PW'(i_q); end
      3'd6: begin ma = PW'(e);   mb = PW'(iq);  mc = PW'(e);   md = PW'(q_q); end
      default: ;
    endcase
  end

  // saturating accumulate of an update expressed at CAF fractional bits
  function automatic acc_t sat_add(input acc_t a, input logic signed [PW-1:0] d);
    logic signed [PW-1:0] sum;
    sum = PW'(a) + d;
    if (sum > ACC_MAX)       return AW'(ACC_MAX);
    else if (sum < -ACC_MAX) return AW'(-ACC_MAX);
    else                     return AW'(sum);
  endfunction

  // a product with `from` fractional bits re-expressed at AF bits
  function automatic logic signed [EB-1:0] to_af(input logic signed [PW-1:0] p, input int from);
    return EB'(p >>> (from - AF));
  endfunction

  assign ready = !run;

  always_comb begin
    for (int k = 0; k < NCHI; k++) chi[k] = chi_t'(acc[k] >>> GUARD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCHI; k++) acc[k] <= '0;
      acc[0]    <= acc_t'(1) <<< CAF;
      ph        <= '0;
      run       <= 1'b0;
      s_q       <= '0;
      i_q       <= '0;
      q_q       <= '0;
      q2        <= '0;
      iq        <= '0;
      e         <= '0;
      err       <= '0;
      step_done <= 1'b0;
    end else begin
      step_done <= 1'b0;
      if (clear) begin
        for (int k = 0; k < NCHI; k++) acc[k] <= '0;
        acc[0] <= acc_t'(1) <<< CAF;
        run    <= 1'b0;
        ph     <= '0;
      end else if (!run) begin
        if (step_valid) begin
          s_q <= s;
          i_q <= bb.i;
          q_q <= bb.q;
          run <= 1'b1;
          ph  <= 3'd1;
        end
      end else begin
        ph <= ph + 3'd1;
        unique case (ph)
          3'd1: begin
            e  <= (EB'({1'b0, s_q}) <<< (AF - EF)) - EB'(p1);
            q2 <= (2*DW)'(p2);
          end
          3'd2: begin
            iq <= (2*DW)'(p1);
            e  <= e - to_af(p2, CF + AF);
          end
          3'd3: e <= e - (to_af(p1, CF + DF) <<< 1) + (to_af(p2, CF + AF) <<< 1);
          3'd4: e <= e - (to_af(p1, CF + DF) <<< 1) - (EB'($signed(chi[3])) <<< (AF - CF));
          3'd5: begin
            // chi1 += mu*e*Q^2 ; chi2 += mu*e*2I
            acc[0] <= sat_add(acc[0], p1 >>> (AF + AF - CAF + MU_SHIFT));
            acc[1] <= sat_add(acc[1], p2 >>> (AF + DF - CAF + MU_SHIFT - 1));
          end
          3'd6: begin
            // chi3 += mu*e*(-2IQ) ; chi5 += mu*e*2Q ; chi4 += mu*e
            acc[2] <= sat_add(acc[2], -(p1 >>> (AF + AF - CAF + MU_SHIFT - 1)));
            acc[4] <= sat_add(acc[4], p2 >>> (AF + DF - CAF + MU_SHIFT - 1));
            acc[3] <= sat_add(acc[3], PW'(e) >>> (AF - CAF + MU_SHIFT));
            err    <= e;
          end
          3'd7: begin
            step_done <= 1'b1;
            run       <= 1'b0;
            ph        <= '0;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
