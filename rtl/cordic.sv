// cordic: iterative CORDIC operator used by the parameter estimator.
//
// One operator runs three kinds of operation, chosen per request by `op`:
//   CORDIC_SQRT  res = sqrt(a), a >= 0 (a <= 0 gives 0).  The operand is first normalised by
//                an even power of two into [0.5, 2), then hyperbolic
//                vectoring of (m + 1/4, m - 1/4) yields K_h*sqrt(m); the gain
//                K_h is removed by a constant multiply and the normalisation
//                undone by a shift.
//   CORDIC_DIV   res = a / b, b > 0, |a/b| < 2.  Linear vectoring: y is driven
//                to zero by adding/subtracting b*2^-i and z collects +-2^-i.
//   CORDIC_ASIN  res = asin(a), |a| < 1, aux = cos(res).  Double-rotation
//                arcsine: a unit vector is rotated twice per step towards the
//                target sine, whose value is scaled by the exact step gain
//                (1 + 2^-2i) so the comparison stays consistent; the rotation
//                direction is reversed while x < 0, and a result with x < 0
//                is folded back to the principal value.  The final x divided
//                by the total gain is the cosine.  Near |a| = 1 the angle is
//                ill-conditioned: an input step of 2^-FR moves it by up to
//                about sqrt(2^(1-FR)).
// The published design uses two CORDIC operators for the square roots, reuses
// them for the two divisions and for arcsine/arccosine, and quotes 25 clock
// cycles per operation; that cycle count is kept here (ITER = 23 iterations,
// one load cycle, one gain-multiply cycle and one output cycle).  The internal
// algorithms and the number format are this implementation's own.
//
// Interface: `start` is accepted when `busy` is low; `done` pulses for one
// cycle with `res`/`aux` valid and held until the next start.  `done` rises
// on the ITER+2'th clock edge after the edge that accepted `start` (25 cycles).
// Format: a, b, res, aux are signed W-bit values with FR fractional bits.
module cordic
  import iqloft_pkg::*;
#(
  parameter int W    = XW,
  parameter int FR   = XF,
  parameter int ITER = 23
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  cordic_op_e          op,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] res,
  output logic signed [W-1:0] aux
);

  localparam int CW2 = 2 * W;
  localparam logic signed [W-1:0] ONE     = W'(1) <<< FR;
  localparam logic signed [W-1:0] QUARTER = W'(1) <<< (FR - 2);
  localparam logic signed [W-1:0] HALF    = W'(1) <<< (FR - 1);
  localparam logic signed [W-1:0] TWO     = W'(2) <<< FR;
  // round(2^20 / K_h) with K_h = prod sqrt(1 - 2^-2i) over the hyperbolic
  // sequence 1,2,3,4,4,5..13,13,14..21; round(2^20 / G) with
  // G = prod (1 + 2^-2i), i = 1..23.  Both re-scaled to FR bits.
  localparam longint INV_KH_20 = 64'd1266152;
  localparam longint INV_G_20  = 64'd773338;
  localparam logic signed [W-1:0] INV_KH = W'((INV_KH_20 <<< FR) >>> 20);
  localparam logic signed [W-1:0] INV_G  = W'((INV_G_20  <<< FR) >>> 20);
  // round(pi * 2^20), re-scaled to FR bits
  localparam logic signed [W-1:0] PI     = W'((64'd3294199 <<< FR) >>> 20);

  // atan(2^-i) with 20 fractional bits, re-scaled to FR bits.
  function automatic logic signed [W-1:0] atan_tab(input int i);
    longint v;
    case (i)
      0: v = 823550;  1: v = 486170;  2: v = 256879;  3: v = 130396;
      4: v = 65451;   5: v = 32757;   6: v = 16383;   7: v = 8192;
      8: v = 4096;    9: v = 2048;    10: v = 1024;   11: v = 512;
      12: v = 256;    13: v = 128;    14: v = 64;     15: v = 32;
      16: v = 16;     17: v = 8;      18: v = 4;      19: v = 2;
      20: v = 1;      default: v = 0;
    endcase
    return W'((v <<< FR) >>> 20);
  endfunction

  // Shift index of hyperbolic iteration n: 1,2,3,4,4,5,...,13,13,14,...
  function automatic int hyp_idx(input int n);
    if (n < 4)       return n + 1;
    else if (n < 14) return n;
    else             return n - 1;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_GAIN, S_OUT} state_e;

  state_e             state;
  cordic_op_e         op_q;
  logic [4:0]         n;       // iteration counter
  logic signed [W-1:0] x, y, z, t;
  logic signed [5:0]  k;       // sqrt normalisation: operand was scaled by 4^k
  logic               zero;    // sqrt of a non-positive operand gives 0
  logic signed [CW2-1:0] prod;

  // ---- sqrt operand normalisation (combinational) ----
  logic signed [W-1:0] norm_m;
  logic signed [5:0]   norm_k;
  always_comb begin
    norm_m = a;
    norm_k = '0;
    for (int j = 0; j < W / 2; j++) begin
      if (norm_m != 0 && norm_m < HALF) begin
        norm_m = norm_m <<< 2;
        norm_k = norm_k + 6'sd1;
      end
    end
    for (int j = 0; j < W / 2; j++) begin
      if (norm_m >= TWO) begin
        norm_m = norm_m >>> 2;
        norm_k = norm_k - 6'sd1;
      end
    end
  end

  // ---- one iteration (combinational) ----
  logic signed [W-1:0] x_n, y_n, z_n, t_n;
  always_comb begin
    int i;
    logic signed [W-1:0] x1, y1;
    x_n = x; y_n = y; z_n = z; t_n = t;
    x1 = x; y1 = y;
    i = 0;
    unique case (op_q)
      CORDIC_SQRT: begin
        i = hyp_idx(int'(n));
        if (y >= 0) begin
          x_n = x - (y >>> i);
          y_n = y - (x >>> i);
        end else begin
          x_n = x + (y >>> i);
          y_n = y + (x >>> i);
        end
      end
      CORDIC_DIV: begin
        i = int'(n);
        if (y >= 0) begin
          y_n = y - (x >>> i);
          z_n = (i <= FR) ? z + (ONE >>> i) : z;
        end else begin
          y_n = y + (x >>> i);
          z_n = (i <= FR) ? z - (ONE >>> i) : z;
        end
      end
      default: begin  // CORDIC_ASIN
        i = int'(n) + 1;
        if ((y <= t) != (x < 0)) begin
          x1  = x  - (y  >>> i);
          y1  = y  + (x  >>> i);
          x_n = x1 - (y1 >>> i);
          y_n = y1 + (x1 >>> i);
          z_n = z + (atan_tab(i) <<< 1);
        end else begin
          x1  = x  + (y  >>> i);
          y1  = y  - (x  >>> i);
          x_n = x1 + (y1 >>> i);
          y_n = y1 - (x1 >>> i);
          z_n = z - (atan_tab(i) <<< 1);
        end
        t_n = t + (t >>> (2 * i));
      end
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= CORDIC_SQRT;
      n     <= '0;
      x     <= '0;
      y     <= '0;
      z     <= '0;
      t     <= '0;
      k     <= '0;
      zero  <= 1'b0;
      prod  <= '0;
      done  <= 1'b0;
      res   <= '0;
      aux   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          n     <= '0;
          z     <= '0;
          t     <= a;
          k     <= '0;
          zero  <= (a <= 0);
          state <= S_RUN;
          unique case (op)
            CORDIC_SQRT: begin
              x <= norm_m + QUARTER;
              y <= norm_m - QUARTER;
              k <= norm_k;
            end
            CORDIC_DIV: begin
              x <= b;
              y <= a;
            end
            default: begin
              x <= ONE;
              y <= '0;
            end
          endcase
        end
        S_RUN: begin
          x <= x_n; y <= y_n; z <= z_n; t <= t_n;
          n <= n + 5'd1;
          if (int'(n) == ITER - 1) state <= S_GAIN;
        end
        S_GAIN: begin
          // remove the CORDIC gain from the vector length
          prod  <= CW2'(x) * CW2'((op_q == CORDIC_SQRT) ? INV_KH : INV_G);
          state <= S_OUT;
        end
        default: begin  // S_OUT
          unique case (op_q)
            CORDIC_SQRT: begin
              if (zero)        res <= '0;
              else if (k >= 0) res <= W'((prod >>> FR) >>> k);
              else        res <= W'((prod >>> FR) <<< (-k));
              aux <= '0;
            end
            CORDIC_DIV: begin
              res <= z;
              aux <= '0;
            end
            default: begin
              // a final x < 0 means the rotation settled on pi - asin(a):
              // fold it back to the principal value, whose cosine is >= 0
              if (prod < 0) begin
                res <= (z >= 0) ? PI - z : -PI - z;
                aux <= -W'(prod >>> FR);
              end else begin
                res <= z;
                aux <= W'(prod >>> FR);
              end
            end
          endcase
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
