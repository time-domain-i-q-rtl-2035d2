// divider: sequential signed fractional divider, two quotient bits per cycle.
//
// Computes q = num / den for den > 0 and |num/den| < 2, with QF fractional
// quotient bits, by restoring long division: the partial remainder is kept
// doubled (r = 2*rem) and compared against 2*den, so the first step yields the
// integer bit and every later step one fractional bit.  Two such steps are
// chained per clock (radix 4), so a QF+1 = 16-bit magnitude takes 8 cycles;
// one more cycle applies the sign.  The published design lists two division
// operators of 9 clock cycles each for the compensator; the 9-cycle latency
// follows it, the algorithm is this implementation's choice.
//
// Interface: `start` is accepted when `busy` is low.  `done` pulses for one
// cycle, exactly 9 cycles after the start cycle (with QF = 15), and `q`
// (signed, QF fractional bits) holds until the next start.  num and den share
// any common fixed-point format; the caller keeps |num/den| below 2.
module divider #(
  parameter int NW = 26,   // operand width
  parameter int QF = 15    // quotient fractional bits; QF+1 must be even
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic signed [NW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [QF+1:0] q
);

  localparam int QB    = QF + 1;       // magnitude bits of the quotient
  localparam int STEPS = QB / 2;       // radix-4 cycles
  localparam int RW    = NW + 3;

  logic [RW-1:0]   r, d2;
  logic [QB-1:0]   qm;
  logic            neg;
  logic [$clog2(STEPS+1)-1:0] cnt;
  logic            running, fin;

  // two restoring steps
  logic [RW-1:0] r1, r2, s1, s2;
  logic          b1, b2;
  always_comb begin
    s1 = r << 1;
    b1 = (s1 >= d2);
    r1 = b1 ? s1 - d2 : s1;
    s2 = r1 << 1;
    b2 = (s2 >= d2);
    r2 = b2 ? s2 - d2 : s2;
  end

  assign busy = running | fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; d2 <= '0; qm <= '0; neg <= 1'b0; cnt <= '0;
      running <= 1'b0; fin <= 1'b0; done <= 1'b0; q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        r       <= (num < 0) ? -RW'(num) : RW'(num);
        d2      <= RW'(den) << 1;
        neg     <= (num < 0);
        qm      <= '0;
        cnt     <= '0;
        running <= 1'b1;
      end else if (running) begin
        r   <= r2;
        qm  <= {qm[QB-3:0], b1, b2};
        cnt <= cnt + 1'b1;
        if (int'(cnt) == STEPS - 1) begin
          running <= 1'b0;
          fin     <= 1'b1;
        end
      end else if (fin) begin
        q    <= neg ? -$signed({1'b0, qm}) : $signed({1'b0, qm});
        fin  <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
