// shift_round - final quotient shifting, rounding and exception flags of a
// finite, non-zero quotient.
//
// Input is the chosen 17-digit quotient T: 16 result digits and a guard
// digit. With it come whether T is the exact quotient, the biased exponent eb
// of the 16-digit coefficient T/10, and the tail-zero value of the exact
// result at the preferred exponent. The right shift k (digits dropped beyond
// the guard position) is chosen as follows:
//   exact    - drop trailing zeros towards the preferred exponent: all of
//              them when the tail-zero value is 0, otherwise all but that
//              many. The shift is capped so the exponent does not pass the
//              maximum.
//   underflow (eb < 0) - at least -eb digits, which lifts the exponent to
//              the minimum. A shift of 16 leaves only the guard digit, and
//              more than 16 leaves nothing.
// The digit at the guard position and a sticky bit (lower digits, or an
// inexact quotient) decide the increment according to the rounding mode, and
// a 16-digit BCD adder applies it. A carry out of the top digit re-normalizes
// to 1000...0 and raises the exponent by one. Overflow replaces the result by
// infinity or by the largest finite number, depending on mode and sign.
// Underflow is signalled for a tiny and inexact result. Inexact is signalled
// for any discarded non-zero digit or inexact quotient, and on overflow.
// One deviation from the document: when nothing at all is left
// (k > 16), the result is still rounded by the sticky bit according to the
// mode, not forced to zero. Combinational.
module shift_round
  import dfp_pkg::*;
(
  input  logic [4*17-1:0]    t,          // chosen quotient, 8421, 17 digits
  input  logic               exact,
  input  logic signed [12:0] eb,         // biased exponent of t/10
  input  logic [3:0]         tz_final,
  input  round_mode_e        rm,
  input  logic               sign,
  output logic [4*P-1:0]     coef,
  output logic [EW-1:0]      exp_b,
  output logic               is_inf,
  output logic               overflow,
  output logic               underflow,
  output logic               inexact,
  output logic               exact_shift,   // a right shift for trailing zeros happened
  output logic               unf_shift      // a right shift for underflow happened
);
  logic [4:0]  tzt;
  logic signed [13:0] s, u, k, e1, e2;
  logic [4*P-1:0] c_trunc, c_round;
  logic [3:0] guard;
  logic sticky, inc, cout, tiny, inexact_q;

  always_comb begin
    tzt = 5'd17;
    for (int i = 16; i >= 0; i--) if (t[4*i +: 4] != 4'd0) tzt = 5'(i);
    // preferred-exponent shift of an exact quotient
    if (!exact || tzt == 5'd0)   s = '0;
    else if (tz_final == 4'd0)   s = 14'(tzt) - 14'sd1;
    else if (14'(tzt) - 14'sd1 > 14'(tz_final)) s = 14'(tzt) - 14'sd1 - 14'(tz_final);
    else                         s = '0;
    if (14'(eb) + s > 14'(EMAX_B)) s = (14'(eb) > 14'(EMAX_B)) ? 14'sd0 : 14'(EMAX_B) - 14'(eb);
    tiny = eb < 0;
    u = tiny ? -14'(eb) : 14'sd0;
    k = (s > u) ? s : u;
    exact_shift = s > 0;
    unf_shift   = tiny;
    // drop k+1 digits: coefficient, guard digit and sticky
    c_trunc = '0;
    guard   = '0;
    sticky  = !exact;
    for (int i = 0; i < 17; i++) begin
      if (14'(i) < k)                     sticky = sticky | (t[4*i +: 4] != 4'd0);
      else if (14'(i) == k)               guard  = t[4*i +: 4];
      else if (14'(i) - k - 14'sd1 < 14'sd16) c_trunc[4*(i - 1 - int'(k)) +: 4] = t[4*i +: 4];
    end
    inexact_q = (guard != 4'd0) | sticky;
    unique case (rm)
      RM_TIES_EVEN:   inc = (guard > 4'd5) | ((guard == 4'd5) & (sticky | c_trunc[0]));
      RM_TIES_AWAY:   inc = (guard >= 4'd5);
      RM_TIES_ZERO:   inc = (guard > 4'd5) | ((guard == 4'd5) & sticky);
      RM_TOWARD_POS:  inc = !sign & inexact_q;
      RM_TOWARD_NEG:  inc =  sign & inexact_q;
      RM_AWAY_ZERO:   inc = inexact_q;
      default:        inc = 1'b0;
    endcase
    e1 = 14'(eb) + k;
  end

  bcd_adder #(.N(P)) u_inc (.a(c_trunc), .b('0), .cin(inc), .sum(c_round), .cout(cout));

  always_comb begin
    logic to_inf;
    e2 = cout ? e1 + 14'sd1 : e1;
    overflow  = e2 > 14'(EMAX_B);
    underflow = tiny & inexact_q;
    inexact   = inexact_q;
    to_inf = (rm == RM_TIES_EVEN) | (rm == RM_TIES_AWAY) | (rm == RM_TIES_ZERO) |
             (rm == RM_AWAY_ZERO) | ((rm == RM_TOWARD_POS) & !sign) |
             ((rm == RM_TOWARD_NEG) & sign);
    is_inf = overflow & to_inf;
    if (overflow) begin
      coef    = to_inf ? '0 : {P{4'd9}};
      exp_b   = to_inf ? '0 : EW'(EMAX_B);
      inexact = 1'b1;
    end else begin
      coef  = cout ? {4'd1, {(P-1){4'd0}}} : c_round;
      exp_b = e2[EW-1:0];
    end
  end
endmodule
