// exponent_calc - intermediate exponent of the quotient.
//
// For a non-zero dividend the two leading-zero counts are folded in as in the
// document. (Ex + LZy) and (Ey + LZx) are formed by two adders, subtracted,
// and the bias is added. This design also subtracts P-1 = 15. That places the
// exponent on the 16-digit integer coefficient of the quotient of two
// normalized coefficients, when the normalized dividend is not smaller than
// the normalized divisor. The final stage subtracts one more when it is
// smaller. For a zero dividend the exponent is simply Ex - Ey + bias,
// clamped into the representable range, since a zero result has no digits to
// shift.
// Outputs are biased and signed, so values outside 0..767 stay visible. The
// overflow and underflow flags and the underflow value (how far below the
// minimum) are early indications for the rounding stage. Combinational.
module exponent_calc
  import dfp_pkg::*;
(
  input  logic [EW-1:0]      ex,        // biased exponent of the dividend
  input  logic [EW-1:0]      ey,        // biased exponent of the divisor
  input  logic [4:0]         lzx,       // leading zeros of the dividend
  input  logic [4:0]         lzy,       // leading zeros of the divisor
  output logic signed [12:0] e_int,     // biased exponent of the normalized quotient
  output logic [EW-1:0]      e_zero,    // exponent of a zero result (dividend zero)
  output logic               ovf,       // e_int above the maximum
  output logic               unf,       // e_int below the minimum
  output logic [12:0]        unf_val    // how far e_int lies below the minimum
);
  logic signed [12:0] sum_x, sum_y, diff, ez;

  always_comb begin
    sum_x = $signed({3'b0, ex}) + $signed({8'b0, lzy});
    sum_y = $signed({3'b0, ey}) + $signed({8'b0, lzx});
    diff  = sum_x - sum_y;
    e_int = diff + 13'(BIAS) - 13'(P - 1);
    ovf   = e_int > $signed(13'(EMAX_B));
    unf   = e_int < 0;
    unf_val = unf ? 13'(-e_int) : '0;
    ez    = $signed({3'b0, ex}) - $signed({3'b0, ey}) + 13'(BIAS);
    if (ez < 0)                          e_zero = '0;
    else if (ez > $signed(13'(EMAX_B)))  e_zero = EW'(EMAX_B);
    else                                 e_zero = ez[EW-1:0];
  end
endmodule
