// dfp_unpack - decodes one decimal64 operand in DPD encoding into sign,
// biased exponent, 16 BCD coefficient digits and its class.
//
// Bit 63 is the sign and bits 62..50 the combination field G, followed by
// five 10-bit declets. The top five bits of G hold the two exponent MSBs and
// the leading digit: 0..7 as {e9 e8 d d d}, 8 or 9 as {1 1 e9 e8 d}. 11110
// marks infinity and 11111 a NaN, with the next bit telling a signalling NaN.
// The other eight bits of G are the low exponent bits. Each declet is
// converted to three BCD digits (IEEE 754-2008 DPD). Combinational.
module dfp_unpack
  import dfp_pkg::*;
(
  input  logic [63:0]    f,
  output logic           sign,
  output logic [EW-1:0]  exp_b,
  output logic [4*P-1:0] coef,
  output logic           is_inf,
  output logic           is_nan,
  output logic           is_snan
);
  always_comb begin
    logic [3:0] msd;
    sign    = f[63];
    is_inf  = (f[62:58] == 5'b11110);
    is_nan  = (f[62:58] == 5'b11111);
    is_snan = is_nan & f[57];
    if (f[62:61] == 2'b11) begin
      exp_b = {f[60:59], f[57:50]};
      msd   = {3'b100, f[58]};
    end else begin
      exp_b = {f[62:61], f[57:50]};
      msd   = {1'b0, f[60:58]};
    end
    coef[4*P-1 -: 4] = msd;
    for (int j = 0; j < 5; j++) coef[12*j +: 12] = dpd2bcd(f[10*j +: 10]);
    if (is_inf | is_nan) begin
      exp_b = '0;
      coef[4*P-1 -: 4] = 4'd0;
    end
  end
endmodule
