// dfp_pack - encodes sign, biased exponent and 16 BCD digits as a decimal64
// number in DPD encoding, or produces infinity or a quiet NaN.
//
// The leading digit and the two exponent MSBs form the top five bits of the
// combination field, {e9 e8 d d d} for a leading digit up to 7 and
// {1 1 e9 e8 d} for 8 and 9. The low eight exponent bits follow. The other 15
// digits go out as five DPD declets. Infinity is 11110 with a zero trailing
// field. A NaN is 111110 with the given 50-bit payload. Combinational.
module dfp_pack
  import dfp_pkg::*;
(
  input  logic           sign,
  input  logic [EW-1:0]  exp_b,
  input  logic [4*P-1:0] coef,
  input  logic           inf,
  input  logic           nan,
  input  logic [49:0]    nan_payload,
  output logic [63:0]    f
);
  always_comb begin
    logic [3:0] msd;
    msd = coef[4*P-1 -: 4];
    f[63] = sign;
    if (msd[3]) f[62:58] = {2'b11, exp_b[9:8], msd[0]};
    else        f[62:58] = {exp_b[9:8], msd[2:0]};
    f[57:50] = exp_b[7:0];
    for (int j = 0; j < 5; j++) f[10*j +: 10] = bcd2dpd(coef[12*j +: 12]);
    if (nan) begin
      f[62:50] = {6'b111110, 7'b0};
      f[49:0]  = nan_payload;
    end else if (inf) begin
      f[62:0]  = {5'b11110, 58'b0};
    end
  end
endmodule
