// operand_normalizer - the "OR module and operands normalization" stage:
// removes the leading zeros of one 16-digit BCD coefficient.
//
// Each digit's four bits are ORed into one bit of a flag word W (1 = digit is
// non-zero). W drives a 16-way multiplexer that shifts the coefficient left
// by its number of leading zero digits. The same decode gives that number (LZV)
// and a zero flag (ZF) for an all-zero coefficient. W also goes to the tail
// zeroes detector. A zero coefficient yields a normalized value of 0 and
// LZV = 16. One instance serves each operand. Purely combinational.
module operand_normalizer #(
  parameter int unsigned P = 16          // digits
) (
  input  logic [4*P-1:0]         x,      // 8421 BCD coefficient
  output logic [P-1:0]           w,      // digit non-zero flags
  output logic [4*P-1:0]         x_norm, // shifted so the MSD is non-zero
  output logic [$clog2(P+1)-1:0] lzv,    // leading zero digits
  output logic                   zf      // coefficient is zero
);
  always_comb begin
    for (int i = 0; i < P; i++) w[i] = |x[4*i +: 4];
    lzv = ($clog2(P+1))'(P);
    for (int i = 0; i < P; i++)
      if (w[i]) lzv = ($clog2(P+1))'(P - 1 - i);   // highest non-zero digit wins
    zf     = ~|w;
    x_norm = zf ? '0 : x << (4 * lzv);
  end
endmodule
