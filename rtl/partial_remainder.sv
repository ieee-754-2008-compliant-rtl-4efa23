// partial_remainder - one AQA remainder step, R_new = R - Rh * Y'.
//
// R is a 25-digit BCD number: one integer digit and 24 fraction digits. Rh
// is its 6 leading digits, one integer digit and five fraction digits. Y' is
// the 20-digit divisor prime (Y times the stored reciprocal), close to but not
// above 1. Its multiples 0..9 Y' are prepared once per division in 4221 code.
// Each digit of Rh selects one multiple, the 20 x 6 partial-product
// generation. The selected multiple is aligned to its digit and inverted bit
// by bit, which in 4221 gives the nines complement. The reduction tree then
// adds R, the six complemented partial products and a constant 6 that turns
// the six nines complements into tens complements. The two resulting vectors
// are converted to 8421 and added by the BCD adder. Everything is modulo
// 10^25, and R_new is never negative: Rh <= R and Y' <= 1. The shift by three
// digits before the next iteration belongs to the caller. Combinational: the
// remainder module of the document.
module partial_remainder
  import dfp_pkg::*;
#(
  parameter int unsigned RW  = 25,       // remainder digits
  parameter int unsigned YW  = 20,       // divisor prime digits
  parameter int unsigned RHW = 6         // digits of Rh
) (
  input  logic [4*RW-1:0]           r,      // 8421
  input  logic [9:0][4*(YW+1)-1:0]  ypm,    // k * Y', 4221
  output logic [4*RW-1:0]           r_new   // 8421
);
  localparam int unsigned NV = RHW + 2;
  logic [NV-1:0][4*RW-1:0] v;
  logic [4*RW-1:0] s, h2, s8, h8;
  logic unused_cout;

  always_comb begin
    for (int i = 0; i < RW; i++) v[0][4*i +: 4] = enc4221(r[4*i +: 4]);
    for (int j = 0; j < RHW; j++) begin
      logic [3:0] d;
      logic [4*(RW+RHW)-1:0] pp;
      d  = r[4*(RW-RHW+j) +: 4];
      pp = (4*(RW+RHW))'(ypm[(d <= 4'd9) ? d : 4'd0]) << (4 * j);
      // product digit alignment: Rh * Y' has scale 10^-24, as R does
      v[1+j] = ~pp[4*RW-1:0];
    end
    v[NV-1] = '0;
    v[NV-1][3:0] = enc4221(4'(RHW));
  end

  dec_csa_tree #(.W(RW), .NV(NV)) u_tree (.vin(v), .s(s), .h2(h2));

  always_comb
    for (int i = 0; i < RW; i++) begin
      s8[4*i +: 4] = val4221(s[4*i +: 4]);
      h8[4*i +: 4] = val4221(h2[4*i +: 4]);
    end

  bcd_adder #(.N(RW)) u_add (.a(s8), .b(h8), .cin(1'b0), .sum(r_new), .cout(unused_cout));
endmodule
