// dec_multiplier - radix-10 multiplier, M-digit multiplicand by N-digit
// multiplier, producing the product as two 4221 vectors M1 and M2 of M+N
// digits each.
//
// dec_multiples generates 0X..9X once. Each multiplier digit then selects one
// multiple as its partial product (a 16:1 multiplexer per digit; codes above 9
// select zero). The partial product of digit j is shifted j digits left, and
// dec_csa_tree reduces the N partial products to two vectors. The sum M1 + M2
// equals the product exactly, since the product fits in M+N digits and a carry
// out of the top digit can only be the modulo wrap. The default size 38 x 16
// digits is the shared multiplier of the document's divider. Purely
// combinational.
module dec_multiplier
  import dfp_pkg::*;
#(
  parameter int unsigned M = 38,         // multiplicand digits
  parameter int unsigned N = 16          // multiplier digits
) (
  input  logic [4*M-1:0]     x,          // multiplicand, 8421 BCD
  input  logic [4*N-1:0]     y,          // multiplier, 8421 BCD
  output logic [4*(M+N)-1:0] m1,         // product = m1 + m2, both 4221
  output logic [4*(M+N)-1:0] m2
);
  localparam int unsigned W = M + N;
  logic [9:0][4*(M+1)-1:0] mult;
  logic [N-1:0][4*W-1:0]   pp;

  dec_multiples #(.M(M)) u_mult (.x(x), .mult(mult));

  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic [4*W-1:0] sel;
      logic [3:0] yd;
      yd  = y[4*j +: 4];
      sel = '0;
      if (yd <= 4'd9) sel[4*(M+1)-1:0] = mult[yd];
      pp[j] = sel << (4 * j);
    end
  end

  dec_csa_tree #(.W(W), .NV(N)) u_tree (.vin(pp), .s(m1), .h2(m2));
endmodule
