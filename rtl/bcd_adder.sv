// bcd_adder - N-digit 8421 BCD adder with carry extraction and post-correction.
//
// Each pair of digits is first added as a plain 4-bit hexadecimal sum, all
// digits in parallel and with no carries between them. In parallel, the
// digit-level propagate (sum == 9) and generate (sum > 9) signals feed
// bcd_carry_extractor, which yields the carry into every digit. Each
// intermediate digit then receives a correction of 0, 1, 6 or 7: +6 when the
// digit overflows past nine (G, or P with an incoming carry) and +1 for the
// incoming carry. The correction is added by a second hexadecimal digit adder.
// This is the structure of the document's BCD adder. One deviation: the
// document's printed correction table (0/1/6/7) asks for +7 whenever G or P is
// set, and that is wrong for a 9-sum digit with no carry in. Here +6 is applied
// only when the digit really wraps. Purely combinational. Inputs must be
// valid BCD digits.
module bcd_adder #(
  parameter int unsigned N = 22          // digits (a 22-digit adder in the document)
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic           cin,
  output logic [4*N-1:0] sum,
  output logic           cout
);
  logic [N-1:0] dp, dg;
  logic [N:0]   c;
  logic [4*N-1:0] is;                    // intermediate hexadecimal digit sums

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [3:0] pb, gb;
      logic [4:0] full;
      pb = a[4*i +: 4] ^ b[4*i +: 4];     // bit propagate
      gb = a[4*i +: 4] & b[4*i +: 4];     // bit generate
      // one-digit hexadecimal adder, no carry in
      is[4*i+0] = pb[0];
      is[4*i+1] = pb[1] ^ gb[0];
      is[4*i+2] = pb[2] ^ (gb[1] | (gb[0] & pb[1]));
      is[4*i+3] = pb[3] ^ (gb[2] | (gb[1] & pb[2]) | (gb[0] & pb[1] & pb[2]));
      full  = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]};
      dp[i] = (full == 5'd9);
      dg[i] = (full > 5'd9);
    end
  end

  bcd_carry_extractor #(.N(N)) u_cx (.p(dp), .g(dg), .cin(cin), .c(c));

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [3:0] corr;
      corr = {1'b0, (dg[i] | (dp[i] & c[i])), (dg[i] | (dp[i] & c[i])), c[i]};
      sum[4*i +: 4] = is[4*i +: 4] + corr;  // second hexadecimal digit adder (mod 16)
    end
    cout = c[N];
  end
endmodule
