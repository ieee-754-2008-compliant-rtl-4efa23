// zero_vector_counter - number of trailing zero digits of S + 2H, found
// without resolving the sum with a carry-propagate adder.
//
// For each digit the sum of the two 4221 digits (0..18) gives three flags:
// nine (P), ten (Ten) and zero (Zero). A result digit is zero in two cases.
// Either no carry reaches it and its digit sum is 0. Or a carry reaches it
// and its digit sum is 9, or it is the first non-zero sum and equals 10. In
// the trailing run of zeros, such carries start at a 10 sitting above zeros
// and run up through 9s. The final zero vector therefore marks digit i when
// (D_{i-1}, D_i) is (0,0), (0,10), (9,9) or (10,9), taking D_{-1} = 0. The
// number of consecutive marks counted from the least significant digit is
// the number of trailing zeros of the sum. all_zero is set when every digit
// is marked. Combinational.
module zero_vector_counter
  import dfp_pkg::*;
#(
  parameter int unsigned W = 54          // digits
) (
  input  logic [4*W-1:0]         s,      // 4221
  input  logic [4*W-1:0]         h2,     // 4221
  output logic [$clog2(W+1)-1:0] count,
  output logic                   all_zero
);
  logic [W-1:0] pv, tv, zv, fz;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic [4:0] d;
      d = {1'b0, val4221(s[4*i +: 4])} + {1'b0, val4221(h2[4*i +: 4])};
      pv[i] = (d == 5'd9);
      tv[i] = (d == 5'd10);
      zv[i] = (d == 5'd0);
    end
    for (int i = 0; i < W; i++) begin
      logic zl, pl, tl;
      zl = (i == 0) ? 1'b1 : zv[i-1];
      pl = (i == 0) ? 1'b0 : pv[i-1];
      tl = (i == 0) ? 1'b0 : tv[i-1];
      fz[i] = (zv[i] & zl) | (tv[i] & zl) | (pv[i] & pl) | (pv[i] & tl);
    end
    count = ($clog2(W+1))'(W);
    for (int i = W - 1; i >= 0; i--)
      if (!fz[i]) count = ($clog2(W+1))'(i);     // lowest unmarked digit
    all_zero = &fz;
  end
endmodule
