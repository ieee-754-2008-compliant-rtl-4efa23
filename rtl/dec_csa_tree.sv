// dec_csa_tree - reduces NV decimal vectors in 4221 code to two vectors
// (S and 2H) whose sum equals the sum of the inputs modulo 10^W.
//
// One 3:2 step treats three 4221 digits as bits of equal weight and passes
// them through ordinary binary full adders, bit by bit. The sum bits form a
// 4221 digit S, and the carry bits form a 4221 digit H worth twice its face
// value. H is doubled by recoding each digit to 5211 and shifting the whole
// vector one bit left, which yields 2H in 4221. At each level the vectors are
// taken in groups of three, and each group becomes S and 2H. Leftovers pass
// unchanged. Levels repeat until two vectors remain, as in the document's
// partial-product reduction. The vector width stays fixed at W digits:
// anything carried out of the top digit is dropped (arithmetic modulo 10^W).
// Purely combinational.
module dec_csa_tree
  import dfp_pkg::*;
#(
  parameter int unsigned W  = 54,        // digits per vector
  parameter int unsigned NV = 16         // number of input vectors
) (
  input  logic [NV-1:0][4*W-1:0] vin,
  output logic [4*W-1:0]         s,
  output logic [4*W-1:0]         h2
);
  // doubling of a 4221 vector: recode every digit to 5211, shift left one bit
  function automatic logic [4*W-1:0] times2(input logic [4*W-1:0] h);
    logic [4*W-1:0] dbl;
    for (int i = 0; i < W; i++) dbl[4*i +: 4] = enc5211(val4221(h[4*i +: 4]));
    return {dbl[4*W-2:0], 1'b0};
  endfunction

  // number of vectors present before reduction level lvl
  function automatic int unsigned count_at(input int unsigned lvl);
    int unsigned n;
    n = NV;
    for (int unsigned i = 0; i < lvl; i++)
      if (n > 2) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n, l;
    n = NV;
    l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NL = num_levels();

  logic [NL:0][NV-1:0][4*W-1:0] st;

  assign st[0] = vin;

  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int unsigned N0 = count_at(l);
    localparam int unsigned G  = N0 / 3;
    localparam int unsigned R  = N0 % 3;
    for (genvar k = 0; k < G; k++) begin : g_csa
      logic [4*W-1:0] a, b, c;
      assign a = st[l][3*k];
      assign b = st[l][3*k+1];
      assign c = st[l][3*k+2];
      assign st[l+1][2*k]   = a ^ b ^ c;
      assign st[l+1][2*k+1] = times2((a & b) | (a & c) | (b & c));
    end
    for (genvar k = 0; k < R; k++) begin : g_pass
      assign st[l+1][2*G+k] = st[l][3*G+k];
    end
    for (genvar k = 2 * G + R; k < NV; k++) begin : g_zero
      assign st[l+1][k] = '0;
    end
  end

  assign s  = st[NL][0];
  if (NV > 1) begin : g_two
    assign h2 = st[NL][1];
  end else begin : g_one
    assign h2 = '0;
  end
endmodule
