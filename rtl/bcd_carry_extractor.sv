// bcd_carry_extractor - carry into every digit of a decimal addition, found
// without adding the digits.
//
// Each digit position gives a digit propagate P (its two digits sum to
// exactly nine) and a digit generate G (they sum to more than nine). The carry
// into digit i+1 is then the OR, over every lower position j, of G_j ANDed with
// the P of all positions between j and i. This is the sum-of-products form of
// the document's carry equation, written out directly rather than as a ripple
// chain. cin is the carry into digit 0. Purely combinational.
module bcd_carry_extractor #(
  parameter int unsigned N = 22          // digits
) (
  input  logic [N-1:0] p,                // digit propagate: a_i + b_i == 9
  input  logic [N-1:0] g,                // digit generate:  a_i + b_i >  9
  input  logic         cin,
  output logic [N:0]   c                 // c[i] = carry into digit i, c[N] = carry out
);
  // For digit i, term[j] is G_j ANDed with the propagates of digits j+1..i,
  // and term[i+1] is cin ANDed with the propagates of digits 0..i.
  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_pos
    logic [i+1:0] term;                  // term[j], j <= i: from g[j]; term[i+1]: from cin
    logic [i+1:0] prop;                  // prop[j] = AND of p[j..i], prop[i+1] = 1
    assign prop[i+1] = 1'b1;
    for (genvar j = i; j >= 0; j--) begin : g_prop
      assign prop[j] = prop[j+1] & p[j];
    end
    for (genvar j = 0; j <= i; j++) begin : g_term
      assign term[j] = g[j] & prop[j+1];
    end
    assign term[i+1] = cin & prop[0];
    assign c[i+1] = |term;
  end
endmodule
